// tb_maj3: exhaustive check of the majority voter against a count of ones.
module tb_maj3;
  logic a, b, c, f;
  int checks = 0, failures = 0;

  maj3 dut (.a, .b, .c, .f);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (f !== ($countones(3'(v)) >= 2)) begin
        failures++;
        $display("maj3 mismatch for %03b: got %0b", 3'(v), f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
