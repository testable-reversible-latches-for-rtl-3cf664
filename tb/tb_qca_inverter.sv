// tb_qca_inverter: checks both input values of the QCA inverter.
module tb_qca_inverter;
  logic a, f;
  int checks = 0, failures = 0;

  qca_inverter dut (.a, .f);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2; v++) begin
      a = 1'(v);
      #1;
      checks++;
      if (f !== (v == 0)) begin
        failures++;
        $display("inverter mismatch for %0d: got %0b", v, f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
