// tb_fredkin_gate: checks the Fredkin gate against its truth table for all
// eight inputs, and checks that it is conservative (as many 1s out as in)
// and one-to-one (all eight outputs distinct).
module tb_fredkin_gate;
  import latch_ref_pkg::*;

  logic a, b, c, p, q, r;
  logic [7:0] seen;
  int checks = 0, failures = 0;

  fredkin_gate dut (.a, .b, .c, .p, .q, .r);

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({p, q, r} !== fredkin_row(3'(v))) begin
        failures++;
        $display("fredkin mismatch for ABC=%03b: PQR=%b expected %b", 3'(v), {p, q, r}, fredkin_row(3'(v)));
      end
      checks++;
      if ($countones({p, q, r}) != $countones(3'(v))) begin
        failures++;
        $display("fredkin not conservative for ABC=%03b", 3'(v));
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hff) begin
      failures++;
      $display("fredkin mapping is not one-to-one: %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
