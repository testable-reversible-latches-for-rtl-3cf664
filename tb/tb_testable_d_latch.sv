// tb_testable_d_latch: self-checking testbench of the testable D latch.
//
// Drives random E and D with the controls mostly in normal mode (C1C2 = 01)
// and now and then in a test mode (00 or 11). In normal mode Q and T1 must
// follow the characteristic equation Q+ = D.E + E'.Q in the same cycle and T2
// must be their complement; the state moves on at each rising clk. In test
// mode T1 and T2 must equal the forced value, and with the matching all-0s or
// all-1s vector on every input all outputs, garbage included, must equal it.
module tb_testable_d_latch;
  import latch_ref_pkg::*;
  import rlatch_pkg::*;

  localparam int unsigned CYCLES = 400;

  logic clk = 1'b0;
  logic e, d, c1, c2, q, t1, t2;
  logic [1:0] garbage;
  ctrl_e mode;
  bit    state;       // reference state of the latch
  bit    state_known;
  int checks = 0, failures = 0;
  int n_transparent = 0, n_hold = 0, n_test0 = 0, n_test1 = 0;

  testable_d_latch dut (.clk, .e, .d, .c1, .c2, .q, .t1, .t2, .garbage);

  always #5 clk = ~clk;

  initial begin
    repeat (CYCLES + 50) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%t D latch %s: got %0b expected %0b", $time, what, got, exp);
    end
  endtask

  initial begin
    state_known = 1'b0;
    for (int unsigned cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);
      if (!state_known || $urandom_range(7) == 0)
        mode = ($urandom_range(1) == 0) ? CTRL_TEST_ALL0 : CTRL_TEST_ALL1;
      else
        mode = CTRL_NORMAL;
      {c1, c2} = mode;
      if (mode != CTRL_NORMAL && $urandom_range(1) == 0)
        {e, d} = (mode == CTRL_TEST_ALL1) ? 2'b11 : 2'b00;   // the test vector
      else
        {e, d} = 2'($urandom);
      #2;
      if (state_known) begin
        check("q", q, d_next(e, d, state));
        if (mode == CTRL_NORMAL) begin
          check("t1", t1, d_next(e, d, state));
          check("t2", t2, !d_next(e, d, state));
          if (e) n_transparent++; else n_hold++;
        end else begin
          check("t1 forced", t1, mode == CTRL_TEST_ALL1);
          check("t2 forced", t2, mode == CTRL_TEST_ALL1);
          // matching test vector and a flushed loop: every output equals it
          if ({e, d} == {2{mode == CTRL_TEST_ALL1}} && state == (mode == CTRL_TEST_ALL1)) begin
            check("all outputs", &{q, t1, t2, garbage} | ~|{q, t1, t2, garbage}, 1'b1);
            check("vector value", q, mode == CTRL_TEST_ALL1);
            if (mode == CTRL_TEST_ALL1) n_test1++; else n_test0++;
          end
        end
      end
      @(posedge clk);
      state = (mode == CTRL_NORMAL) ? d_next(e, d, state) : (mode == CTRL_TEST_ALL1);
      state_known = 1'b1;
    end
    checks++;
    if (n_transparent == 0 || n_hold == 0 || n_test0 == 0 || n_test1 == 0) begin
      failures++;
      $display("D latch: a mode was never exercised");
    end
    $display("D latch: transparent=%0d hold=%0d test0=%0d test1=%0d",
             n_transparent, n_hold, n_test0, n_test1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
