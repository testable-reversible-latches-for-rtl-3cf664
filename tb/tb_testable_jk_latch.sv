// tb_testable_jk_latch: self-checking testbench of the testable JK latch.
//
// Random J, K and E with the controls mostly in normal mode (C1C2 = 01,
// anc = 01): Q and T1 must be (J.Q' + K'.Q).E + E'.Q of the stored state in
// the same cycle and T2 the complement. In test mode (00 or 11) T1 and T2 must
// equal the forced value; with the matching all-0s or all-1s vector on every
// input, anc included, every output must equal it. A test mode leaves both
// fed-back wires at the same value, so the first normal cycle after one is
// driven with E = 0, which reloads the latch with the forced value.
module tb_testable_jk_latch;
  import latch_ref_pkg::*;
  import rlatch_pkg::*;

  localparam int unsigned CYCLES = 400;

  logic clk = 1'b0;
  logic e, j, k, c1, c2, q, t1, t2;
  logic [1:0] anc;
  logic [5:0] garbage;
  ctrl_e mode, last_mode;
  bit    state, state_known;
  int    burst;          // cycles left in the current test-mode burst
  int checks = 0, failures = 0;
  int n_set = 0, n_reset = 0, n_toggle = 0, n_hold = 0, n_test0 = 0, n_test1 = 0;

  testable_jk_latch dut (.clk, .e, .j, .k, .c1, .c2, .anc, .q, .t1, .t2, .garbage);

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
      $display("%t JK latch %s: got %0b expected %0b", $time, what, got, exp);
    end
  endtask

  initial begin
    state_known = 1'b0;
    last_mode   = CTRL_TEST_ALL0;
    burst       = 0;
    for (int unsigned cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);
      // test modes come in bursts of three cycles: the first flushes the loop
      if (burst > 0)
        burst--;
      else if (!state_known || $urandom_range(9) == 0) begin
        mode  = ($urandom_range(1) == 0) ? CTRL_TEST_ALL0 : CTRL_TEST_ALL1;
        burst = 2;
      end else
        mode = CTRL_NORMAL;
      {c1, c2} = mode;
      if (mode != CTRL_NORMAL && $urandom_range(1) == 0) begin
        {e, j, k} = {3{mode == CTRL_TEST_ALL1}};   // the test vector
        anc       = {2{mode == CTRL_TEST_ALL1}};
      end else begin
        {e, j, k} = 3'($urandom);
        anc       = JK_ANC_NORMAL;
        if (mode == CTRL_NORMAL && last_mode != CTRL_NORMAL) e = 1'b0;
      end
      #2;
      if (state_known) begin
        if (mode == CTRL_NORMAL) begin
          check("q", q, jk_next(e, j, k, state));
          check("t1", t1, jk_next(e, j, k, state));
          check("t2", t2, !jk_next(e, j, k, state));
          if (!e) n_hold++;
          else if (j && k) n_toggle++;
          else if (j) n_set++;
          else if (k) n_reset++;
          else n_hold++;
        end else begin
          check("t1 forced", t1, mode == CTRL_TEST_ALL1);
          check("t2 forced", t2, mode == CTRL_TEST_ALL1);
          if ({e, j, k, anc} == {5{mode == CTRL_TEST_ALL1}} && last_mode == mode) begin
            check("all outputs", &{q, t1, t2, garbage} | ~|{q, t1, t2, garbage}, 1'b1);
            check("vector value", q, mode == CTRL_TEST_ALL1);
            if (mode == CTRL_TEST_ALL1) n_test1++; else n_test0++;
          end
        end
      end
      @(posedge clk);
      state = (mode == CTRL_NORMAL) ? jk_next(e, j, k, state) : (mode == CTRL_TEST_ALL1);
      state_known = 1'b1;
      last_mode = mode;
    end
    checks++;
    if (n_set == 0 || n_reset == 0 || n_toggle == 0 || n_hold == 0 || n_test0 == 0 || n_test1 == 0) begin
      failures++;
      $display("JK latch: a mode was never exercised");
    end
    $display("JK latch: set=%0d reset=%0d toggle=%0d hold=%0d test0=%0d test1=%0d",
             n_set, n_reset, n_toggle, n_hold, n_test0, n_test1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
