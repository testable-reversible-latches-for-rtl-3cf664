// tb_testable_t_latch: self-checking testbench of the testable T latch.
//
// Random T and E with the controls mostly in normal mode (C1C2 = 01, anc = 0):
// Q must be (T xor Q).E + E'.Q of the stored state in the same cycle, Q' its
// complement, and q_prev the stored state. In test mode (00 or 11) Q and Q'
// must both equal the forced value; with the matching all-0s or all-1s vector
// on every input, anc included, every output must equal it.
module tb_testable_t_latch;
  import latch_ref_pkg::*;
  import rlatch_pkg::*;

  localparam int unsigned CYCLES = 400;

  logic clk = 1'b0;
  logic e, t, c1, c2, anc, q, qn, q_prev;
  logic [2:0] garbage;
  ctrl_e mode;
  bit    state, state_known;
  int checks = 0, failures = 0;
  int n_toggle = 0, n_hold = 0, n_test0 = 0, n_test1 = 0;

  testable_t_latch dut (.clk, .e, .t, .c1, .c2, .anc, .q, .qn, .q_prev, .garbage);

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
      $display("%t T latch %s: got %0b expected %0b", $time, what, got, exp);
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
        {e, t, anc} = {3{mode == CTRL_TEST_ALL1}};   // the test vector
      else begin
        {e, t} = 2'($urandom);
        anc    = T_ANC_NORMAL;
      end
      #2;
      if (state_known) begin
        check("q_prev", q_prev, state);
        if (mode == CTRL_NORMAL) begin
          check("q", q, t_next(e, t, state));
          check("qn", qn, !t_next(e, t, state));
          if (e && t) n_toggle++; else n_hold++;
        end else begin
          check("q forced", q, mode == CTRL_TEST_ALL1);
          check("qn forced", qn, mode == CTRL_TEST_ALL1);
          if ({e, t, anc} == {3{mode == CTRL_TEST_ALL1}} && state == (mode == CTRL_TEST_ALL1)) begin
            check("all outputs", &{q, qn, q_prev, garbage} | ~|{q, qn, q_prev, garbage}, 1'b1);
            check("vector value", q_prev, mode == CTRL_TEST_ALL1);
            if (mode == CTRL_TEST_ALL1) n_test1++; else n_test0++;
          end
        end
      end
      @(posedge clk);
      state = (mode == CTRL_NORMAL) ? t_next(e, t, state) : (mode == CTRL_TEST_ALL1);
      state_known = 1'b1;
    end
    checks++;
    if (n_toggle == 0 || n_hold == 0 || n_test0 == 0 || n_test1 == 0) begin
      failures++;
      $display("T latch: a mode was never exercised");
    end
    $display("T latch: toggle=%0d hold=%0d test0=%0d test1=%0d", n_toggle, n_hold, n_test0, n_test1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
