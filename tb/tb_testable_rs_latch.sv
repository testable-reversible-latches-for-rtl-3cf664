// tb_testable_rs_latch: self-checking testbench of the testable RS latch.
//
// Random S, R and E (never S = R = 1 while E = 1) with the controls mostly in
// normal mode (C1C2 = 11, anc = 00): Q must be S.E + (R.E)'.Q of the stored
// state in the same cycle; Q' must be its complement, except in a cycle that
// sets a latch holding 0, where it still shows the old Q' = 1. The forbidden
// input S = R = E = 1, which is also the all-1s test vector, must give 1 on
// every output. In mode 00 with the all-0s vector every output must be 0.
module tb_testable_rs_latch;
  import latch_ref_pkg::*;
  import rlatch_pkg::*;

  localparam int unsigned CYCLES = 400;

  logic clk = 1'b0;
  logic e, s, r, c1, c2, q, qn;
  logic [1:0] anc;
  logic [6:0] garbage;
  ctrl_e mode, last_mode;
  bit    state, state_known;
  bit    last_vec1;      // the previous cycle applied the all-1s vector
  int    burst;          // cycles left in the current test-vector burst
  bit    burst_vec1;     // which vector the burst applies
  int checks = 0, failures = 0;
  int n_set = 0, n_reset = 0, n_hold = 0, n_test0 = 0, n_test1 = 0;

  testable_rs_latch dut (.clk, .e, .s, .r, .c1, .c2, .anc, .q, .qn, .garbage);

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
      $display("%t RS latch %s: got %0b expected %0b", $time, what, got, exp);
    end
  endtask

  initial begin
    state_known = 1'b0;
    last_mode   = RS_CTRL_NORMAL;
    last_vec1   = 1'b0;
    burst       = 0;
    for (int unsigned cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);
      // the first cycles and, now and then, a burst of two or three cycles
      // apply one of the two test vectors
      if (burst == 0 && (!state_known || $urandom_range(9) == 0)) begin
        burst      = 2 + $urandom_range(1);
        burst_vec1 = 1'($urandom_range(1));
      end else if (burst > 0)
        burst--;
      if (burst > 0) begin
        if (!burst_vec1) begin
          mode = CTRL_TEST_ALL0;
          {e, s, r} = 3'b000;
          anc       = 2'b00;
        end else begin
          mode = CTRL_TEST_ALL1;
          {e, s, r} = 3'b111;
          anc       = 2'b11;
        end
      end else begin
        mode = RS_CTRL_NORMAL;
        anc  = RS_ANC_NORMAL;
        {e, s, r} = 3'($urandom);
        if (e && s && r) s = 1'b0;
      end
      {c1, c2} = mode;
      #2;
      if (mode == CTRL_TEST_ALL0) begin
        check("q all-0s", q, 1'b0);
        check("qn all-0s", qn, 1'b0);
        if (last_mode == mode) begin
          check("every output all-0s", |garbage, 1'b0);
          n_test0++;
        end
      end else if (anc == 2'b11) begin
        check("q all-1s", q, 1'b1);
        check("qn all-1s", qn, 1'b1);
        if (last_vec1) begin
          check("every output all-1s", &garbage, 1'b1);
          n_test1++;
        end
      end else if (state_known) begin
        check("q", q, rs_next(e, s, r, state));
        check("qn", qn, (s && e && !state) ? 1'b1 : !rs_next(e, s, r, state));
        if (e && s) n_set++;
        else if (e && r) n_reset++;
        else n_hold++;
      end
      @(posedge clk);
      if (mode == CTRL_TEST_ALL0) state = 1'b0;
      else if (anc == 2'b11) state = 1'b1;
      else state = rs_next(e, s, r, state);
      state_known = 1'b1;
      last_mode = mode;
      last_vec1 = (anc == 2'b11);
    end
    checks++;
    if (n_set == 0 || n_reset == 0 || n_hold == 0 || n_test0 == 0 || n_test1 == 0) begin
      failures++;
      $display("RS latch: a mode was never exercised");
    end
    $display("RS latch: set=%0d reset=%0d hold=%0d test0=%0d test1=%0d",
             n_set, n_reset, n_hold, n_test0, n_test1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
