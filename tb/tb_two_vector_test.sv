// tb_two_vector_test: fault-coverage check of the two-vector test.
//
// Claim under test: every unidirectional stuck-at fault on a gate output or a
// feedback register of the latches is found with only two test vectors. The
// test procedure applied to the whole design is
//   1. C1C2 = 00 on every latch and 0 on every other input, for two clocks;
//      in the second cycle every output, unused ones included, must be 0;
//   2. C1C2 = 11 and 1 on every input, for two clocks; in the second cycle
//      every output must be 1.
// The first cycle of each step flushes the feedback loops.
//
// The testbench first runs the procedure on the fault-free design, which must
// pass. It then injects, one at a time, a stuck-at-0 and a stuck-at-1 fault
// on each of the 44 Fredkin gate outputs and feedback wires of the four
// latches (a feedback wire is forced where it enters its gate), by forcing
// the net. Assertions are switched off while a fault is present, since a
// forced gate output breaks the conservation that fredkin_gate asserts. Each fault must make the procedure fail.
// Finally it injects random multiple faults, all stuck at the same value, on
// 2 to 6 nets at once, and checks that the procedure fails for these as well.
// The faults are forced from here; the RTL is not changed.
module tb_two_vector_test;

  localparam int NETS   = 44;
  localparam int MULTI  = 200;   // random multiple unidirectional faults

  logic clk = 1'b0;
  logic d_e, d_d, d_c1, d_c2, d_q, d_t1, d_t2;
  logic [1:0] d_garbage;
  logic t_e, t_t, t_c1, t_c2, t_anc, t_q, t_qn, t_q_prev;
  logic [2:0] t_garbage;
  logic jk_e, jk_j, jk_k, jk_c1, jk_c2, jk_q, jk_t1, jk_t2;
  logic [1:0] jk_anc;
  logic [5:0] jk_garbage;
  logic rs_e, rs_s, rs_r, rs_c1, rs_c2, rs_q, rs_qn;
  logic [1:0] rs_anc;
  logic [6:0] rs_garbage;
  // the clock-zoned Fredkin gate of the top is not part of this test
  logic phase_clk = 1'b0;
  logic qg_a = 1'b0, qg_b = 1'b0, qg_c = 1'b0;
  logic qg_p, qg_q, qg_r;

  testable_latches_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_single = 0, n_multi = 0;

  initial begin
    repeat (20 * (2 * NETS + MULTI + 4)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // every output of the design, 29 bits
  function automatic logic [28:0] all_outputs();
    return {d_q, d_t1, d_t2, d_garbage,
            t_q, t_qn, t_q_prev, t_garbage,
            jk_q, jk_t1, jk_t2, jk_garbage,
            rs_q, rs_qn, rs_garbage};
  endfunction

  // every input of the design, controls and constants included, set to v
  task automatic apply_vector(bit v);
    {d_e, d_d, d_c1, d_c2}             = {4{v}};
    {t_e, t_t, t_c1, t_c2, t_anc}      = {5{v}};
    {jk_e, jk_j, jk_k, jk_c1, jk_c2}   = {5{v}};
    jk_anc                             = {2{v}};
    {rs_e, rs_s, rs_r, rs_c1, rs_c2}   = {5{v}};
    rs_anc                             = {2{v}};
  endtask

  // the two-vector test; returns 1 when the design passes it
  task automatic two_vector_test(output bit passed);
    passed = 1'b1;
    for (int v = 0; v < 2; v++) begin
      @(negedge clk);
      apply_vector(1'(v));
      @(negedge clk);
      #1;
      if (all_outputs() !== {29{1'(v)}}) passed = 1'b0;
    end
  endtask

`define STUCK(idx, path) idx: if (v) force path = 1'b1; else force path = 1'b0;
`define FREE(idx, path)  idx: release path;

  task automatic inject(int idx, bit v);
    case (idx)
      `STUCK(0,  dut.u_d.u_f1.p)  `STUCK(1,  dut.u_d.u_f1.q)  `STUCK(2,  dut.u_d.u_f1.r)
      `STUCK(3,  dut.u_d.u_f2.p)  `STUCK(4,  dut.u_d.u_f2.q)  `STUCK(5,  dut.u_d.u_f2.r)
      `STUCK(6,  dut.u_d.u_f1.c)
      `STUCK(7,  dut.u_t.u_f1.p)  `STUCK(8,  dut.u_t.u_f1.q)  `STUCK(9,  dut.u_t.u_f1.r)
      `STUCK(10, dut.u_t.u_f2.p)  `STUCK(11, dut.u_t.u_f2.q)  `STUCK(12, dut.u_t.u_f2.r)
      `STUCK(13, dut.u_t.u_f3.p)  `STUCK(14, dut.u_t.u_f3.q)  `STUCK(15, dut.u_t.u_f3.r)
      `STUCK(16, dut.u_t.u_f2.a)
      `STUCK(17, dut.u_jk.u_f1.p) `STUCK(18, dut.u_jk.u_f1.q) `STUCK(19, dut.u_jk.u_f1.r)
      `STUCK(20, dut.u_jk.u_f2.p) `STUCK(21, dut.u_jk.u_f2.q) `STUCK(22, dut.u_jk.u_f2.r)
      `STUCK(23, dut.u_jk.u_f3.p) `STUCK(24, dut.u_jk.u_f3.q) `STUCK(25, dut.u_jk.u_f3.r)
      `STUCK(26, dut.u_jk.u_f4.p) `STUCK(27, dut.u_jk.u_f4.q) `STUCK(28, dut.u_jk.u_f4.r)
      `STUCK(29, dut.u_jk.u_f3.c)  `STUCK(30, dut.u_jk.u_f2.a)
      `STUCK(31, dut.u_rs.u_f1.p) `STUCK(32, dut.u_rs.u_f1.q) `STUCK(33, dut.u_rs.u_f1.r)
      `STUCK(34, dut.u_rs.u_f2.p) `STUCK(35, dut.u_rs.u_f2.q) `STUCK(36, dut.u_rs.u_f2.r)
      `STUCK(37, dut.u_rs.u_f3.p) `STUCK(38, dut.u_rs.u_f3.q) `STUCK(39, dut.u_rs.u_f3.r)
      `STUCK(40, dut.u_rs.u_f4.p) `STUCK(41, dut.u_rs.u_f4.q) `STUCK(42, dut.u_rs.u_f4.r)
      `STUCK(43, dut.u_rs.u_f4.a)
      default: ;
    endcase
  endtask

  task automatic release_fault(int idx);
    case (idx)
      `FREE(0,  dut.u_d.u_f1.p)  `FREE(1,  dut.u_d.u_f1.q)  `FREE(2,  dut.u_d.u_f1.r)
      `FREE(3,  dut.u_d.u_f2.p)  `FREE(4,  dut.u_d.u_f2.q)  `FREE(5,  dut.u_d.u_f2.r)
      `FREE(6,  dut.u_d.u_f1.c)
      `FREE(7,  dut.u_t.u_f1.p)  `FREE(8,  dut.u_t.u_f1.q)  `FREE(9,  dut.u_t.u_f1.r)
      `FREE(10, dut.u_t.u_f2.p)  `FREE(11, dut.u_t.u_f2.q)  `FREE(12, dut.u_t.u_f2.r)
      `FREE(13, dut.u_t.u_f3.p)  `FREE(14, dut.u_t.u_f3.q)  `FREE(15, dut.u_t.u_f3.r)
      `FREE(16, dut.u_t.u_f2.a)
      `FREE(17, dut.u_jk.u_f1.p) `FREE(18, dut.u_jk.u_f1.q) `FREE(19, dut.u_jk.u_f1.r)
      `FREE(20, dut.u_jk.u_f2.p) `FREE(21, dut.u_jk.u_f2.q) `FREE(22, dut.u_jk.u_f2.r)
      `FREE(23, dut.u_jk.u_f3.p) `FREE(24, dut.u_jk.u_f3.q) `FREE(25, dut.u_jk.u_f3.r)
      `FREE(26, dut.u_jk.u_f4.p) `FREE(27, dut.u_jk.u_f4.q) `FREE(28, dut.u_jk.u_f4.r)
      `FREE(29, dut.u_jk.u_f3.c)  `FREE(30, dut.u_jk.u_f2.a)
      `FREE(31, dut.u_rs.u_f1.p) `FREE(32, dut.u_rs.u_f1.q) `FREE(33, dut.u_rs.u_f1.r)
      `FREE(34, dut.u_rs.u_f2.p) `FREE(35, dut.u_rs.u_f2.q) `FREE(36, dut.u_rs.u_f2.r)
      `FREE(37, dut.u_rs.u_f3.p) `FREE(38, dut.u_rs.u_f3.q) `FREE(39, dut.u_rs.u_f3.r)
      `FREE(40, dut.u_rs.u_f4.p) `FREE(41, dut.u_rs.u_f4.q) `FREE(42, dut.u_rs.u_f4.r)
      `FREE(43, dut.u_rs.u_f4.a)
      default: ;
    endcase
  endtask

`undef STUCK
`undef FREE

  initial begin
    bit passed;
    int picked[$];

    // fault-free design passes
    two_vector_test(passed);
    checks++;
    if (!passed) begin
      failures++;
      $display("fault-free design fails the two-vector test");
    end

    // every single stuck-at fault is detected
    for (int idx = 0; idx < NETS; idx++) begin
      for (int v = 0; v < 2; v++) begin
        $assertoff;
        inject(idx, 1'(v));
        two_vector_test(passed);
        release_fault(idx);
        $asserton;
        checks++;
        n_single++;
        if (passed) begin
          failures++;
          $display("stuck-at-%0d on net %0d not detected", v, idx);
        end
      end
    end

    // multiple faults that all stick at the same value are detected
    for (int m = 0; m < MULTI; m++) begin
      bit v;
      int n;
      v = 1'($urandom_range(1));
      n = 2 + $urandom_range(4);
      picked.delete();
      for (int i = 0; i < n; i++) picked.push_back($urandom_range(NETS - 1));
      $assertoff;
      foreach (picked[i]) inject(picked[i], v);
      two_vector_test(passed);
      foreach (picked[i]) release_fault(picked[i]);
      $asserton;
      checks++;
      n_multi++;
      if (passed) begin
        failures++;
        $display("multiple stuck-at-%0d fault on %0d nets not detected", v, n);
      end
    end

    // and the design is healthy again once every fault is released
    two_vector_test(passed);
    checks++;
    if (!passed) begin
      failures++;
      $display("design fails the two-vector test after all faults were released");
    end

    $display("single faults injected=%0d, multiple faults injected=%0d", n_single, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
