// tb_testable_latches_top: end-to-end testbench of the four testable latches.
//
// Runs the whole design as it would be used and tested. Most cycles are
// normal operation, with random inputs on all four latches and every output
// compared with the latch's characteristic equation. Now and then the whole
// design goes through a two-vector test: for two or three cycles every latch
// gets C1C2 = 00 and the all-0s vector (constants included) or C1C2 = 11 and
// the all-1s vector, and from the second cycle on every output of the design,
// unused gate outputs included, must equal the vector. The first normal cycle
// after a test has E = 0 on every latch, which reloads the state.
// Alongside, the clock-zoned Fredkin gate gets a new random vector on every
// phase_clk edge, and its q, r must match the truth table of the vector four
// edges earlier (one QCA cycle) and p the a of one edge earlier.
// Counts how often each mechanism happened and fails if one never did.
module tb_testable_latches_top;
  import latch_ref_pkg::*;
  import rlatch_pkg::*;

  localparam int unsigned CYCLES = 2000;

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
  logic phase_clk = 1'b0;
  logic qg_a, qg_b, qg_c, qg_p, qg_q, qg_r;
  logic [2:0] qg_hist [5];       // vector applied k phase_clk edges ago
  int n_qca_gate = 0;

  testable_latches_top dut (.*);

  always #5 clk = ~clk;
  always #3 phase_clk = ~phase_clk;

  // clock-zoned Fredkin gate: random vectors, outputs checked four edges on
  initial begin
    {qg_a, qg_b, qg_c} = 3'b000;
    for (int i = 0; i < 5; i++) qg_hist[i] = 3'b000;
    for (int k = 0; ; k++) begin
      @(negedge phase_clk);
      {qg_a, qg_b, qg_c} = 3'($urandom);
      @(posedge phase_clk);
      for (int i = 4; i > 0; i--) qg_hist[i] = qg_hist[i - 1];
      qg_hist[0] = {qg_a, qg_b, qg_c};
      #1;
      if (k >= 4) begin
        check("QCA gate q,r", ({qg_q, qg_r} == fredkin_row(qg_hist[3])[1:0]), 1'b1);
        check("QCA gate p", qg_p, qg_hist[0][2]);
        n_qca_gate++;
      end
    end
  end

  int checks = 0, failures = 0;
  bit d_st, t_st, jk_st, rs_st, known;
  int burst;                 // cycles left in the current test
  bit vec;                   // value of the current test vector
  bit in_test, was_test;
  int n_d_transparent = 0, n_d_hold = 0, n_t_toggle = 0, n_t_hold = 0;
  int n_jk_set = 0, n_jk_reset = 0, n_jk_toggle = 0, n_jk_hold = 0;
  int n_rs_set = 0, n_rs_reset = 0, n_rs_hold = 0;
  int n_test0 = 0, n_test1 = 0, n_to_test = 0, n_to_normal = 0;

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
      $display("%t %s: got %0b expected %0b", $time, what, got, exp);
    end
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    known = 1'b0;
    burst = 0;
    was_test = 1'b0;
    for (int unsigned cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);
      if (burst == 0 && !was_test && (!known || $urandom_range(15) == 0)) begin
        burst = 2 + $urandom_range(1);
        vec   = 1'($urandom_range(1));
      end
      in_test = (burst > 0);
      if (in_test) begin
        burst--;
        {d_e, d_d, d_c1, d_c2}               = {4{vec}};
        {t_e, t_t, t_c1, t_c2, t_anc}        = {5{vec}};
        {jk_e, jk_j, jk_k, jk_c1, jk_c2}     = {5{vec}};
        jk_anc                               = {2{vec}};
        {rs_e, rs_s, rs_r, rs_c1, rs_c2}     = {5{vec}};
        rs_anc                               = {2{vec}};
      end else begin
        {d_c1, d_c2}   = CTRL_NORMAL;
        {t_c1, t_c2}   = CTRL_NORMAL;
        {jk_c1, jk_c2} = CTRL_NORMAL;
        {rs_c1, rs_c2} = RS_CTRL_NORMAL;
        t_anc  = T_ANC_NORMAL;
        jk_anc = JK_ANC_NORMAL;
        rs_anc = RS_ANC_NORMAL;
        {d_e, d_d, t_e, t_t, jk_e, jk_j, jk_k, rs_e, rs_s, rs_r} = 10'($urandom);
        if (rs_e && rs_s && rs_r) rs_s = 1'b0;
        if (was_test) {d_e, t_e, jk_e, rs_e} = '0;
      end
      #2;
      if (in_test) begin
        if (was_test) begin
          // second cycle of a test: the loops are flushed, all outputs = vec
          check("D outputs",  &{d_q, d_t1, d_t2, d_garbage} == vec && |{d_q, d_t1, d_t2, d_garbage} == vec, 1'b1);
          check("T outputs",  &{t_q, t_qn, t_q_prev, t_garbage} == vec && |{t_q, t_qn, t_q_prev, t_garbage} == vec, 1'b1);
          check("JK outputs", &{jk_q, jk_t1, jk_t2, jk_garbage} == vec && |{jk_q, jk_t1, jk_t2, jk_garbage} == vec, 1'b1);
          check("RS outputs", &{rs_q, rs_qn, rs_garbage} == vec && |{rs_q, rs_qn, rs_garbage} == vec, 1'b1);
          if (vec) n_test1++; else n_test0++;
        end else begin
          check("D t1 forced",  d_t1,  vec);
          check("T q forced",   t_q,   vec);
          check("JK t1 forced", jk_t1, vec);
          check("RS q vector",  rs_q,  vec);
          n_to_test += known;
        end
      end else if (known) begin
        if (was_test) n_to_normal++;
        check("D q",  d_q,  d_next(d_e, d_d, d_st));
        check("D t2", d_t2, !d_next(d_e, d_d, d_st));
        check("T q",  t_q,  t_next(t_e, t_t, t_st));
        check("T qn", t_qn, !t_next(t_e, t_t, t_st));
        check("JK q",  jk_q,  jk_next(jk_e, jk_j, jk_k, jk_st));
        check("JK t2", jk_t2, !jk_next(jk_e, jk_j, jk_k, jk_st));
        check("RS q",  rs_q,  rs_next(rs_e, rs_s, rs_r, rs_st));
        if (!(rs_e && rs_s && !rs_st))
          check("RS qn", rs_qn, !rs_next(rs_e, rs_s, rs_r, rs_st));
        if (d_e) n_d_transparent++; else n_d_hold++;
        if (t_e && t_t) n_t_toggle++; else n_t_hold++;
        if (!jk_e || (!jk_j && !jk_k)) n_jk_hold++;
        else if (jk_j && jk_k) n_jk_toggle++;
        else if (jk_j) n_jk_set++;
        else n_jk_reset++;
        if (rs_e && rs_s) n_rs_set++;
        else if (rs_e && rs_r) n_rs_reset++;
        else n_rs_hold++;
      end
      @(posedge clk);
      if (in_test) begin
        {d_st, t_st, jk_st, rs_st} = {4{vec}};
      end else begin
        d_st  = d_next(d_e, d_d, d_st);
        t_st  = t_next(t_e, t_t, t_st);
        jk_st = jk_next(jk_e, jk_j, jk_k, jk_st);
        rs_st = rs_next(rs_e, rs_s, rs_r, rs_st);
      end
      known = 1'b1;
      was_test = in_test;
    end
    need("D transparent", n_d_transparent);  need("D hold", n_d_hold);
    need("T toggle", n_t_toggle);            need("T hold", n_t_hold);
    need("JK set", n_jk_set);  need("JK reset", n_jk_reset);
    need("JK toggle", n_jk_toggle);  need("JK hold", n_jk_hold);
    need("RS set", n_rs_set);  need("RS reset", n_rs_reset);  need("RS hold", n_rs_hold);
    need("all-0s test", n_test0);  need("all-1s test", n_test1);
    need("QCA-timed gate vectors", n_qca_gate);
    need("switch to test mode", n_to_test);  need("switch to normal mode", n_to_normal);
    $display("D transparent=%0d hold=%0d | T toggle=%0d hold=%0d | JK set=%0d reset=%0d toggle=%0d hold=%0d",
             n_d_transparent, n_d_hold, n_t_toggle, n_t_hold, n_jk_set, n_jk_reset, n_jk_toggle, n_jk_hold);
    $display("RS set=%0d reset=%0d hold=%0d | all-0s tests=%0d all-1s tests=%0d | to test=%0d to normal=%0d",
             n_rs_set, n_rs_reset, n_rs_hold, n_test0, n_test1, n_to_test, n_to_normal);
    $display("QCA-timed gate vectors checked=%0d", n_qca_gate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
