// testable_latches_top: the four testable reversible latches side by side.
//
// The design is a family of level-sensitive latches (D, T, JK and RS) built
// only from conservative reversible Fredkin gates. Each has two control
// inputs C1 and C2 that in normal mode supply the fan-out its constants and
// in test mode force the feedback to 0 or 1, so that every latch can be
// tested for unidirectional stuck-at faults with just two vectors, all 0s and
// all 1s. The latches are independent; they share only clk, which clocks the
// one register each keeps on its feedback wire. Every input, control,
// constant (anc) and output, unused gate outputs included, is a port of its
// own, prefixed by the latch it belongs to. Timing per latch is described in
// its own module: outputs answer the inputs in the same cycle and the state
// moves on at each rising clk edge.
//
// Beside the latches stands one Fredkin gate timed by the QCA clock zones
// (ports qg_*), clocked by its own phase_clk with one edge per zone: its q and
// r outputs follow the inputs by four edges, one QCA cycle. It shows the
// gate-level QCA timing that the latches abstract into one register per loop.
module testable_latches_top (
  input  logic       clk,

  // D latch: normal C1C2 = 01
  input  logic       d_e,
  input  logic       d_d,
  input  logic       d_c1,
  input  logic       d_c2,
  output logic       d_q,
  output logic       d_t1,
  output logic       d_t2,
  output logic [1:0] d_garbage,

  // T latch: normal C1C2 = 01, anc = 0
  input  logic       t_e,
  input  logic       t_t,
  input  logic       t_c1,
  input  logic       t_c2,
  input  logic       t_anc,
  output logic       t_q,
  output logic       t_qn,
  output logic       t_q_prev,
  output logic [2:0] t_garbage,

  // JK latch: normal C1C2 = 01, anc = 01
  input  logic       jk_e,
  input  logic       jk_j,
  input  logic       jk_k,
  input  logic       jk_c1,
  input  logic       jk_c2,
  input  logic [1:0] jk_anc,
  output logic       jk_q,
  output logic       jk_t1,
  output logic       jk_t2,
  output logic [5:0] jk_garbage,

  // RS latch: normal C1C2 = 11, anc = 00
  input  logic       rs_e,
  input  logic       rs_s,
  input  logic       rs_r,
  input  logic       rs_c1,
  input  logic       rs_c2,
  input  logic [1:0] rs_anc,
  output logic       rs_q,
  output logic       rs_qn,
  output logic [6:0] rs_garbage,

  // Fredkin gate with QCA clock zones
  input  logic       phase_clk,
  input  logic       qg_a,
  input  logic       qg_b,
  input  logic       qg_c,
  output logic       qg_p,
  output logic       qg_q,
  output logic       qg_r
);

  testable_d_latch u_d (
    .clk, .e(d_e), .d(d_d), .c1(d_c1), .c2(d_c2),
    .q(d_q), .t1(d_t1), .t2(d_t2), .garbage(d_garbage)
  );

  testable_t_latch u_t (
    .clk, .e(t_e), .t(t_t), .c1(t_c1), .c2(t_c2), .anc(t_anc),
    .q(t_q), .qn(t_qn), .q_prev(t_q_prev), .garbage(t_garbage)
  );

  testable_jk_latch u_jk (
    .clk, .e(jk_e), .j(jk_j), .k(jk_k), .c1(jk_c1), .c2(jk_c2), .anc(jk_anc),
    .q(jk_q), .t1(jk_t1), .t2(jk_t2), .garbage(jk_garbage)
  );

  testable_rs_latch u_rs (
    .clk, .e(rs_e), .s(rs_s), .r(rs_r), .c1(rs_c1), .c2(rs_c2), .anc(rs_anc),
    .q(rs_q), .qn(rs_qn), .garbage(rs_garbage)
  );

  fredkin_gate_qca u_qca_gate (
    .phase_clk, .a(qg_a), .b(qg_b), .c(qg_c), .p(qg_p), .q(qg_q), .r(qg_r)
  );

endmodule
