// testable_t_latch: reversible T latch, Q+ = (T.E) xor Q, testable with the
// all-0s and all-1s vectors.
//
// Three Fredkin gates. F1 (a=T, b=E, c=anc) gives T.E on its r output when
// anc = 0. F2 (a=T1 fed back, b=C1, c=C2) is the fan-out gate: p repeats the
// stored state, and with C1C2 = 01 its q and r outputs are Q and Q'. F3
// (a=T.E, b, c = those two) swaps them when T.E = 1, so its q output T1 is
// (T.E) xor Q and its r output T2 the complement. With C1C2 = 00 F2 drives
// both of F3's data inputs to 0, so T1 = T2 = 0; with 11 both become 1. The
// feedback is thereby cut in test mode.
//
// Timing: T1 is registered on clk (the clocked QCA feedback wire); the gates
// are combinational, so with T.E = 1 the output toggles once per clk, and
// q_prev is the value stored at the last edge. There is no reset: one clk in
// test mode 00 clears the latch, 11 presets it. The constant input of F1 is
// the port anc (tie it to 0 in use; drive it with the test vector in test).
// Gates, wiring and control codes follow the document; the loop register,
// the anc and garbage ports are this design's choices.
module testable_t_latch (
  input  logic       clk,
  input  logic       e,        // enable
  input  logic       t,        // toggle
  input  logic       c1,       // control C1 (normal 0)
  input  logic       c2,       // control C2 (normal 1)
  input  logic       anc,      // constant input of F1 (normal 0)
  output logic       q,        // Q = T1, q output of F3
  output logic       qn,       // Q' = T2, r output of F3
  output logic       q_prev,   // p output of F2: state stored at the last edge
  output logic [2:0] garbage   // {p, q of F1, p of F3}
);

  logic t1_fb;           // registered feedback wire
  logic te;              // T.E, r output of F1
  logic cp_q, cp_r;      // copies of Q and Q' from F2

  fredkin_gate u_f1 (
    .a(t), .b(e), .c(anc),
    .p(garbage[2]), .q(garbage[1]), .r(te)
  );

  fredkin_gate u_f2 (
    .a(t1_fb), .b(c1), .c(c2),
    .p(q_prev), .q(cp_q), .r(cp_r)
  );

  fredkin_gate u_f3 (
    .a(te), .b(cp_q), .c(cp_r),
    .p(garbage[0]), .q(q), .r(qn)
  );

  always_ff @(posedge clk) t1_fb <= q;

endmodule
