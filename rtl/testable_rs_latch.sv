// testable_rs_latch: reversible RS latch, Q+ = S.E + (R.E)'.Q, testable with
// the all-0s and all-1s vectors.
//
// Four Fredkin gates. F1 (a=E, b=S, c=anc[1]) gives S.E on r and passes E on
// p to F2 (a=E, b=R, c=anc[0]), which gives R.E on r; anc = 00 in use. F3 and
// F4 are a cross-coupled pair whose constant inputs are the controls:
//   F4 (a=T1 fed back, b=R.E, c=C2):  r = Q  ? R.E : C2 = Q' + R.E  (C2 = 1)
//   F3 (a=F4's r,      b=C1, c=S.E):  q = Q' ? S.E : C1 = Q + S.E   (C1 = 1)
// so with C1C2 = 11 (normal mode for this latch) F3's q output T1 is
// Q+ = S.E + (R.E)'.Q and F4's r output T2 is the Q' it was formed from.
// With C1C2 = 00 and the all-0s vector, T1 and T2 are 0 whatever the loop
// holds; with 11 and the all-1s vector both are 1, so normal mode doubles as
// the all-1s test.
//
// Timing: T1 (Q) is registered on clk, the clocked QCA feedback wire; the
// gates are combinational, so q answers S, R and E in the same cycle and the
// state moves on at each rising clk. qn is the complement of the stored Q
// after reset: it equals ~q except in a cycle that sets a latch holding 0,
// where both are 1 until the next edge, and for S = R = E = 1 (the forbidden
// input, and the all-1s test vector), where both are 1. No reset port: one
// clk in mode 00 with S.E = 0 clears the latch. The wiring of F3 and F4 is
// this design's reconstruction of the document's four-gate latch; the
// characteristic equation, the gate count and the control codes are the
// document's.
module testable_rs_latch (
  input  logic       clk,
  input  logic       e,        // enable
  input  logic       s,        // set
  input  logic       r,        // reset
  input  logic       c1,       // control C1 (normal 1)
  input  logic       c2,       // control C2 (normal 1)
  input  logic [1:0] anc,      // c constants of F1 and F2 (normal 00)
  output logic       q,        // Q = T1, q output of F3
  output logic       qn,       // Q' = T2, r output of F4 (see timing)
  output logic [6:0] garbage   // {q of F1, p, q of F2, p, r of F3, p, q of F4}
);

  logic q_fb;            // registered feedback wire (Q)
  logic e_pass;          // p of F1, E handed on to F2
  logic se, re;          // S.E and R.E

  fredkin_gate u_f1 (
    .a(e), .b(s), .c(anc[1]),
    .p(e_pass), .q(garbage[6]), .r(se)
  );

  fredkin_gate u_f2 (
    .a(e_pass), .b(r), .c(anc[0]),
    .p(garbage[5]), .q(garbage[4]), .r(re)
  );

  fredkin_gate u_f3 (
    .a(qn), .b(c1), .c(se),
    .p(garbage[3]), .q(q), .r(garbage[2])
  );

  fredkin_gate u_f4 (
    .a(q_fb), .b(re), .c(c2),
    .p(garbage[1]), .q(garbage[0]), .r(qn)
  );

  always_ff @(posedge clk) q_fb <= q;

endmodule
