// testable_jk_latch: reversible JK latch, Q+ = (J.Q' + K'.Q).E + E'.Q,
// testable with the all-0s and all-1s vectors.
//
// Four Fredkin gates. F1 (a=K, b=anc[1], c=anc[0]) with anc = 01 gives K'
// on its r output. F2 (a=T2 fed back, i.e. Q', b=J, c=K') gives
// Q' ? J : K' = J.Q' + K'.Q on its r output. F3 and F4 are the testable D
// latch: F3 (a=E, b=that value, c=T1 fed back) selects the next state and F4
// (a=next state, b=C1, c=C2) fans it out as Q on p, T1 = Q on q and T2 = Q'
// on r when C1C2 = 01. With C1C2 = 00 or 11 both T1 and T2 are forced to 0
// or 1, which cuts both feedback loops for the two-vector test.
//
// Timing: T1 and T2 are each registered on clk (the clocked QCA feedback
// wires); the gates are combinational, so q answers J, K and E in the same
// cycle and with J = K = E = 1 toggles once per clk. No reset: one clk in test
// mode 00 clears the latch, 11 presets it. The constant inputs of F1 are the
// port anc (tie to 01 in use). Gates, wiring and control codes follow the
// document; the loop registers, anc and garbage ports are this design's.
module testable_jk_latch (
  input  logic       clk,
  input  logic       e,        // enable
  input  logic       j,
  input  logic       k,
  input  logic       c1,       // control C1 (normal 0)
  input  logic       c2,       // control C2 (normal 1)
  input  logic [1:0] anc,      // {b, c} constants of F1 (normal 01)
  output logic       q,        // Q, p output of F4
  output logic       t1,       // T1: Q in normal mode, fed back to F3
  output logic       t2,       // T2: Q' in normal mode, fed back to F2
  output logic [5:0] garbage   // {p, q of F1, p, q of F2, p, q of F3}
);

  logic t1_fb, t2_fb;    // registered feedback wires
  logic k_n;             // K', r output of F1
  logic jk_next;         // J.Q' + K'.Q, r output of F2
  logic next_q;          // E ? jk_next : Q, r output of F3

  fredkin_gate u_f1 (
    .a(k), .b(anc[1]), .c(anc[0]),
    .p(garbage[5]), .q(garbage[4]), .r(k_n)
  );

  fredkin_gate u_f2 (
    .a(t2_fb), .b(j), .c(k_n),
    .p(garbage[3]), .q(garbage[2]), .r(jk_next)
  );

  fredkin_gate u_f3 (
    .a(e), .b(jk_next), .c(t1_fb),
    .p(garbage[1]), .q(garbage[0]), .r(next_q)
  );

  fredkin_gate u_f4 (
    .a(next_q), .b(c1), .c(c2),
    .p(q), .q(t1), .r(t2)
  );

  always_ff @(posedge clk) begin
    t1_fb <= t1;
    t2_fb <= t2;
  end

endmodule
