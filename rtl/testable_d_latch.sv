// testable_d_latch: reversible D latch, Q+ = D.E + E'.Q, testable with the
// all-0s and all-1s vectors.
//
// Two Fredkin gates. F1 (a=E, b=D, c=T1) puts the next state E ? D : T1 on
// its r output. F2 (a=that value, b=C1, c=C2) is the fan-out gate: p repeats
// the latch value as Q, and with C1C2 = 01 its q output T1 is Q again (the
// copy that is fed back) and its r output T2 is Q'. With C1C2 = 00 both T1
// and T2 are 0 and with 11 both are 1, whatever the latch holds, so the
// feedback is cut and the latch can be tested as a combinational conservative
// circuit.
//
// Timing: the feedback wire T1 is one flip-flop clocked by clk, which stands
// for the clocked QCA wire of the loop. Everything else is combinational, so
// the latch is transparent while E = 1 (q follows d in the same cycle) and
// holds the value registered at the last clk edge while E = 0. There is no
// reset: one clk with C1C2 = 00 clears the latch and one with 11 presets it.
// The gates, their wiring and the control codes follow the document; the
// single loop register and the garbage port are this design's choices.
module testable_d_latch (
  input  logic       clk,
  input  logic       e,        // enable
  input  logic       d,        // data
  input  logic       c1,       // control C1 (normal 0)
  input  logic       c2,       // control C2 (normal 1)
  output logic       q,        // Q, p output of F2
  output logic       t1,       // T1: Q in normal mode, fed back to F1
  output logic       t2,       // T2: Q' in normal mode
  output logic [1:0] garbage   // {p, q} of F1, unused by the latch
);

  logic t1_fb;   // registered feedback wire
  logic next_q;  // r output of F1

  fredkin_gate u_f1 (
    .a(e), .b(d), .c(t1_fb),
    .p(garbage[1]), .q(garbage[0]), .r(next_q)
  );

  fredkin_gate u_f2 (
    .a(next_q), .b(c1), .c(c2),
    .p(q), .q(t1), .r(t2)
  );

  always_ff @(posedge clk) t1_fb <= t1;

endmodule
