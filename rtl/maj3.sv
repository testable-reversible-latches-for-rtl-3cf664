// maj3: three-input majority voter, the basic logic device of QCA.
//
// f = ab + ac + bc. In quantum-dot cellular automata a cross of four cells
// settles to the polarisation held by the majority of its three input arms;
// fixing one input at 0 turns the voter into a two-input AND and fixing it at
// 1 into an OR, which is how the Fredkin gate of this design uses it. Purely
// combinational, no clock.
module maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic f
);

  assign f = (a & b) | (a & c) | (b & c);

endmodule
