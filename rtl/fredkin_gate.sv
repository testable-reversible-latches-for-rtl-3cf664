// fredkin_gate: the conservative reversible 3x3 Fredkin gate.
//
//   p = a
//   q = a'b + ac      (a = 1 swaps b and c)
//   r = ab  + a'c
//
// The gate maps the eight input vectors one-to-one onto the eight output
// vectors and keeps the number of 1s (and so the parity) unchanged; this
// "conservative" property is what lets a circuit of Fredkin gates be tested
// for unidirectional stuck-at faults with only the all-0s and all-1s vectors.
//
// The structure is the QCA one: two inverters on a, four majority voters with
// one input at 0 acting as ANDs, and two majority voters with one input at 1
// acting as ORs; p is a wire. In the QCA layout the inputs, ANDs, buffers and
// ORs sit in clock zones 0 to 3, so one pass through the gate takes one QCA
// clock cycle; here the gate is combinational and the latches built from it
// put a single register in their feedback loop instead.
//
// An immediate assertion checks the conservative property every time the
// inputs change.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  logic a_n_q, a_n_r;          // two inverter branches, one for each output
  logic and_ab, and_anc;       // terms of r
  logic and_anb, and_ac;       // terms of q

  qca_inverter u_inv_r (.a(a), .f(a_n_r));
  qca_inverter u_inv_q (.a(a), .f(a_n_q));

  maj3 u_and_ab  (.a(a),     .b(b),    .c(1'b0), .f(and_ab));
  maj3 u_and_anc (.a(a_n_r), .b(c),    .c(1'b0), .f(and_anc));
  maj3 u_and_anb (.a(a_n_q), .b(b),    .c(1'b0), .f(and_anb));
  maj3 u_and_ac  (.a(a),     .b(c),    .c(1'b0), .f(and_ac));

  maj3 u_or_r (.a(and_ab),  .b(and_anc), .c(1'b1), .f(r));
  maj3 u_or_q (.a(and_anb), .b(and_ac),  .c(1'b1), .f(q));

  assign p = a;

  always_comb begin
    assert ($countones({a, b, c}) == $countones({p, q, r}))
      else $error("fredkin_gate: number of 1s not conserved");
  end

endmodule
