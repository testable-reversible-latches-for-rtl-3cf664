// fredkin_gate_qca: the Fredkin gate with the four-phase QCA clock zones.
//
// Same function as fredkin_gate (p = a, q = a'b + ac, r = ab + a'c), but
// timed as the QCA layout is. Each clock zone is one pipeline stage, and
// phase_clk has one rising edge per zone, i.e. four per QCA clock cycle:
//   zone 0  input cells: a, b, c are sampled;
//   zone 1  the four AND voters (majority with one input at 0) and the
//           inverters on a;
//   zone 2  buffer cells carrying the four products;
//   zone 3  the two OR voters (majority with one input at 1) give q and r.
// So q and r follow the inputs by four phase_clk edges: the one-cycle delay
// of a Fredkin gate in QCA. p is a wire taken from the input a of zone 0, as
// in the layout, and therefore follows a by one edge.
// There is no reset; the pipeline holds valid data four edges after the
// inputs are. The zone assignment is the document's; counting one register
// per zone and one phase_clk edge per zone is this design's model of the
// four-phase clock.
module fredkin_gate_qca (
  input  logic phase_clk,   // one rising edge per clock zone
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,           // a, one edge later
  output logic q,           // a'b + ac, four edges later
  output logic r            // ab + a'c, four edges later
);

  typedef struct packed {
    logic ab;    // a.b   -> r
    logic anc;   // a'.c  -> r
    logic anb;   // a'.b  -> q
    logic ac;    // a.c   -> q
  } products_t;

  logic      a0, b0, c0;          // zone 0
  products_t and_out;             // AND voters, combinational
  products_t z1, z2;              // zones 1 and 2
  logic      a_n_q, a_n_r;        // inverter branches
  logic      or_q, or_r;          // OR voters, combinational

  always_ff @(posedge phase_clk) {a0, b0, c0} <= {a, b, c};

  qca_inverter u_inv_r (.a(a0), .f(a_n_r));
  qca_inverter u_inv_q (.a(a0), .f(a_n_q));

  maj3 u_and_ab  (.a(a0),    .b(b0), .c(1'b0), .f(and_out.ab));
  maj3 u_and_anc (.a(a_n_r), .b(c0), .c(1'b0), .f(and_out.anc));
  maj3 u_and_anb (.a(a_n_q), .b(b0), .c(1'b0), .f(and_out.anb));
  maj3 u_and_ac  (.a(a0),    .b(c0), .c(1'b0), .f(and_out.ac));

  always_ff @(posedge phase_clk) begin
    z1 <= and_out;   // zone 1: AND voters
    z2 <= z1;        // zone 2: buffers
  end

  maj3 u_or_r (.a(z2.ab),  .b(z2.anc), .c(1'b1), .f(or_r));
  maj3 u_or_q (.a(z2.anb), .b(z2.ac),  .c(1'b1), .f(or_q));

  always_ff @(posedge phase_clk) {q, r} <= {or_q, or_r};   // zone 3

  assign p = a0;

endmodule
