// qca_inverter: the QCA inverter, f = a'.
//
// In QCA the inverter splits a wire into two branches that meet a cell placed
// diagonally, which takes the opposite polarisation. Logically it is a plain
// complement; it is kept as a module of its own so that the Fredkin gate can
// be written device by device, as it is laid out. Combinational, no clock.
module qca_inverter (
  input  logic a,
  output logic f
);

  assign f = ~a;

endmodule
