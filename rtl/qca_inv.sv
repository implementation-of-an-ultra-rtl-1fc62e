// qca_inv: QCA inverter.
//
// The output is the complement of the input. In a QCA layout this is a chain
// of cells that meets the next chain at a corner or with a half-cell offset;
// both layouts have this one logic function. Combinational, no clock.
module qca_inv (
  input  logic a,
  output logic y
);

  assign y = ~a;

endmodule
