// mux2: 2x1 multiplexer, y = s0 ? i1 : i0.
//
// It is the building block of the lookup table and also chooses the CLB's
// output path. The function and the port names I0, I1, S0, Y follow the source
// design. Its QCA layout is seven cells with one cell held at +1; the gate
// structure used here is this design's own: y = OR(AND(i0, ~s0), AND(i1, s0)),
// with each AND a majority gate whose third input is 0 and the OR a majority
// gate whose third input is 1. Combinational, no clock: the source design
// gives the mux no delay.
module mux2 (
  input  logic i0,
  input  logic i1,
  input  logic s0,
  output logic y
);

  logic s0_n;
  logic and0;
  logic and1;

  qca_inv u_inv  (.a(s0), .y(s0_n));
  maj3    u_and0 (.a(i0),   .b(s0_n), .c(1'b0), .y(and0));
  maj3    u_and1 (.a(i1),   .b(s0),   .c(1'b0), .y(and1));
  maj3    u_or   (.a(and0), .b(and1), .c(1'b1), .y(y));

endmodule
