// maj3: three-input majority gate, the basic logic element of quantum-dot
// cellular automata.
//
// y = ab + bc + ca: the output takes the value that at least two inputs share.
// Holding one input at 0 turns it into a two-input AND, holding one at 1 into
// a two-input OR; the multiplexer of this design builds its AND and OR gates
// that way. Purely combinational, no clock.
module maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  assign y = (a & b) | (b & c) | (c & a);

endmodule
