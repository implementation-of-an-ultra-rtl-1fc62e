// dff: rising-edge D flip-flop with synchronous reset, Q(n+1) = D.
//
// On a low-to-high clk edge q takes d; the falling edge and changes of d
// between edges have no effect. q_n is the complement of q. reset is active
// high and synchronous and clears q to 0. The output shows the sampled value
// one clock after it was present at d.
//
// The function and the complementary outputs follow the source design. Its QCA
// circuit builds the element from three AND majority gates, one OR majority
// gate and a delayed copy of the clock; here the same function is written as an
// ordinary edge-triggered register, and the reset behaviour is this design's
// own choice.
module dff (
  input  logic clk,
  input  logic reset,
  input  logic d,
  output logic q,
  output logic q_n
);

  always_ff @(posedge clk) begin
    if (reset) q <= 1'b0;
    else       q <= d;
  end

  assign q_n = ~q;

endmodule
