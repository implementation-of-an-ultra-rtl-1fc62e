// sram_cell: one configuration memory bit of the lookup table.
//
// The stored bit q drives a data input of a first-stage LUT multiplexer. It is
// written on a rising clk edge while we is high and cleared by a synchronous,
// active-high reset (reset wins over a write). The role of the cell follows the
// source design, which does not describe its circuit; the write port and the
// reset are this design's own choices. q changes one clock after the write.
module sram_cell (
  input  logic clk,
  input  logic reset,
  input  logic we,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk) begin
    if (reset)   q <= 1'b0;
    else if (we) q <= d;
  end

endmodule
