// qca_lut: K-input lookup table (K = 4 by default) made of SRAM cells and a
// tree of 2x1 multiplexers.
//
// 2**K sram_cell instances hold the truth table. A binary tree of 2**K - 1
// mux2 instances reads it out: the first stage, next to the cells, is selected
// by sel[0] (input A), the next by sel[1] (B), and so on up to a single mux
// selected by sel[K-1] (D). For K = 4 that is 8 + 4 + 2 + 1 = 15 muxes. Cell
// number i sits at the leaf reached by sel == i, so lut_out = truth[sel]:
// cell i is the output for the input pattern whose binary value, D..A, is i.
//
// Interface: cfg_we/cfg_addr/cfg_data write one truth-table cell on a rising
// clk edge; reset clears the table. sel to lut_out is combinational; a write
// shows at lut_out one clock later.
//
// The cell-and-tree structure and the four inputs follow the source design;
// the leaf order, the write port and the reset are this design's own choices.
module qca_lut #(
  parameter int unsigned K = clb_pkg::LUT_K
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         cfg_we,
  input  logic [K-1:0] cfg_addr,
  input  logic         cfg_data,
  input  logic [K-1:0] sel,
  output logic         lut_out
);

  localparam int unsigned CELLS = 1 << K;

  // Heap-ordered tree: node 1 is the root, nodes 2n and 2n+1 are the children
  // of node n, and nodes CELLS .. 2*CELLS-1 are the SRAM cells.
  logic [2*CELLS-1:1] node;

  for (genvar i = 0; i < CELLS; i++) begin : g_cell
    sram_cell u_cell (
      .clk  (clk),
      .reset(reset),
      .we   (cfg_we && (cfg_addr == K'(i))),
      .d    (cfg_data),
      .q    (node[CELLS + i])
    );
  end

  // Node n lies at depth $clog2(n+1)-1; depth d is selected by sel[K-1-d].
  for (genvar d = 0; d < K; d++) begin : g_level
    for (genvar j = 0; j < (1 << d); j++) begin : g_mux
      mux2 u_mux (
        .i0(node[2 * ((1 << d) + j)]),
        .i1(node[2 * ((1 << d) + j) + 1]),
        .s0(sel[K-1-d]),
        .y (node[(1 << d) + j])
      );
    end
  end

  assign lut_out = node[1];

endmodule
