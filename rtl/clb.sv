// clb: configurable logic block of a QCA FPGA, the top of this design.
//
// A K-input lookup table (K = 4) computes any Boolean function of lut_in
// (bit 0 = A ... bit 3 = D). Its output goes two ways: straight to input 0 of
// a 2x1 output multiplexer, and through a D flip-flop to input 1. One more
// configuration cell drives the multiplexer's select, so the block is either a
// combinational function (OUT_COMB) or a registered one (OUT_REG).
//
// Configuration: while cfg_we is high, the cell at cfg_addr takes cfg_data on
// the rising clk edge. Addresses 0 .. 2**K-1 are the truth table (cell i is the
// output for lut_in == i); address 2**K is the output-mode cell. reset
// (synchronous, active high) clears the flip-flop, the truth table and the mode.
//
// Timing: in OUT_COMB, clb_out follows lut_in within the same cycle. In
// OUT_REG, clb_out shows the LUT result for the lut_in sampled at the previous
// rising edge of clk.
//
// The LUT / flip-flop / output-mux arrangement and the mux's role of choosing
// the direct or delayed LUT output follow the source design. Holding the select
// in a configuration cell, the address map, the mux input order and the reset
// behaviour are this design's own choices.
module clb
  import clb_pkg::*;
#(
  parameter int unsigned K = LUT_K
) (
  input  logic         clk,
  input  logic         reset,
  input  logic [K-1:0] lut_in,
  input  logic         cfg_we,
  input  logic [K:0]   cfg_addr,
  input  logic         cfg_data,
  output logic         clb_out
);

  localparam int unsigned MODE_ADDR = cfg_mode_addr(K);

  logic lut_out;
  logic ff_q;
  logic ff_q_n;
  logic mode_bit;
  logic lut_we;
  logic mode_we;

  assign lut_we  = cfg_we && !cfg_addr[K];
  assign mode_we = cfg_we && (cfg_addr == (K+1)'(MODE_ADDR));

  qca_lut #(.K(K)) u_lut (
    .clk     (clk),
    .reset   (reset),
    .cfg_we  (lut_we),
    .cfg_addr(cfg_addr[K-1:0]),
    .cfg_data(cfg_data),
    .sel     (lut_in),
    .lut_out (lut_out)
  );

  dff u_ff (
    .clk  (clk),
    .reset(reset),
    .d    (lut_out),
    .q    (ff_q),
    .q_n  (ff_q_n)
  );

  sram_cell u_mode (
    .clk  (clk),
    .reset(reset),
    .we   (mode_we),
    .d    (cfg_data),
    .q    (mode_bit)
  );

  mux2 u_out_mux (
    .i0(lut_out),
    .i1(ff_q),
    .s0(mode_bit),
    .y (clb_out)
  );

  // Addresses above the mode cell do not exist.
  a_cfg_addr_valid: assert property (@(posedge clk) disable iff (reset)
    cfg_we |-> (cfg_addr <= (K+1)'(MODE_ADDR)));

endmodule
