// clb_pkg: constants and types shared by the configurable logic block.
//
// LUT_K is the number of LUT inputs (four: A, B, C, D), which sets the truth
// table at 2**LUT_K SRAM cells. The configuration address space of the CLB is
// those truth-table cells followed by one cell that selects the output path;
// cfg_mode_addr() gives that cell's address. out_mode_e names the two values of the
// output-mux select. The four-input LUT follows the source design; the address
// map and the encoding of the select are this design's own choices.
package clb_pkg;

  localparam int unsigned LUT_K = 4;

  // Address of the output-mode cell for a LUT with k inputs.
  function automatic int unsigned cfg_mode_addr(int unsigned k);
    return 1 << k;
  endfunction

  typedef enum logic {
    OUT_COMB = 1'b0,  // CLB output = LUT output, no register
    OUT_REG  = 1'b1   // CLB output = LUT output delayed by the flip-flop
  } out_mode_e;

endpackage
