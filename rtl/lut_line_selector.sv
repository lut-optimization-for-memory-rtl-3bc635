// lut_line_selector: product value number of the selected LUT word.
//
// Each word of the APC-OMS table holds PVN*A. From the one-hot word select
// this block gives PVN: 1, 3, 5, ..., 15 for w0..w7 (the odd multiples) and 2
// for w8 (the word used for X = 00000). No line raised gives 0. The odd
// sequence and the word 2A are the design's; the encoding as an OR of the
// selected constants is this implementation's. Combinational.
module lut_line_selector
  import apc_oms_pkg::*;
(
  input  logic [LUT_WORDS-1:0] w,    // one-hot word select
  output logic [PVN_W-1:0]     pvn   // multiple of A held by that word
);

  always_comb begin
    pvn = '0;
    for (int unsigned i = 0; i < LUT_WORDS; i++)
      if (w[i]) pvn |= word_multiple(i);
  end

endmodule
