// apc_oms_lut: the nine-word lookup table of the APC-OMS multiplier.
//
// Word i holds (2i+1)*A for i = 0..7 and word 8 holds 2A, each W+4 bits wide:
// a quarter of the 32 words a plain lookup table for a 5-bit input would need.
// Writing: with wr_en high, the word selected by the one-hot w is loaded at
// the clock edge with PVN*A, where the line selector turns w into the
// multiple PVN and a shift-and-add multiplier forms the product; loading a
// coefficient therefore takes nine writes, one per word. Reading: the word
// selected by w appears combinationally on 'word', forced to zero while the
// active-high 'reset' is high (the zero APC word of X = 10000).
// The table contents, size and reset are the design's; the write port and
// its one-word-per-clock timing are this implementation's choice. The words
// are not cleared by a system reset.
module apc_oms_lut
  import apc_oms_pkg::*;
#(
  parameter int unsigned W     = 8,
  parameter int unsigned WORDS = LUT_WORDS
) (
  input  logic                 clk,
  input  logic [W-1:0]         a,      // coefficient written
  input  logic                 wr_en,  // write the selected word
  input  logic [WORDS-1:0]     w,      // one-hot word select
  input  logic                 reset,  // zero the read word
  output logic [W+PVN_W-1:0]   word    // selected word
);

  logic [PVN_W-1:0]              pvn;
  logic [PVN_W-1:0][W+PVN_W-1:0] ress;
  logic [W+PVN_W-1:0]            wr_data;
  logic [W+PVN_W-1:0]            mem [WORDS];

  lut_line_selector u_sel (.w(w), .pvn(pvn));

  lut_mult_result #(.W(W)) u_pp (.a(a), .pvn(pvn), .ress(ress));

  lut_resultant_mult #(.W(W)) u_sum (.ress(ress), .prod(wr_data));

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int unsigned i = 0; i < WORDS; i++)
        if (w[i]) mem[i] <= wr_data;
  end

  always_comb begin
    word = '0;
    if (!reset)
      for (int unsigned i = 0; i < WORDS; i++)
        if (w[i]) word |= mem[i];
  end

endmodule
