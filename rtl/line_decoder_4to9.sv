// line_decoder_4to9: word-select decoder of the nine-word APC-OMS LUT.
//
// A 3-to-8 decoder extended by one line: address 0..8 raises exactly one of
// w0..w8. Addresses 9..15 are never produced by the address generator and
// raise no line (this implementation's choice). Combinational.
module line_decoder_4to9
  import apc_oms_pkg::*;
(
  input  logic [ADDR_W-1:0]    din,  // address d3..d0
  output logic [LUT_WORDS-1:0] w     // one-hot word select
);

  always_comb begin
    w = '0;
    for (int unsigned i = 0; i < LUT_WORDS; i++)
      if (din == ADDR_W'(i)) w[i] = 1'b1;
  end

endmodule
