// barrel_shifter: restores the factor 2^s removed by odd-multiple storage.
//
// The LUT word (an odd multiple of A, or 2A) is shifted left by s = 0..3 in
// two stages of 2:1 multiplexers: first by two places when s1 is set, then by
// one place when s0 is set. The output is one bit wider than the word, since
// the largest result is 16A = 2A << 3. Combinational, as in the design.
module barrel_shifter
  import apc_oms_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W+PVN_W-1:0]   inp,   // LUT word
  input  logic [SHIFT_W-1:0]   s,     // shift count
  output logic [W+PVN_W:0]     outp   // APC word
);

  logic [W+PVN_W:0] im;

  assign im   = s[1] ? ((W+PVN_W+1)'(inp) << 2) : (W+PVN_W+1)'(inp);
  assign outp = s[0] ? (im << 1) : im;

endmodule
