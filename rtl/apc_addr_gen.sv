// apc_addr_gen: address generation and control of the APC-OMS multiplier.
//
// The mapped address X' = x3'x2'x1'x0' (0..15) is written as an odd number
// X'' times 2^s. The LUT keeps only the odd multiples, so this block gives
//   s  (s1 s0)  the number of trailing zeros of X', which the barrel shifter
//               restores:  s0 = ~(x0' | ~(x1' | ~x2')),  s1 = ~(x0' | x1');
//   d  (d3..d0) the word holding X''*A: d3 = 1 only for X' = 0000, which
//               addresses the word 2A (shifted by three to give 16A);
//               otherwise d2..d0 = (X''-1)/2, i.e. bits 3..1 of X' >> s;
//   reset       high for X = 10000, whose APC word is zero:
//               reset = ~(x0 | x1 | x2 | x3) & x4.
// The equations for s and reset are the design's; the address equations are
// this implementation's reading of the odd-multiple table. Combinational.
module apc_addr_gen
  import apc_oms_pkg::*;
(
  input  logic [L-1:0]       xcomp,  // {x4, X'}
  output logic [ADDR_W-1:0]  d,      // LUT address
  output logic [SHIFT_W-1:0] s,      // left-shift count 0..3
  output logic               reset   // zero the LUT output
);

  logic [3:0] xp;        // X'
  logic [2:0] odd_idx;   // (X''-1)/2, with X'' = X' >> s
  logic       all_zero;

  assign xp       = xcomp[3:0];
  assign all_zero = ~(xp[0] | xp[1] | xp[2] | xp[3]);

  assign s[0]  = ~(xp[0] | ~(xp[1] | ~xp[2]));
  assign s[1]  = ~(xp[0] | xp[1]);
  assign reset = all_zero & xcomp[4];

  assign odd_idx = 3'(xp >> (3'(s) + 3'd1));
  assign d       = all_zero ? ADDR_2A : {1'b0, odd_idx};

endmodule
