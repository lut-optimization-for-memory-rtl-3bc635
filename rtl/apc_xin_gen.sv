// apc_xin_gen: antisymmetric input mapping of the APC-OMS multiplier.
//
// For a 5-bit X, the products X*A and (32-X)*A add up to 32A, so each pair
// shares one stored word: the product is 16A plus or minus that word. This
// block folds X onto the 16 addresses: when x4 = 1 the low four bits pass
// unchanged, when x4 = 0 they are replaced by their two's complement (modulo
// 16). x4 itself is passed on; it later selects add or subtract.
//   X = 00001 -> 0_1111,  X = 11111 -> 1_1111,  X = 00000 -> 0_0000.
// Purely combinational. The mapping is the one the design is built on; only
// the port names are this implementation's own.
module apc_xin_gen
  import apc_oms_pkg::*;
(
  input  logic [L-1:0] xin,    // operand X
  output logic [L-1:0] xcomp   // {x4, mapped address X'}
);

  always_comb begin
    if (xin[L-1]) xcomp = xin;
    else          xcomp = {1'b0, 4'(~xin[3:0] + 4'd1)};
  end

endmodule
