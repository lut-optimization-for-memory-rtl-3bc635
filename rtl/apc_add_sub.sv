// apc_add_sub: sign determination of the APC-OMS multiplier.
//
// The product of X and A is 16A plus the APC word when x4 = 1 and 16A minus
// it when x4 = 0 (the two inputs X and 32-X share one word). One adder does
// both: for subtraction the APC word is inverted and a carry of one enters,
// as in a ripple adder-subtractor. 16A is A wired four places to the left.
// 'clr' forces the result to zero. Combinational. The arithmetic is the
// design's; the use of clr is this implementation's (the multiplier holds its
// output at zero until a coefficient is loaded).
module apc_add_sub
  import apc_oms_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]       a,     // coefficient A
  input  logic [W+PVN_W:0]   apc,   // APC word
  input  logic               x4,    // 1: add, 0: subtract
  input  logic               clr,   // force zero
  output logic [W+PVN_W:0]   prod   // A * X
);

  logic [W+PVN_W:0] base16;   // 16A
  logic [W+PVN_W:0] operand;
  logic [W+PVN_W:0] sum;

  assign base16  = {1'b0, a, 4'b0000};
  assign operand = x4 ? apc : ~apc;
  assign sum     = base16 + operand + (W+PVN_W+1)'(!x4);
  assign prod    = clr ? '0 : sum;

endmodule
