// lut_resultant_mult: sums the partial products into the LUT word PVN*A.
//
// Adds the four rows from lut_mult_result. PVN is at most 15, so the sum fits
// the W+4 bits of a LUT word without overflow. A plain adder tree: the design
// names this step without giving its structure. Combinational.
module lut_resultant_mult
  import apc_oms_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [PVN_W-1:0][W+PVN_W-1:0] ress,  // partial products
  output logic [W+PVN_W-1:0]            prod   // PVN * A
);

  assign prod = (ress[0] + ress[1]) + (ress[2] + ress[3]);

endmodule
