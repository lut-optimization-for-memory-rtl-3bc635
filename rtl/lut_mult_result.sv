// lut_mult_result: partial products of PVN*A for filling the LUT.
//
// Shift-and-add multiplication done by hand: partial product i is A when bit i
// of PVN is one and zero otherwise, placed i positions to the left, so that
// ress[0..3] are the four rows to be added. Combinational; W is the
// coefficient width, each row is W+4 bits wide, the width of a LUT word.
module lut_mult_result
  import apc_oms_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]                 a,     // coefficient A
  input  logic [PVN_W-1:0]             pvn,   // multiplier (product value number)
  output logic [PVN_W-1:0][W+PVN_W-1:0] ress  // ress[i] = pvn[i] ? A << i : 0
);

  always_comb begin
    for (int unsigned i = 0; i < PVN_W; i++)
      ress[i] = pvn[i] ? ((W+PVN_W)'(a) << i) : '0;
  end

endmodule
