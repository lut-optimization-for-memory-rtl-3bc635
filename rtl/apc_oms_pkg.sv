// apc_oms_pkg: constants shared by the APC-OMS lookup-table multiplier.
//
// The multiplier takes a 5-bit input X (L = 5). Antisymmetric product coding
// (APC) folds the 32 input values onto 16 addresses, and odd-multiple storage
// (OMS) keeps only the odd multiples of the coefficient, so the table needs
// eight odd multiples A*(2i+1), i = 0..7, plus one word 2A, nine words in all.
// The sizes here are fixed by that coding; the coefficient width W is a
// parameter of each module.
package apc_oms_pkg;

  localparam int unsigned L         = 5;   // input operand width
  localparam int unsigned ADDR_W    = 4;   // LUT address width d3..d0
  localparam int unsigned LUT_WORDS = 9;   // odd multiples 1A..15A and 2A
  localparam int unsigned PVN_W     = 4;   // product value number 0..15
  localparam int unsigned SHIFT_W   = 2;   // barrel shift count 0..3

  // Address of the word 2A, used for X = 00000 (16A = 2A << 3).
  localparam logic [ADDR_W-1:0] ADDR_2A = 4'b1000;

  // Multiple of A held by LUT word i: 2i+1 for i = 0..7, and 2 for word 8.
  function automatic logic [PVN_W-1:0] word_multiple(input int unsigned i);
    if (i < 8) return PVN_W'(2 * i + 1);
    else if (i == 8) return PVN_W'(2);
    else return '0;
  endfunction

endpackage
