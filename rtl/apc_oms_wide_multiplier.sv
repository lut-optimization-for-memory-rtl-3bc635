// apc_oms_wide_multiplier: multiplier of a fixed W-bit coefficient A by an
// XW-bit operand, built from 5-bit APC-OMS lookup-table multipliers by
// splitting the operand.
//
// The operand X is cut into K = ceil(XW/5) pieces of five bits, piece k
// holding bits 5k+4..5k (the top piece is padded with zeros). Each piece
// drives its own apc_oms_multiplier, whose nine-word table holds the odd
// multiples of the same A, so piece k yields A*X_k. The product is
//     A*X = sum over k of (A*X_k) << 5k,
// formed by one adder chain on the registered outputs of the pieces.
//
// Interface and timing are those of apc_oms_multiplier: a coef_load strobe
// loads A into all K tables at once in nine cycles (coef_ready rises when
// they are complete, x_ready is low meanwhile); an operand accepted at one
// rising edge gives y_valid and y = A*X right after it, one product per
// clock.
//
// Splitting the operand into 5-bit pieces is how the design reaches word
// sizes beyond five bits; the piece order, one table per piece and the plain
// adder chain are this implementation's choices. The default XW = 8 is the
// smallest word size the design is evaluated at.
module apc_oms_wide_multiplier
  import apc_oms_pkg::*;
#(
  parameter int unsigned W  = 8,   // coefficient width
  parameter int unsigned XW = 8    // operand width
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            coef_load,   // start loading coef
  input  logic [W-1:0]    coef,        // coefficient A
  output logic            coef_ready,  // all tables complete
  input  logic            x_valid,
  input  logic [XW-1:0]   x,
  output logic            x_ready,
  output logic            y_valid,
  output logic [W+XW-1:0] y            // A * X
);

  localparam int unsigned K  = (XW + L - 1) / L;   // number of 5-bit pieces
  localparam int unsigned PW = W + PVN_W + 1;      // width of a piece product

  logic [K*L-1:0]  x_pad;
  logic [K-1:0]    piece_coef_ready;
  logic [K-1:0]    piece_x_ready;
  logic [K-1:0]    piece_y_valid;
  logic [PW-1:0]   piece_y [K];
  logic [W+XW-1:0] sum;

  assign x_pad = (K*L)'(x);

  for (genvar k = 0; k < K; k++) begin : g_piece
    apc_oms_multiplier #(.W(W)) u_mult (
      .clk       (clk),
      .rst_n     (rst_n),
      .coef_load (coef_load),
      .coef      (coef),
      .coef_ready(piece_coef_ready[k]),
      .x_valid   (x_valid),
      .x         (x_pad[k*L +: L]),
      .x_ready   (piece_x_ready[k]),
      .y_valid   (piece_y_valid[k]),
      .y         (piece_y[k])
    );
  end

  // All pieces run in lock step; piece 0 speaks for them.
  assign coef_ready = piece_coef_ready[0];
  assign x_ready    = piece_x_ready[0];
  assign y_valid    = piece_y_valid[0];

  always_comb begin
    sum = '0;
    for (int unsigned k = 0; k < K; k++)
      sum += (W+XW)'(piece_y[k]) << (L * k);
  end

  assign y = sum;

  a_lock_step: assert property (@(posedge clk) rst_n |->
    (&piece_y_valid == |piece_y_valid) && (&piece_coef_ready == |piece_coef_ready) &&
    (&piece_x_ready == |piece_x_ready));

endmodule
