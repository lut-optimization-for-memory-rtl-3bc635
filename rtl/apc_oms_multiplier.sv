// apc_oms_multiplier: memory-based multiplier of a fixed coefficient A by a
// 5-bit operand X, using the combined APC-OMS lookup table.
//
// A plain table for a 5-bit X would hold 32 products of A. Two codings cut it
// to nine words:
//   * antisymmetric product coding: X*A and (32-X)*A sum to 32A, so both are
//     16A -/+ one stored "APC word"; x4 says which sign to use, and the low
//     four bits, two's-complemented when x4 = 0, address that word;
//   * odd-multiple storage: an address X' = X'' * 2^s with X'' odd needs only
//     X''*A in the table, shifted left by s afterwards.
// The table holds A, 3A, ..., 15A and 2A (for X = 00000, 16A = 2A << 3); the
// APC word of X = 10000 is zero and comes from forcing the table output low.
//
// Datapath (combinational, one product per clock):
//   x -> apc_xin_gen -> apc_addr_gen -(d)-> line_decoder_4to9 -(w)-> apc_oms_lut
//     -> barrel_shifter (s) -> apc_add_sub (x4) -> product register -> y
//
// Loading a coefficient: a one-cycle coef_load captures coef; then nine
// cycles walk the decoder through addresses 0..8 and write PVN*A into each
// word (the table computes PVN*A itself). coef_ready rises after the ninth
// write. While loading, x_ready is low and operands are refused; before the
// first coefficient the product is held at zero.
//
// Timing: an operand accepted (x_valid & x_ready) at one rising edge gives
// y_valid and y = A*X from the next edge on. An operand presented in the same
// cycle as coef_load still uses the previous coefficient.
//
// The codings, table contents, address, shift and reset equations and the
// sign step follow the design; the clocking, the load sequence, the
// handshake and the asynchronous active-low reset are this implementation's.
module apc_oms_multiplier
  import apc_oms_pkg::*;
#(
  parameter int unsigned W = 8   // coefficient width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             coef_load,   // start loading coef
  input  logic [W-1:0]     coef,        // coefficient A
  output logic             coef_ready,  // table complete
  input  logic             x_valid,
  input  logic [L-1:0]     x,
  output logic             x_ready,
  output logic             y_valid,
  output logic [W+PVN_W:0] y            // A * X
);

  typedef enum logic [1:0] {EMPTY, LOADING, READY} state_e;

  state_e             state;
  logic [W-1:0]       a_reg;
  logic [ADDR_W-1:0]  load_addr;

  logic [L-1:0]        xcomp;
  logic [ADDR_W-1:0]   d;
  logic [SHIFT_W-1:0]  s;
  logic                lut_reset;
  logic [ADDR_W-1:0]   dec_addr;
  logic [LUT_WORDS-1:0] w;
  logic [W+PVN_W-1:0]  lut_word;
  logic [W+PVN_W:0]    apc_word;
  logic [W+PVN_W:0]    prod;
  logic                loading;

  assign loading    = (state == LOADING);
  assign coef_ready = (state == READY);
  assign x_ready    = coef_ready;

  // ---- coefficient load sequence -----------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= EMPTY;
      a_reg     <= '0;
      load_addr <= '0;
    end else if (coef_load) begin
      state     <= LOADING;
      a_reg     <= coef;
      load_addr <= '0;
    end else if (loading) begin
      if (load_addr == ADDR_W'(LUT_WORDS - 1)) state <= READY;
      load_addr <= load_addr + 1'b1;
    end
  end

  // ---- datapath ----------------------------------------------------------
  apc_xin_gen u_xin (.xin(x), .xcomp(xcomp));

  apc_addr_gen u_addr (.xcomp(xcomp), .d(d), .s(s), .reset(lut_reset));

  assign dec_addr = loading ? load_addr : d;

  line_decoder_4to9 u_dec (.din(dec_addr), .w(w));

  apc_oms_lut #(.W(W)) u_lut (
    .clk  (clk),
    .a    (a_reg),
    .wr_en(loading),
    .w    (w),
    .reset(lut_reset),
    .word (lut_word)
  );

  barrel_shifter #(.W(W)) u_shift (.inp(lut_word), .s(s), .outp(apc_word));

  apc_add_sub #(.W(W)) u_sign (
    .a   (a_reg),
    .apc (apc_word),
    .x4  (xcomp[L-1]),
    .clr (!coef_ready),
    .prod(prod)
  );

  // ---- product register --------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      y       <= '0;
    end else begin
      y_valid <= x_valid && x_ready;
      if (x_valid && x_ready) y <= prod;
    end
  end

  // Exactly one word is selected whenever the table is written or read.
  a_onehot_select: assert property (@(posedge clk) disable iff (!rst_n)
    (loading || (x_valid && x_ready)) |-> $onehot(w));

endmodule
