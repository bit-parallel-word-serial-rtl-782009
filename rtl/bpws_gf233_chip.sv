// bpws_gf233_chip: GF(2^233) multiply/square datapath with an 8-bit bus.
//
// The chip computes C = A*B or C = B^2 in GF(2^233) (polynomial basis,
// F(x) = x^233 + x^74 + 1). Operands arrive over an 8-bit data bus with a
// 5-bit byte address, and the result leaves over an 8-bit bus. Blocks:
//   codec      256-bit register file written a byte at a time (w high)
//   opreg      operand register holding B (bytes 1..30, bits 240:8)
//   mult       word-serial multiplier, one 8-bit word of A per clock,
//              taken from byte 0 of the register file; 30 clocks per product
//   squarer    bit-parallel squarer of B, one clock
//   mux        sel high: product, sel low: square
//   resreg     result register
//   codecout   registered byte read-out of the result (w low)
// The host sequences everything; there is no controller in the chip.
//
// Multiplication, MSW-first multiplier (LSW_FIRST = 0, the default):
//   1. write B into bytes 1..30 (byte j+1 holds B bits 8j+7:8j), w high
//   2. pulse b_load (opreg := B), then pulse rst (clears the accumulator)
//   3. on 30 consecutive clocks write A_29, A_28, ..., A_0 to byte 0;
//      A_j is bits 8j+7:8j of A, A_29 zero-padded above bit 232
//   4. with sel high, pulse res_load on the clock right after the last
//      word was written (the product is valid only in that cycle)
//   5. w low: put address j on addr; byte j of C is on data_out one clock
//      later. Bytes 30 and 31 read zero.
// With LSW_FIRST = 1 the alternative multiplier is used: step 2 pulses rst
// after b_load, which loads B into its shifting register, and step 3 sends
// A_0 first and A_29 last.
// Squaring: write B, pulse b_load, then pulse res_load with sel low; the
// square of opreg is captured on that edge.
//
// Follows the original chip: the block list, the 8-bit bus and 5-bit address, the
// byte map of the register file, the synchronous clear of the multiplier
// accumulator, the sel polarity and read-out only while w is low. This
// implementation's own choices: one clock with load enables (b_load,
// res_load) where the original chip clocks the operand and result registers
// separately, and the LSW_FIRST option.
module bpws_gf233_chip #(
  parameter int unsigned M         = gf2m_pkg::GF_M,
  parameter int unsigned K         = gf2m_pkg::GF_K,
  parameter int unsigned W         = gf2m_pkg::GF_W,
  parameter int unsigned ADDR_W    = gf2m_pkg::ADDR_W,
  parameter bit          LSW_FIRST = 1'b0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              w,
  input  logic [ADDR_W-1:0] addr,
  input  logic [W-1:0]      data,
  input  logic              sel,
  input  logic              b_load,
  input  logic              res_load,
  output logic [W-1:0]      data_out
);
  localparam int unsigned FILE_W = W * (2**ADDR_W);

  if (W + M > FILE_W) begin : g_bad_size
    $error("bpws_gf233_chip: register file too small for a word plus an operand");
  end

  logic [FILE_W-1:0] regfile;
  logic [M-1:0]      b_op, prod, sq, res_d, res_q;

  codec #(.W(W), .ADDR_W(ADDR_W)) u_codec (
    .clk(clk), .w(w), .addr(addr), .data(data), .q(regfile));

  gf_register #(.WIDTH(M)) u_opreg (
    .clk(clk), .clr(1'b0), .ld(1'b0), .ld_val('0),
    .en(b_load), .d(regfile[W +: M]), .q(b_op));

  if (LSW_FIRST) begin : g_lsw
    bpws_lsw_mult #(.M(M), .K(K), .W(W)) u_mult (
      .clk(clk), .init(rst), .i1(b_op), .i2(regfile[W-1:0]), .c(prod));
  end else begin : g_msw
    bpws_msw_mult #(.M(M), .K(K), .W(W)) u_mult (
      .clk(clk), .rst(rst), .i1(b_op), .i2(regfile[W-1:0]), .c(prod));
  end

  gf_squarer #(.M(M), .K(K)) u_squarer (.a(b_op), .c(sq));

  gf_mux2 #(.M(M)) u_mux (.a(prod), .b(sq), .sel(sel), .c(res_d));

  gf_register #(.WIDTH(M)) u_resreg (
    .clk(clk), .clr(1'b0), .ld(1'b0), .ld_val('0),
    .en(res_load), .d(res_d), .q(res_q));

  codecout #(.W(W), .ADDR_W(ADDR_W)) u_codecout (
    .clk(clk), .w(w), .addr(addr),
    .d({{(FILE_W-M){1'b0}}, res_q}), .data_out(data_out));

  // The operand register must not change while a multiplication is running
  // off it, and a clear and a load of B in the same cycle would make the
  // LSW-first multiplier start from the old B.
  a_no_load_with_rst: assert property (@(posedge clk) !(rst && b_load))
    else $error("b_load and rst asserted together");
endmodule
