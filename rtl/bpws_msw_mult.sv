// bpws_msw_mult: bit-parallel word-serial GF(2^M) multiplier, most
// significant word first (C = A * B mod x^M + x^K + 1).
//
// A is cut into NW = ceil(M/W) words of W bits (the top word zero-padded),
// A = (...(A_{NW-1} x^W + A_{NW-2}) x^W + ...) x^W + A_0, so by Horner's
// rule the product is built with one word per clock:
//   C_j = x^W * C_{j-1} + A_{NW-1-j} * B,   C_{-1} = 0,   C = C_{NW-1}.
// Four units do this:
//   M1  gf_ppg          W x M partial product generator, D_j = A_{NW-1-j} * B
//   M2  gf_adder        C_j = D_j + (x^W C_{j-1})
//   M3  gf_const_mult   x^W * C_j (W XOR gates)
//   M4  gf_register     holds x^W * C_{j-1}; cleared by rst
// Interface and timing: i1 (B) must stay stable for the whole
// multiplication. Assert rst for one clock edge to clear M4. Then present
// the words A_{NW-1}, A_{NW-2}, ..., A_0 on i2, one per clock; M4 captures
// on every edge where rst is low. While A_0 is on i2 (the NW-th cycle,
// NW = 30 for the default sizes), c is the product; it is combinational
// from i1, i2 and M4, so it is read before the edge that would fold it
// into M4. The register is cleared by the synchronous rst, as in the
// design; there is no word counter, the sequencing belongs to the host.
module bpws_msw_mult #(
  parameter int unsigned M = gf2m_pkg::GF_M,
  parameter int unsigned K = gf2m_pkg::GF_K,
  parameter int unsigned W = gf2m_pkg::GF_W
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [M-1:0] i1,
  input  logic [W-1:0] i2,
  output logic [M-1:0] c
);
  logic [M-1:0] d;       // M1 output, partial product
  logic [M-1:0] c_sh;    // M3 output, x^W * C_j
  logic [M-1:0] acc;     // M4 output, x^W * C_{j-1}

  gf_ppg        #(.M(M), .K(K), .W(W)) m1 (.a(i2), .b(i1), .p(d));
  gf_adder      #(.M(M))               m2 (.a(d), .b(acc), .c(c));
  gf_const_mult #(.M(M), .K(K), .S(W)) m3 (.y(c), .z(c_sh));
  gf_register   #(.WIDTH(M))           m4 (.clk(clk), .clr(rst), .ld(1'b0), .ld_val('0),
                                           .en(1'b1), .d(c_sh), .q(acc));
endmodule
