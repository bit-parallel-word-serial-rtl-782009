// bpws_lsw_mult: bit-parallel word-serial GF(2^M) multiplier, least
// significant word first (the alternative form of the MSW-first design).
//
// With A = A_0 + A_1 x^W + ... + A_{NW-1} (x^W)^{NW-1} the product is
//   D_0 = B,  D_j = x^W * D_{j-1}
//   C_j = C_{j-1} + A_j * D_j,   C_{-1} = 0,   C = C_{NW-1}.
// Five units:
//   M1  gf_const_mult   x^W * D_j (W XOR gates)
//   M2  gf_register     holds D_j; loaded with B by init, then shifted
//   M3  gf_ppg          W x M partial product generator, A_j * D_j
//   M4  gf_adder        C_j = C_{j-1} + A_j * D_j
//   M5  gf_register     holds C_{j-1}; cleared by init
// Its critical path is one XOR shorter than the MSW-first form because
// the constant multiplier sits in the D loop, apart from the adder, at the
// price of a second M-bit register.
// Interface and timing: assert init for one clock edge with B on i1
// (M2 := B, M5 := 0). Then present A_0, A_1, ..., A_{NW-1} on i2, one per
// clock; both registers advance on every edge where init is low. While
// A_{NW-1} is on i2 (the NW-th cycle) c is the product. The init control
// is this implementation's choice: the original architecture only fixes the initial
// values of M2 and M5.
module bpws_lsw_mult #(
  parameter int unsigned M = gf2m_pkg::GF_M,
  parameter int unsigned K = gf2m_pkg::GF_K,
  parameter int unsigned W = gf2m_pkg::GF_W
) (
  input  logic         clk,
  input  logic         init,
  input  logic [M-1:0] i1,
  input  logic [W-1:0] i2,
  output logic [M-1:0] c
);
  logic [M-1:0] d_cur;   // M2 output, D_j
  logic [M-1:0] d_nxt;   // M1 output, x^W * D_j
  logic [M-1:0] pp;      // M3 output, A_j * D_j
  logic [M-1:0] c_prev;  // M5 output, C_{j-1}

  gf_const_mult #(.M(M), .K(K), .S(W)) m1 (.y(d_cur), .z(d_nxt));
  gf_register   #(.WIDTH(M))           m2 (.clk(clk), .clr(1'b0), .ld(init), .ld_val(i1),
                                           .en(1'b1), .d(d_nxt), .q(d_cur));
  gf_ppg        #(.M(M), .K(K), .W(W)) m3 (.a(i2), .b(d_cur), .p(pp));
  gf_adder      #(.M(M))               m4 (.a(c_prev), .b(pp), .c(c));
  gf_register   #(.WIDTH(M))           m5 (.clk(clk), .clr(init), .ld(1'b0), .ld_val('0),
                                           .en(1'b1), .d(c), .q(c_prev));
endmodule
