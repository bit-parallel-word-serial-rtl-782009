// gf_ppg: W x M bit-parallel partial product generator, p = A_j * B mod F(x).
//
// A_j is a W-bit word a_{W-1} x^{W-1} + ... + a_0, i.e. a field element
// whose upper M-W coefficients are zero, so
//   A_j * B = a_0 B + a_1 (x B) + ... + a_{W-1} (x^{W-1} B).
// The W-1 products x^i B come from constant multipliers (i XOR gates
// each), an AND network per term gates each with its coefficient a_i, and
// an XOR tree adds the W gated terms. No term needs a reduction step
// beyond the single fold inside each constant multiplier.
// Cost for M=233, W=8: 8*233 AND gates, 7*233 + (1+...+7) XOR gates;
// depth one AND plus four XOR delays (one in the constant multiplier,
// three in the tree). Purely combinational.
module gf_ppg #(
  parameter int unsigned M = gf2m_pkg::GF_M,
  parameter int unsigned K = gf2m_pkg::GF_K,
  parameter int unsigned W = gf2m_pkg::GF_W
) (
  input  logic [W-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] p
);
  logic [W-1:0][M-1:0] shifted;   // shifted[i] = x^i * b mod F
  logic [W-1:0][M-1:0] gated;     // gated[i]   = a_i * shifted[i]

  assign shifted[0] = b;
  for (genvar i = 1; i < W; i++) begin : g_shift
    gf_const_mult #(.M(M), .K(K), .S(i)) u_cm (.y(b), .z(shifted[i]));
  end

  for (genvar i = 0; i < W; i++) begin : g_and
    gf_and_network #(.M(M)) u_and (.a(a[i]), .b(shifted[i]), .c(gated[i]));
  end

  gf_xor_network #(.M(M), .N(W)) u_xor (.x(gated), .z(p));
endmodule
