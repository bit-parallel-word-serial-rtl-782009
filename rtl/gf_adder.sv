// gf_adder: GF(2^m) adder, M two-input XOR gates (c = a + b).
//
// Addition in a binary field is carry-free, so each coefficient is the XOR
// of the two input coefficients. This is the "sub XOR network" node of the
// XOR tree in the partial product generator, and the adder that combines
// the partial product with the accumulator in both word-serial multipliers.
// Purely combinational.
module gf_adder #(
  parameter int unsigned M = gf2m_pkg::GF_M
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] c
);
  assign c = a ^ b;
endmodule
