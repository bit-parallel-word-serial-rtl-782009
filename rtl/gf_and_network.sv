// gf_and_network: multiplies a field element by one GF(2) coefficient.
//
// M two-input AND gates, each gating one bit of b with the coefficient a
// (c = a * b). Inside the partial product generator it selects whether the
// term a_i * x^i * B enters the sum. Purely combinational.
module gf_and_network #(
  parameter int unsigned M = gf2m_pkg::GF_M
) (
  input  logic         a,
  input  logic [M-1:0] b,
  output logic [M-1:0] c
);
  assign c = b & {M{a}};
endmodule
