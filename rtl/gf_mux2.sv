// gf_mux2: result selector of the chip.
//
// c = a when sel is high (multiplier product), b when sel is low (squarer
// result); the polarity follows the original chip. Purely combinational.
module gf_mux2 #(
  parameter int unsigned M = gf2m_pkg::GF_M
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         sel,
  output logic [M-1:0] c
);
  assign c = sel ? a : b;
endmodule
