// gf_squarer: bit-parallel squarer, c = a^2 mod F(x), F = x^M + x^K + 1.
//
// Squaring in characteristic 2 only spreads the coefficients:
// a^2 = sum a_i x^{2i}, i.e. a'_j = a_{j/2} for even j and 0 for odd j,
// j = 0 .. 2M-2. Reducing a' with x^M = x^K + 1 (twice for the highest
// terms) gives a closed form in which every output bit is one input bit or
// the XOR of two. For K even and M odd (the case of x^233 + x^74 + 1):
//   c_i = a'_i + a'_{2M-K+i}       i = 0, 2, ..., K-2
//   c_i = a'_{M+i}                 i = 1, 3, ..., K-1
//   c_i = a'_i + a'_{2M-2K+i}      i = K, K+2, ..., 2K-2
//   c_i = a'_{M+i} + a'_{M-K+i}    i = K+1, K+3, ..., M-2
//   c_i = a'_i                     i = 2K, 2K+2, ..., M-1
// That is fewer than M XOR gates and a single XOR delay, so a squaring
// takes one clock in the chip. Only this trinomial case is built; an
// elaboration-time check rejects other M, K. Purely combinational.
module gf_squarer #(
  parameter int unsigned M = gf2m_pkg::GF_M,
  parameter int unsigned K = gf2m_pkg::GF_K
) (
  input  logic [M-1:0] a,
  output logic [M-1:0] c
);
  if (K % 2 != 0 || M % 2 != 1 || 2 * K >= M) begin : g_bad_field
    $error("gf_squarer: only trinomials with K even, M odd and 2K < M are built");
  end

  // a'_j: the coefficient of x^j in the unreduced square
  function automatic logic spread(input logic [M-1:0] v, input int unsigned j);
    return (j % 2 == 0) ? v[j/2] : 1'b0;
  endfunction

  always_comb begin
    for (int unsigned i = 0; i < M; i++) begin
      if (i % 2 == 0) begin
        if (i < K)            c[i] = spread(a, i) ^ spread(a, 2*M - K + i);
        else if (i < 2*K)     c[i] = spread(a, i) ^ spread(a, 2*M - 2*K + i);
        else                  c[i] = spread(a, i);
      end else begin
        if (i < K)            c[i] = spread(a, M + i);
        else                  c[i] = spread(a, M + i) ^ spread(a, M - K + i);
      end
    end
  end
endmodule
