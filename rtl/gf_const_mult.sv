// gf_const_mult: constant multiplier Z = x^S * Y mod F(x), F = x^M + x^K + 1.
//
// Multiplying by x^S shifts Y up by S places; the S bits pushed past
// x^(M-1) are folded back with x^M = x^K + 1, so they land twice: once at
// positions 0..S-1 and once at positions K..K+S-1, where each is added to
// the shifted bit already there. The circuit is therefore pure wiring plus
// exactly S two-input XOR gates:
//   z[i] = y[M-S+i]                 i = 0 .. S-1
//   z[i] = y[i-S]                   i = S .. K-1
//   z[i] = y[i-S] ^ y[M-S+i-K]      i = K .. K+S-1
//   z[i] = y[i-S]                   i = K+S .. M-1
// With M=233, K=74, S=8 this is the x^8 multiplier (M3) of the MSW-first
// multiplier; S=1..7 are the seven constant multipliers inside the partial
// product generator. The fold is single (no second reduction), which needs
// S <= K and K+S <= M; an elaboration-time check enforces it.
// Purely combinational, no clock.
module gf_const_mult #(
  parameter int unsigned M = gf2m_pkg::GF_M,
  parameter int unsigned K = gf2m_pkg::GF_K,
  parameter int unsigned S = 8
) (
  input  logic [M-1:0] y,
  output logic [M-1:0] z
);
  if (S < 1 || S > K || K + S > M) begin : g_bad_shift
    $error("gf_const_mult: shift S must satisfy 1 <= S <= K and K+S <= M");
  end

  always_comb begin
    for (int unsigned i = 0; i < M; i++) begin
      if (i < S)
        z[i] = y[M-S+i];
      else if (i >= K && i < K + S)
        z[i] = y[i-S] ^ y[M-S+i-K];
      else
        z[i] = y[i-S];
    end
  end
endmodule
