// gf2m_pkg: field and datapath constants shared by the GF(2^m) blocks.
//
// The field is GF(2^233) in polynomial basis, generated by the NIST
// trinomial F(x) = x^233 + x^74 + 1. An element is a 233-bit vector whose
// bit i is the coefficient of x^i. The word-serial multipliers take the
// operand A in 8-bit words, so one multiplication needs ceil(233/8) = 30
// words; the chip's byte-addressed register file has a 5-bit address.
// The field, the trinomial, the word size and the address width are the
// ones of the original chip; the type names are this implementation's own.
package gf2m_pkg;
  localparam int unsigned GF_M   = 233;  // field degree m
  localparam int unsigned GF_K   = 74;   // middle term of the trinomial x^m + x^k + 1
  localparam int unsigned GF_W   = 8;    // word size w of the word-serial multiplier
  localparam int unsigned GF_NW  = (GF_M + GF_W - 1) / GF_W;  // words per operand (30)
  localparam int unsigned ADDR_W = 5;    // byte address width of the chip

  typedef logic [GF_M-1:0] gf_elem_t;
  typedef logic [GF_W-1:0] gf_word_t;
endpackage
