// gf_ref_pkg: reference arithmetic for the testbenches.
//
// Elements of GF(2^m), m <= 512, are held in 512-bit vectors (bit i is the
// coefficient of x^i). Multiplication uses the textbook MSB-first
// shift-and-add method, one bit of a per step with a reduction by the
// trinomial x^m + x^k + 1 after every shift. It shares nothing with the
// word-serial structure under test.
package gf_ref_pkg;
  localparam int unsigned MAXW = 512;
  typedef logic [MAXW-1:0] ref_t;

  // x * r mod (x^m + x^k + 1)
  function automatic ref_t ref_mulx(ref_t r, int unsigned m, int unsigned k);
    logic top;
    top = r[m-1];
    r = r << 1;
    r[m] = 1'b0;
    if (top) begin
      r[k] ^= 1'b1;
      r[0] ^= 1'b1;
    end
    return r;
  endfunction

  function automatic ref_t ref_mul(ref_t a, ref_t b, int unsigned m, int unsigned k);
    ref_t r = '0;
    for (int i = int'(m) - 1; i >= 0; i--) begin
      r = ref_mulx(r, m, k);
      if (a[i]) r ^= b;
    end
    return r;
  endfunction

  // random element of GF(2^m)
  function automatic ref_t ref_rand(int unsigned m);
    ref_t r;
    for (int i = 0; i < MAXW / 32; i++) r[i*32 +: 32] = $urandom;
    for (int i = int'(m); i < MAXW; i++) r[i] = 1'b0;
    return r;
  endfunction

  // all ones in the low m bits
  function automatic ref_t ref_ones(int unsigned m);
    ref_t r = '0;
    for (int i = 0; i < int'(m); i++) r[i] = 1'b1;
    return r;
  endfunction
endpackage
