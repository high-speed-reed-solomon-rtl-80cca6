// gf_pkg: GF(2^4) arithmetic shared by every block of the Reed-Solomon decoder.
//
// Elements are 4-bit vectors in the polynomial basis {1, a, a^2, a^3}, where a is
// a root of the primitive polynomial x^4 + x + 1.  Addition is a bitwise XOR.
// The text fixes the field size (symbols in GF(2^4)); the primitive polynomial
// is this design's choice, the one under which the error locator a^11 reads
// 0xE as in the worked example of the decoder.
//
// Functions:
//   gf_mul(a, b)      product, shift-and-add with reduction (combinational)
//   gf_sq(a)          square (a linear map in GF(2^m))
//   gf_inv(a)         a^-1 = a^(2^m - 2) = a^14, with gf_inv(0) = 0
//   gf_alpha_pow(e)   a^e for any non-negative e
package gf_pkg;

  localparam int unsigned M = 4;                     // bits per symbol
  localparam int unsigned Q = (1 << M) - 1;          // 15, multiplicative group order
  localparam logic [M:0]  PRIM_POLY = 5'b1_0011;     // x^4 + x + 1

  typedef logic [M-1:0] gf_t;

  // a * x, reduced
  function automatic gf_t gf_xtime(gf_t a);
    return a[M-1] ? ((a << 1) ^ PRIM_POLY[M-1:0]) : gf_t'(a << 1);
  endfunction

  function automatic gf_t gf_mul(gf_t a, gf_t b);
    gf_t acc = '0;
    gf_t sh  = a;
    for (int i = 0; i < M; i++) begin
      if (b[i]) acc ^= sh;
      sh = gf_xtime(sh);
    end
    return acc;
  endfunction

  function automatic gf_t gf_sq(gf_t a);
    return gf_mul(a, a);
  endfunction

  // a^14 = a^2 * a^4 * a^8
  function automatic gf_t gf_inv(gf_t a);
    gf_t a2 = gf_sq(a);
    gf_t a4 = gf_sq(a2);
    gf_t a8 = gf_sq(a4);
    return gf_mul(gf_mul(a2, a4), a8);
  endfunction

  function automatic gf_t gf_alpha_pow(int unsigned e);
    gf_t r = gf_t'(1);
    for (int unsigned i = 0; i < e % Q; i++) r = gf_xtime(r);
    return r;
  endfunction

endpackage
