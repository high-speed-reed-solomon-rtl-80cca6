// gf_inv: combinational GF(2^4) inverse, y = a^-1 = a^14.
//
// Since a^(2^m) = a in GF(2^m), the inverse is a^(2^m - 2).  Squaring is linear,
// so a^2, a^4 and a^8 are XOR networks; two gf_mul instances then form
// a^2 * a^4 * a^8 = a^14.  The inverse of 0 comes out as 0, which the decoder
// uses as "no result" when a divisor is zero.  No clock, no latency.
module gf_inv
  import gf_pkg::*;
(
  input  gf_t a,
  output gf_t y
);

  gf_t a2, a4, a8, a6;

  assign a2 = gf_sq(a);
  assign a4 = gf_sq(a2);
  assign a8 = gf_sq(a4);

  gf_mul u_m0 (.a(a2), .b(a4), .p(a6));
  gf_mul u_m1 (.a(a6), .b(a8), .p(y));

endmodule
