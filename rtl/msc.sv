// msc: modified syndrome calculation.
//
//   T1 = D1 S4 + D2 S3 + D3 S2
//   T0 = D0 S4 + D1 S3 + D2 S2 + D3 S1
// from the sigma coefficients D0..D3 (D0 highest order) and the syndromes
// S1..S4, with seven multipliers and XOR adders, as in the text.
// Combinational.
module msc
  import gf_pkg::*;
(
  input  gf_t d [4],
  input  gf_t s [4],        // s[0] = S1 ... s[3] = S4
  output gf_t t0,
  output gf_t t1
);

  gf_t a1, a2, a3;          // T1 terms
  gf_t b0, b1, b2, b3;      // T0 terms

  gf_mul u_a1 (.a(d[1]), .b(s[3]), .p(a1));
  gf_mul u_a2 (.a(d[2]), .b(s[2]), .p(a2));
  gf_mul u_a3 (.a(d[3]), .b(s[1]), .p(a3));
  gf_mul u_b0 (.a(d[0]), .b(s[3]), .p(b0));
  gf_mul u_b1 (.a(d[1]), .b(s[2]), .p(b1));
  gf_mul u_b2 (.a(d[2]), .b(s[1]), .p(b2));
  gf_mul u_b3 (.a(d[3]), .b(s[0]), .p(b3));

  assign t1 = a1 ^ a2 ^ a3;
  assign t0 = b0 ^ b1 ^ b2 ^ b3;

endmodule
