// gf_mul: combinational GF(2^4) multiplier, p = a * b.
//
// A cellular array: row i forms b[i] AND (a * x^i reduced by x^4 + x + 1), and the
// rows are added with XOR gates.  The text uses a cellular-array multiplier for
// every product in the decoder; the array's exact cell layout is this design's.
// No clock, no latency.
module gf_mul
  import gf_pkg::*;
(
  input  gf_t a,
  input  gf_t b,
  output gf_t p
);

  gf_t row [M];   // a * x^i, reduced

  always_comb begin
    row[0] = a;
    for (int i = 1; i < M; i++) row[i] = gf_xtime(row[i-1]);
  end

  always_comb begin
    p = '0;
    for (int i = 0; i < M; i++) p ^= row[i] & {M{b[i]}};
  end

endmodule
