// locator: error-locator and erasure-value calculation.
//
// One divider (an inverter and a multiplier) shared by two uses, chosen by GATE4:
//   GATE4 high  q = UERR = T1 / T0                  (error locator)
//   GATE4 low   q = LV   = T0 / (D0 + D1 + D2 + D3)  (erasure value of the
//                                                    symbol whose locator is 1)
// A zero divisor gives 0: T0 = 0 during GATE4 means no error was found.
// Combinational.
module locator
  import gf_pkg::*;
(
  input  logic gate4,
  input  gf_t  t0,
  input  gf_t  t1,
  input  gf_t  d [4],
  output gf_t  q
);

  gf_t num, den, den_inv;

  assign num = gate4 ? t1 : t0;
  assign den = gate4 ? t0 : (d[0] ^ d[1] ^ d[2] ^ d[3]);

  gf_inv u_inv (.a(den), .y(den_inv));
  gf_mul u_mul (.a(num), .b(den_inv), .p(q));

endmodule
