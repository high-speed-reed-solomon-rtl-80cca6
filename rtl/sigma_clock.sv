// sigma_clock: decides when the sigma circuit takes a factor (X + U).
//
// The control module offers one locator per sub-cycle on the LO13 or LO24 bus
// (SIGNAL13 / SIGNAL24 mark those sub-cycles).  Two passes use it:
//   GATE3 high - the error-locator pass over U1 and U2 only.  It runs only when
//                ERR is high (at most two erasures); otherwise no factor is taken.
//   GATE3 low  - the erasure-value pass over U1..U4.  The locator equal to 1
//                (the symbol now being decoded) is skipped, which forms the
//                polynomial "with U_p deleted".  Empty slots carry 0 and give a
//                factor X, which does not change the erasure value.
// The text names this block and its inputs; the rule above is this design's.
// Combinational.
module sigma_clock
  import gf_pkg::*;
(
  input  logic sig13,
  input  logic sig24,
  input  logic gate3,
  input  logic err,
  input  gf_t  u,
  output logic step
);

  assign step = (sig13 | sig24) && (gate3 ? err : (u != gf_t'(1)));

endmodule
