// sigma: serial erasure-locator polynomial calculation (the "sigma circuit").
//
// Four one-stage LFSRs hold D(X) = D0 X^3 + D1 X^2 + D2 X + D3.  CLEAR sets
// D(X) = 1; each trigger (`step`, the SIGNAL of the sigma clock) multiplies D(X)
// by (X + U), U being the locator on the input bus:
//   D3 <- D3*U,  D2 <- D2*U + D3,  D1 <- D1*U + D2,  D0 <- D1.
// This is the text's serial procedure (multiply by X, add U times the old
// polynomial) with its three multipliers and four adders; D0 needs no
// multiplier because the decoder never takes more than three factors, so D0 is
// 0 before the last of them.  The coefficients are read directly from the LFSRs
// once the triggers of a pass are over.  One clock edge per factor.
module sigma
  import gf_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic step,
  input  gf_t  u,
  output gf_t  d [4]        // d[0] = D0 (highest order) ... d[3] = D3
);

  gf_t d_q [4];
  gf_t p1, p2, p3;

  gf_mul u_m1 (.a(d_q[1]), .b(u), .p(p1));
  gf_mul u_m2 (.a(d_q[2]), .b(u), .p(p2));
  gf_mul u_m3 (.a(d_q[3]), .b(u), .p(p3));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_q <= '{gf_t'(0), gf_t'(0), gf_t'(0), gf_t'(1)};
    end else if (clear) begin
      d_q <= '{gf_t'(0), gf_t'(0), gf_t'(0), gf_t'(1)};
    end else if (step) begin
      d_q[0] <= d_q[1];
      d_q[1] <= p1 ^ d_q[2];
      d_q[2] <= p2 ^ d_q[3];
      d_q[3] <= p3;
    end
  end

  assign d = d_q;

endmodule
