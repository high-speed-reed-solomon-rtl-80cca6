// ee_correction: the errors-and-erasures correction module.
//
// Sigma clock, sigma circuit, modified syndrome calculation (MSC) and locator,
// wired as in the text's diagram: the LO13 and LO24 buses are merged into the
// sigma circuit's locator input (an OR here, since at most one of them carries
// a locator in any sub-cycle, which an assertion checks), the sigma coefficients D0..D3 feed MSC and the
// locator, and MSC's T0/T1 feed the locator.
//
// Per word, in the GATE4 sub-cycle of its first decoded symbol, the locator
// output is the error locator UERR; it is offered to the erasure-locator module
// (`uerr`, with `store` when it may be kept), latched in `uerr_q`, and the
// word's failure flag is latched:
//   - more than four erasures, or
//   - no erasure and syndromes that are not those of a single error
//     (S2^2 != S1 S3 or S3^2 != S2 S4, or some but not all S_i zero),
//     which is how this design detects "two errors and no erasure".
// The text says what must be detected but not how; the syndrome test is this
// design's.  On all other sub-cycles the locator output is the erasure value;
// `lv` passes it on only when ERA is high and the word has not failed, so a
// failed word leaves the decoder unchanged.
module ee_correction
  import gf_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       sig13,
  input  logic       sig24,
  input  logic       gate3,
  input  logic       gate4,
  input  gf_t        lo13,
  input  gf_t        lo24,
  input  gf_t        s [4],
  input  logic [2:0] cnt,      // erasures of the word under decoding
  input  logic       err,
  input  logic       era,
  input  logic       over,
  output gf_t        uerr,     // valid while gate4
  output logic       store,    // keep uerr as an erasure locator
  output gf_t        uerr_q,
  output logic       fail_q,
  output gf_t        lv
);

  gf_t  u_bus, t0, t1, q;
  gf_t  d [4];
  logic step;

  assign u_bus = lo13 | lo24;

  sigma_clock u_sclk (.sig13, .sig24, .gate3, .err, .u(u_bus), .step);
  sigma       u_sig  (.clk, .rst_n, .clear, .step, .u(u_bus), .d);
  msc         u_msc  (.d, .s, .t0, .t1);
  locator     u_loc  (.gate4, .t0, .t1, .d, .q);

  // single-error consistency of the syndromes (used only with no erasure)
  gf_t  s2s2, s1s3, s3s3, s2s4;
  logic all_zero, all_nonzero, single_ok, fail_now;

  gf_mul u_c0 (.a(s[1]), .b(s[1]), .p(s2s2));
  gf_mul u_c1 (.a(s[0]), .b(s[2]), .p(s1s3));
  gf_mul u_c2 (.a(s[2]), .b(s[2]), .p(s3s3));
  gf_mul u_c3 (.a(s[1]), .b(s[3]), .p(s2s4));

  assign all_zero    = (s[0] == '0) && (s[1] == '0) && (s[2] == '0) && (s[3] == '0);
  assign all_nonzero = (s[0] != '0) && (s[1] != '0) && (s[2] != '0) && (s[3] != '0);
  assign single_ok   = all_zero || (all_nonzero && s2s2 == s1s3 && s3s3 == s2s4);
  assign fail_now    = over || (cnt == 3'd0 && !single_ok);

  assign uerr  = q;
  assign store = gate4 && err && !fail_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      uerr_q <= '0;
      fail_q <= 1'b0;
    end else if (gate4) begin
      uerr_q <= err ? q : gf_t'(0);
      fail_q <= fail_now;
    end
  end

  assign lv = (!gate4 && era && !fail_q) ? q : gf_t'(0);

  // the two locator buses are never driven in the same sub-cycle
  a_one_bus: assert property (@(posedge clk) !(lo13 != '0 && lo24 != '0))
    else $error("ee_correction: LO13 and LO24 both carry a locator");

endmodule
