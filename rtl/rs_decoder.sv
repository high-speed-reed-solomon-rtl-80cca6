// rs_decoder: (15, 11) Reed-Solomon decoder for errors and erasures, GF(2^4).
//
// The decoder takes one 4-bit symbol and its erasure flag per symbol period
// (highest-order symbol first, words back to back) and corrects, per word, one
// error together with up to two erasures, or up to four erasures.  It decodes
// a word by shifting it out one symbol at a time while the word's syndromes
// and erasure locators are shifted cyclically; a symbol is corrected when one
// of its locators has become 1, with the erasure value
//   LV = T0 / (D0 + D1 + D2 + D3)
// computed from the erasure-locator polynomial with that locator removed.  The
// single error is first located (UERR = T1 / T0) and then treated as one more
// erasure.  Two syndrome-and-erasure-locator modules alternate under GATE1, so
// one word is received while the previous one is decoded: one word per N symbol
// periods, at any length, with no idle time.
//
// Blocks: symbol_buffer (BO), two syn_era_module, ee_correction, control; OUT =
// BO + LV sampled at the end of each symbol period.  N < 15 gives the shortened
// (N, N-4) decoder; N = 7 is the (7, 3) decoder.
//
// Interface: one clock `clk` (the internal clock), asynchronous active-low reset.
// in_sym/in_flag are sampled on the clock edge that ends a cycle with sym_tick
// high (every SUB cycles).  out_sym, out_valid and out_fail change on that same
// edge; a symbol appears on out_sym exactly N symbol periods (N*SUB clocks)
// after it was sampled.  out_fail marks the symbols of a word that could not be
// decoded (passed unchanged).  uerr is the error locator found for the word
// now being decoded (0 if none); era_now is high while the symbol being decoded
// is an erasure or the located error.
//
// The control's `first` output and the modules' locator-register outputs are
// left open here: they serve the block-level tests, not the decoder.
module rs_decoder
  import gf_pkg::*;
#(
  parameter int unsigned N   = 15,
  parameter int unsigned SUB = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  gf_t  in_sym,
  input  logic in_flag,
  output logic sym_tick,
  output gf_t  out_sym,
  output logic out_valid,
  output logic out_fail,
  output gf_t  uerr,
  output logic era_now
);

  // ---------------- control
  logic       gate1, gate3, gate4, rs1, rs2, sig13, sig24, clear, cshift, last;
  logic [3:0] cu;

  control #(.N(N), .SUB(SUB)) u_ctl (
    .clk, .rst_n, .tick(sym_tick), .gate1, .gate3, .gate4, .rs1, .rs2, .cu,
    .sig13, .sig24, .clear, .cshift, .first(), .last
  );

  // ---------------- buffer
  gf_t bo;

  symbol_buffer #(.N(N)) u_buf (
    .clk, .rst_n, .shift(sym_tick), .latch(cshift), .din(in_sym), .bo
  );

  // ---------------- two syndrome-and-erasure-locator modules
  // Module 0 receives while GATE1 is low, module 1 while GATE1 is high; the
  // other one is the decoding module.
  gf_t        s_m   [2][4];
  gf_t        lo13_m [2], lo24_m [2];
  logic [2:0] cnt_m [2];
  logic       err_m [2], era_m [2], over_m [2];
  gf_t        uerr_c;
  logic       store_c;

  for (genvar m = 0; m < 2; m++) begin : g_se
    logic rx;
    assign rx = (gate1 == 1'(m));
    syn_era_module #(.N(N)) u_se (
      .clk, .rst_n,
      .rs     (m == 0 ? rs1 : rs2),
      .absorb (sym_tick && rx),
      .cshift (cshift && !rx),
      .din    (in_sym),
      .flag   (in_flag),
      .store  (store_c && !rx),
      .uerr   (uerr_c),
      .cu     (rx ? 4'b0000 : cu),
      .s      (s_m[m]),
      .u      (),
      .lo13   (lo13_m[m]),
      .lo24   (lo24_m[m]),
      .cnt    (cnt_m[m]),
      .err    (err_m[m]),
      .era    (era_m[m]),
      .over   (over_m[m])
    );
  end

  // decoding module selected by GATE1
  gf_t        s_dec [4];
  logic [2:0] cnt_dec;
  logic       err_dec, era_dec, over_dec;

  always_comb begin
    s_dec    = gate1 ? s_m[0]    : s_m[1];
    cnt_dec  = gate1 ? cnt_m[0]  : cnt_m[1];
    err_dec  = gate1 ? err_m[0]  : err_m[1];
    era_dec  = gate1 ? era_m[0]  : era_m[1];
    over_dec = gate1 ? over_m[0] : over_m[1];
  end

  // ---------------- correction
  gf_t  lv, uerr_q;
  logic fail_q;

  ee_correction u_cor (
    .clk, .rst_n, .clear, .sig13, .sig24, .gate3, .gate4,
    .lo13(lo13_m[0] | lo13_m[1]), .lo24(lo24_m[0] | lo24_m[1]),
    .s(s_dec), .cnt(cnt_dec), .err(err_dec), .era(era_dec), .over(over_dec),
    .uerr(uerr_c), .store(store_c), .uerr_q, .fail_q, .lv
  );

  // ---------------- output adder and SAMPLE register
  logic have_word;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_sym   <= '0;
      out_valid <= 1'b0;
      out_fail  <= 1'b0;
      have_word <= 1'b0;
    end else if (sym_tick) begin
      out_sym   <= bo ^ lv;
      out_valid <= have_word;
      out_fail  <= fail_q;
      if (last) have_word <= 1'b1;
    end
  end

  assign uerr    = uerr_q;
  assign era_now = era_dec;

endmodule
