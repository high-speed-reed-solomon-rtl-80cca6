// syn_era_module: one syndrome-and-erasure-locator calculation module.
//
// A syndrome_calc and an erasure_locator_calc driven by the same controls, as
// drawn side by side in the text.  The decoder has two of them: while one takes
// the word being received (load on its first symbol, absorb on the rest), the
// other holds the previous word's syndromes and locators and shifts them
// cyclically, one step per decoded symbol, for the correction module.
// `rs` is the module's reset strobe (RS1 or RS2): it discards the old word and
// takes the first symbol of the new one in the same clock edge.
module syn_era_module
  import gf_pkg::*;
#(
  parameter int unsigned N = 15
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rs,
  input  logic       absorb,
  input  logic       cshift,
  input  gf_t        din,
  input  logic       flag,
  input  logic       store,
  input  gf_t        uerr,
  input  logic [3:0] cu,
  output gf_t        s [4],
  output gf_t        u [4],
  output gf_t        lo13,
  output gf_t        lo24,
  output logic [2:0] cnt,
  output logic       err,
  output logic       era,
  output logic       over
);

  syndrome_calc #(.N(N)) u_syn (
    .clk, .rst_n, .load(rs), .absorb, .cshift, .din, .s
  );

  erasure_locator_calc #(.N(N)) u_era (
    .clk, .rst_n, .load(rs), .absorb, .flag, .cshift, .store, .uerr, .cu,
    .u, .lo13, .lo24, .cnt, .err, .era, .over
  );

endmodule
