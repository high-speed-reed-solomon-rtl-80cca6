// syndrome_calc: four one-stage LFSRs producing the syndromes S1..S4.
//
// While a word is received (highest-order symbol first) each register runs the
// Horner step S_i <- S_i * a^i + r, so after N symbols S_i = r(a^i), the
// remainder of r(X) divided by X + a^i.  While the word is decoded the input is
// blocked and each step S_i <- S_i * a^i gives the syndromes of the cyclically
// shifted word X^j r(X).  For a shortened code of length N < 15 the input is
// multiplied by the constant a^(i*f), f = 15 - N, before it enters the LFSR, so
// the syndromes are those of X^f r(X) and no extra f shifts are needed; both
// steps follow the text.
//
// Controls (one clock edge each, priority load > absorb > cshift):
//   load    start a new word: S_i <- r * a^(i*f)   (the RS1/RS2 reset + first symbol)
//   absorb  S_i <- S_i * a^i + r * a^(i*f)
//   cshift  S_i <- S_i * a^i
module syndrome_calc
  import gf_pkg::*;
#(
  parameter int unsigned N = 15
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic absorb,
  input  logic cshift,
  input  gf_t  din,
  output gf_t  s [4]          // s[0] = S1 ... s[3] = S4
);

  localparam int unsigned F = Q - N;   // shortening

  gf_t s_q [4];
  gf_t fb  [4];   // S_i * a^i
  gf_t pre [4];   // r * a^(i*f)

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      fb[i]  = gf_mul(s_q[i], gf_alpha_pow(i + 1));
      pre[i] = gf_mul(din, gf_alpha_pow((i + 1) * F));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) s_q[i] <= '0;
    end else begin
      for (int i = 0; i < 4; i++) begin
        if (load)        s_q[i] <= pre[i];
        else if (absorb) s_q[i] <= fb[i] ^ pre[i];
        else if (cshift) s_q[i] <= fb[i];
      end
    end
  end

  assign s = s_q;

endmodule
