// erasure_locator_calc: the erasure-locator calculation module.
//
// Four locator registers U1..U4 and an erasure counter.  While a word is
// received, every register is multiplied by a each symbol and an erasure flag
// loads a^f (a^0 = 1 for the full-length code, f = 15 - N) into the next free
// register, so at the end of the word a register holds a^j for an erasure in
// position j.  Unused registers stay 0.  While the word is decoded, each cyclic
// shift multiplies them by a again; a register that reaches 1 marks the symbol
// now leaving the buffer as an erasure (ERA).  When `store` is high the error
// locator UERR found by the correction module is written into the next free
// register and counted as one more erasure, as the text's step (ii) does.
//
// Outputs: ERR = at most two erasures (one error can still be corrected),
// `over` = more than four erasures (the counter saturates at 5), the count
// itself, and the two locator buses of the text: LO13 carries U1 while CU1 and
// U3 while CU3, LO24 carries U2 while CU2 and U4 while CU4 (0 otherwise).
// The register structure and the counter are this design's; the text gives the
// function.
//
// Controls (one clock edge each): load (first symbol of a word, clears the old
// state), absorb (next symbol), cshift (cyclic shift), store (with cshift or alone).
module erasure_locator_calc
  import gf_pkg::*;
#(
  parameter int unsigned N = 15
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,
  input  logic       absorb,
  input  logic       flag,
  input  logic       cshift,
  input  logic       store,
  input  gf_t        uerr,
  input  logic [3:0] cu,           // CU1..CU4 in bits 0..3
  output gf_t        u [4],
  output gf_t        lo13,
  output gf_t        lo24,
  output logic [2:0] cnt,
  output logic       err,
  output logic       era,
  output logic       over
);

  localparam int unsigned F = Q - N;
  localparam gf_t ONE_F = gf_alpha_pow(F);   // locator of a fresh erasure

  gf_t        u_q [4];
  logic [2:0] cnt_q;
  gf_t        u_d [4];
  logic [2:0] cnt_d;

  always_comb begin
    for (int i = 0; i < 4; i++) u_d[i] = u_q[i];
    cnt_d = cnt_q;
    if (load) begin
      for (int i = 0; i < 4; i++) u_d[i] = '0;
      u_d[0] = flag ? ONE_F : gf_t'(0);
      cnt_d  = {2'b00, flag};
    end else if (absorb) begin
      for (int i = 0; i < 4; i++) u_d[i] = gf_xtime(u_q[i]);
      if (flag) begin
        if (cnt_q < 3'd4) u_d[cnt_q[1:0]] = ONE_F;
        if (cnt_q < 3'd5) cnt_d = cnt_q + 3'd1;
      end
    end else begin
      if (cshift)
        for (int i = 0; i < 4; i++) u_d[i] = gf_xtime(u_q[i]);
      if (store && uerr != '0 && cnt_q < 3'd4) begin
        u_d[cnt_q[1:0]] = cshift ? gf_xtime(uerr) : uerr;
        cnt_d = cnt_q + 3'd1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) u_q[i] <= '0;
      cnt_q <= '0;
    end else begin
      u_q   <= u_d;
      cnt_q <= cnt_d;
    end
  end

  always_comb begin
    era = 1'b0;
    for (int i = 0; i < 4; i++) if (u_q[i] == gf_t'(1)) era = 1'b1;
  end

  // a module either receives a word or shifts one, never both at once
  a_rx_or_shift: assert property (@(posedge clk) !((load || absorb) && (cshift || store)))
    else $error("erasure_locator_calc: receive and decode controls at once");

  assign u    = u_q;
  assign cnt  = cnt_q;
  assign err  = (cnt_q <= 3'd2);
  assign over = (cnt_q == 3'd5);
  assign lo13 = cu[0] ? u_q[0] : (cu[2] ? u_q[2] : gf_t'(0));
  assign lo24 = cu[1] ? u_q[1] : (cu[3] ? u_q[3] : gf_t'(0));

endmodule
