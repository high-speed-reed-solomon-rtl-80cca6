// symbol_buffer: the buffer module, a delay line for the received word.
//
// N symbol registers hold the word as it arrives (highest-order symbol first),
// and one more register, BO, latches the oldest symbol when it is shifted out
// for decoding: N + 1 = 16 one-symbol registers for the (15, 11) code, 8 for the
// shortened (7, 3) code, as in the text.  Each symbol register is M = 4 bit
// registers in parallel.
//
// Timing: on a clock edge with `shift` high, `din` enters and every symbol moves
// one place; with `latch` high, BO takes the oldest symbol.  The decoder raises
// `latch` in the same sub-cycle as the cyclic shift of the syndromes, so BO holds
// symbol r(N-1-k) of the word under decoding from that point of symbol period k.
// Only the symbol bits are buffered; the erasure flags go to the locator module.
module symbol_buffer
  import gf_pkg::*;
#(
  parameter int unsigned N = 15
) (
  input  logic clk,
  input  logic rst_n,
  input  logic shift,
  input  logic latch,
  input  gf_t  din,
  output gf_t  bo
);

  gf_t word_q [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N; i++) word_q[i] <= '0;
      bo <= '0;
    end else begin
      if (shift) begin
        word_q[0] <= din;
        for (int i = 1; i < N; i++) word_q[i] <= word_q[i-1];
      end
      if (latch) bo <= word_q[N-1];
    end
  end

endmodule
