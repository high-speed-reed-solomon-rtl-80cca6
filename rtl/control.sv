// control: the decoder's sequencer.
//
// The decoder runs on one clock, the internal clock (CKX8 in the text), at SUB
// clock cycles per received symbol; the symbol clock CK is the wrap of the
// sub-cycle counter `ph`.  A symbol counter `k` counts the N symbols of a word,
// and GATE1 toggles every N symbols, swapping the two syndrome-and-erasure-
// locator modules.  The text gives the signals and their purpose and requires
// SUB >= 8; the sub-cycle schedule below is this design's, in the order the
// text gives (GATE1 change, then GATE3, then GATE4 with the first shift):
//
//   ph 0, 1  GATE3 pass on the first symbol of a word (k = 0): CU1, CU2 put
//            U1, U2 on the buses, SIGNAL13/24 clock the sigma circuit
//   ph 2     cyclic shift of the decoding module, BO latch, CLEAR;
//            on k = 0 also GATE4 (error locator computed and stored)
//   ph 3..6  erasure-value pass: CU1..CU4 with SIGNAL13/24
//   ph 7..   (SUB-1 is the last) LV settles
//   ph SUB-1 `tick`: IN/FLAG sampled, buffer shifts, SAMPLE of OUT, CLEAR,
//            k advances; at the word boundary GATE1 toggles.  RS1 (RS2) is the
//            tick of the first symbol of a word taken by module 1 (2).
//
// All outputs are decoded combinationally from the counters; every action
// happens on the clock edge that ends the cycle in which the output is high.
module control #(
  parameter int unsigned N   = 15,
  parameter int unsigned SUB = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic       tick,     // CK: input sampled, OUT sampled
  output logic       gate1,
  output logic       gate3,
  output logic       gate4,
  output logic       rs1,
  output logic       rs2,
  output logic [3:0] cu,       // CU1..CU4 in bits 0..3
  output logic       sig13,
  output logic       sig24,
  output logic       clear,
  output logic       cshift,
  output logic       first,    // k = 0: first symbol period of a word
  output logic       last      // k = N-1: last symbol period of a word
);

  localparam int unsigned PW = $clog2(SUB);
  localparam int unsigned KW = $clog2(N);

  logic [PW-1:0] ph;
  logic [KW-1:0] k;

  initial assert (SUB >= 8) else $error("control: SUB must be at least 8");

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph    <= '0;
      k     <= '0;
      gate1 <= 1'b0;
    end else if (tick) begin
      ph <= '0;
      if (k == KW'(N - 1)) begin
        k     <= '0;
        gate1 <= ~gate1;
      end else begin
        k <= k + 1'b1;
      end
    end else begin
      ph <= ph + 1'b1;
    end
  end

  assign first  = (k == '0);
  assign last   = (k == KW'(N - 1));
  assign tick   = (ph == PW'(SUB - 1));
  assign cu[0]  = (first && ph == PW'(0)) || ph == PW'(3);
  assign cu[1]  = (first && ph == PW'(1)) || ph == PW'(4);
  assign cu[2]  = (ph == PW'(5));
  assign cu[3]  = (ph == PW'(6));
  assign sig13  = cu[0] | cu[2];
  assign sig24  = cu[1] | cu[3];
  assign gate3  = first && (ph == PW'(0) || ph == PW'(1));
  assign gate4  = first && ph == PW'(2);
  assign cshift = (ph == PW'(2));
  assign clear  = cshift | tick;
  assign rs1    = tick && first && !gate1;
  assign rs2    = tick && first &&  gate1;

endmodule
