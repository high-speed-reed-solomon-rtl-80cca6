# Line-speed Reed–Solomon errors-and-erasures decoder, GF(2^4)

This is a decoder for the (15, 11) Reed–Solomon code over GF(16). Each symbol is
4 bits and arrives with an erasure flag. Per word the decoder corrects either one
unknown error together with up to two flagged erasures, or up to four erasures. It
takes one symbol per symbol period and delivers one corrected symbol per symbol
period. Words follow each other with no gap, and every symbol leaves exactly N
symbol periods after it entered.

The same RTL with `N = 7` is the shortened (7, 3) decoder.

## The idea: correct only the symbol whose locator is 1

Most errors-and-erasures decoders compute every error value at once, with
Forney's formula. Each value there needs its own evaluation of a polynomial at
the erasure's locator U_p. This decoder avoids that by rotating the word instead.

Every word has:

* four syndromes S_i = r(a^i), i = 1..4;
* one locator per erasure, U = a^j for an erasure in position j.

Shifting the word cyclically by one position multiplies S_i by a^i and each
locator by a. The decoder shifts the word out one symbol at a time, highest order
first, and shifts the syndromes and locators with it. The symbol now leaving the
buffer is always the one whose locator has just become a^15 = 1. The erasure
value formula simplifies for U_p = 1. The denominator Σ σ_dpq U_p^(v−q) becomes
the plain sum of the coefficients:

    LV = T0 / (D0 + D1 + D2 + D3),    T0 = D0 S4 + D1 S3 + D2 S2 + D3 S1

D(X) = D0 X^3 + D1 X^2 + D2 X + D3 is the erasure-locator polynomial with the
locator equal to 1 left out. The same divider handles every symbol, so no
per-erasure evaluation is needed.

The single error is handled first, once per word. The decoder builds the
polynomial of the (at most two) erasures, D(X) = (X + U1)(X + U2), and forms
T1 = D1 S4 + D2 S3 + D3 S2. The error locator is then UERR = T1 / T0. It is
written into a free locator register and from then on treated as one more
erasure. A zero T0 means there is no error.

Three properties keep this cheap:

* **Empty locator slots need no special case.** An unused slot holds 0, so it
  contributes a factor X. That only shifts the syndrome indices, and the
  identity behind LV still holds (Σ_q D_q S_(4−q+k) = V_p·D(1) for every shift k
  that stays within S1..S4).
* **The polynomial is built serially.** CLEAR sets D(X) = 1. Each trigger
  multiplies it by (X + U) for the locator on the bus: D3 ← D3·U,
  D2 ← D2·U + D3, D1 ← D1·U + D2, D0 ← D1. Four triggers per symbol, one per
  slot, are enough. The slot holding 1 is skipped. This takes three multipliers.
* **The two halves run in parallel.** Two syndrome-and-locator modules
  alternate. One collects the word being received while the other, full with
  the previous word, is shifted for decoding. GATE1 swaps them every N symbols.

## Block structure

```
 in_sym ──► symbol_buffer (N regs + BO latch) ─────────── BO ──► (+) ──► SAMPLE reg ──► out_sym
   │                                                               ▲
   ├──► syn_era_module #0 ─┐  GATE1 selects: one receives,         │ LV
   │    (syndrome_calc +   ├─ the other feeds ──► ee_correction ───┘
   └──► syn_era_module #1 ─┘  the correction      (sigma_clock, sigma, msc, locator)
 in_flag ─► (to the receiving module)      UERR ◄── back into the decoding module
                              control: phase/word counters, GATE1/3/4, CU1..4, CLEAR, RS1/2
```

| file | role |
|---|---|
| `rtl/gf_pkg.sv` | GF(16) type and functions (a root of x^4 + x + 1) |
| `rtl/gf_mul.sv`, `rtl/gf_inv.sv` | combinational multiplier (AND/XOR array) and inverse a^14 |
| `rtl/symbol_buffer.sv` | N symbol registers plus the BO latch (16 registers for N = 15) |
| `rtl/syndrome_calc.sv` | four one-stage LFSRs: Horner accumulation, then cyclic shift |
| `rtl/erasure_locator_calc.sv` | four locator registers, erasure counter, ERR/ERA, LO13/LO24 buses |
| `rtl/syn_era_module.sv` | the two above under one reset strobe; instantiated twice |
| `rtl/sigma_clock.sv` | decides which bus sub-cycles trigger the sigma LFSRs |
| `rtl/sigma.sv` | serial erasure-locator polynomial (D0..D3) |
| `rtl/msc.sv` | modified syndromes T0, T1 (seven multipliers) |
| `rtl/locator.sv` | one shared divider: UERR = T1/T0 under GATE4, else LV |
| `rtl/ee_correction.sv` | the correction module; also latches UERR and the failure flag |
| `rtl/control.sv` | the sequencer |
| `rtl/rs_decoder.sv` | top level |

## Timing: one clock, eight sub-cycles per symbol

The design has one clock, `clk`, running at SUB = 8 times the symbol rate. It
plays the part of an 8× internal clock; the symbol clock is the wrap of the
sub-cycle counter. Each action below happens on the clock edge that ends the
listed sub-cycle:

| sub-cycle | action |
|---|---|
| 0, 1 | first symbol of a word only (GATE3): U1, U2 go into the sigma circuit (error pass) |
| 2 | GATE4 (first symbol only): UERR = T1/T0 is stored as a locator and the failure flag is latched. Every symbol: cyclic shift of the decoding module, BO latched, CLEAR |
| 3–6 | CU1..CU4: slots U1..U4 go into the sigma circuit; the slot equal to 1 is skipped |
| 7 | `sym_tick`: `in_sym`/`in_flag` sampled, buffer shifts, `out_sym ← BO + LV`, CLEAR; GATE1 toggles after N symbols |

`sym_tick` is an output. The source must present the next symbol while it is
high. `out_sym`, `out_valid` and `out_fail` change on the same edge. The latency
is exactly N symbol periods (N·SUB clocks) for every symbol. The rate is one word
per N symbol periods. `SUB` may be raised above 8 (the extra sub-cycles are
idle), but not lowered.

Reset (`rst_n`, asynchronous, active low) clears every register. `out_valid`
rises once the first whole word has been received.

## When the decoder gives up

A word is passed through unchanged, with `out_fail` high on its symbols, when:

* **it has more than four erasures** (the counter saturates at 5); or
* **it has no erasure and its syndromes are not those of a single error.** The
  test is S2² ≠ S1·S3 or S3² ≠ S2·S4, or some but not all syndromes are zero.
  This is how two errors are detected.

Patterns beyond the code's power that pass these tests are not detected. Examples
are three or four erasures plus an error, or two errors plus erasures. Such a
word can come out wrong without `out_fail`.

## Departures and choices

* **Primitive polynomial.** x^4 + x + 1 is chosen because it gives the known
  example's error locator a^11 = 0xE. The field is otherwise unspecified.
* **Clocking.** Strobes (enables) in one clock domain replace the original
  scheme's separate symbol clock, 8× clock and derived trigger clocks (SIGNAL,
  CTL, SAMPLE). The sub-cycle schedule above is this design's own; only its order
  (GATE1 change, GATE3, GATE4 with the first shift) is fixed.
* **No separate coefficient latch.** The sigma LFSRs simply hold still after the
  last trigger and are read directly.
* **Where UERR goes.** The error locator goes into the next free locator register,
  which may be slot 1, 2 or 3 depending on the erasure count.
* **The two-error test** above is this design's own.
* **Erasure flags and the output.** Flags are not delayed through the buffer, and
  the output carries no flag.
* **Multiplier.** The multiplier is a plain polynomial-basis AND/XOR array. A
  normal-basis (Massey–Omura) multiplier would also do and is not provided.
* **(15, 9) code.** A distance-7 version would need six syndromes, six slots and
  a two-error locator. It is not provided.

## Shortened codes

For N < 15 (the (N, N−4) shortened code), the syndromes of X^f·r(X), f = 15 − N,
are computed directly. The input is multiplied by the constant a^(i·f) before it
enters LFSR i, and a fresh erasure starts at a^f instead of 1. After k+1 shifts
the symbol r(N−1−k) again has locator a^15 = 1, so the decoding is unchanged and
takes N shifts. The buffer is N + 1 registers (8 for the (7, 3) code).

## Size

After generic synthesis, the N = 15 decoder is about 560 word-level cells and
170 flip-flops. Its GF multipliers are:

* 3 in sigma;
* 7 in the modified syndrome calculation;
* 1 plus an inverter in the divider;
* 4 in the two-error test;
* plus constant multipliers in the syndrome LFSRs.

## Verification

Every module has a self-checking testbench in `tb/`. The testbenches compare
against `tb/rs_ref_pkg.sv`, a separate model: log/antilog GF arithmetic, a
systematic encoder with g(X) = (X+a)(X+a²)(X+a³)(X+a⁴), and an error/erasure
pattern generator.

* `rs_decoder_tb` runs 400 back-to-back words at the default size (N = 15). The
  first is the known example, 6X⁴ + 7X⁷ + 5X¹¹ with X⁷ and X⁴ erased: it must
  decode to the all-zero word with UERR = 0xE, and its three corrections must
  land in symbol periods 18, 22 and 25. With an 800-unit symbol period those
  corrected symbols appear at times 15200, 18400 and 20800. The rest are random words:
  * 0–4 erasures;
  * 1 error with 0–2 erasures;
  * 5–6 erasures;
  * 2 errors without erasures.

  Every output symbol is compared exactly N periods after its input. The
  testbench also counts each mechanism: GATE1 swaps both ways, errors located,
  erasure values added, and both refusal kinds.
* `rs_decoder_short_tb` does the same for the (7, 3) decoder (`N = 7`).
* The block testbenches check the arithmetic exhaustively or with random
  operands:
  * the LFSRs against r(a^i), before and after cyclic shifts;
  * the locator registers, ERA order and buses;
  * the sigma polynomial against a reference product;
  * the correction module on constructed syndromes;
  * the sequencer cycle by cycle.

To run one with plain Verilator (packages named first, the rest found through `-y`):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/gf_pkg.sv tb/rs_ref_pkg.sv tb/rs_decoder_tb.sv --top-module rs_decoder_tb
./obj_dir/Vrs_decoder_tb
```

Each testbench ends with a `TB_RESULT checks=… failures=…` line.
