// rs_decoder_short_tb: end-to-end test of the shortened (7, 3) decoder (N = 7).
//
// The same decoder with N = 7: syndromes are premultiplied by a^(i*8) and
// fresh erasures start at a^8, so the decoding runs in 7 shifts.  Streams
// words back to back (no idle symbol periods): random codewords with every
// mix of errors and erasures the decoder handles (0-4 erasures, 1 error with
// 0-2 erasures) and the two it must refuse (more than four erasures; two
// errors without erasure).  Every output symbol is compared with the codeword
// (or, for a refused word, with the received symbol) exactly N symbol periods
// after the symbol went in, which checks the latency and the one-word-per-N-
// periods rate.  Counts each mechanism: GATE1 swaps both ways, error located
// and stored as erasure, erasure value added, both refusal kinds.
module rs_decoder_short_tb;
  import rs_ref_pkg::*;

  localparam int N      = 7;
  localparam int SUB    = 8;
  localparam int NWORDS = 400;

  logic clk = 0, rst_n = 0;
  logic [3:0] in_sym = 0;
  logic in_flag = 0;
  logic sym_tick, out_valid, out_fail, era_now;
  logic [3:0] out_sym, uerr;

  rs_decoder #(.N(N), .SUB(SUB)) dut (.clk, .rst_n, .in_sym, .in_flag, .sym_tick, .out_sym, .out_valid,
                  .out_fail, .uerr, .era_now);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // (errors, erasures) of the random words
  localparam int KINDS [11][2] = '{'{0,0}, '{0,1}, '{0,2}, '{0,3}, '{0,4}, '{1,0}, '{1,1},
                                   '{1,2}, '{0,5}, '{0,6}, '{2,0}};
  sym_t d_sym [$];
  bit   d_flag [$];
  sym_t e_sym [$];
  bit   e_fail [$];

  int n_swap_up = 0, n_swap_dn = 0, n_located = 0, n_lv = 0, n_over = 0, n_two = 0, n_gate4 = 0;
  logic gate1_d = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // mechanism monitors
  always @(posedge clk) begin
    gate1_d <= dut.gate1;
    if (dut.gate1 && !gate1_d) n_swap_up++;
    if (!dut.gate1 && gate1_d) n_swap_dn++;
    if (dut.gate4) begin
      if (dut.store_c && dut.uerr_c != 0) n_located++;
      if (dut.over_dec) n_over++;
      else if (dut.u_cor.fail_now) n_two++;
      n_gate4++;
    end
    if (dut.sym_tick && dut.lv != 0) n_lv++;
  end

  initial begin : watchdog
    repeat ((NWORDS + 4) * N * SUB + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    word_t w;
    int    t;
    int    c;
    for (int i = 0; i < NWORDS; i++) begin
      w = new(N);
      begin
        c = $urandom_range(0, 10);
        w.make(KINDS[c][0], KINDS[c][1]);
      end
      for (int j = N - 1; j >= 0; j--) begin        // highest order first
        d_sym.push_back(w.rx[j]);
        d_flag.push_back(w.fl[j]);
        e_sym.push_back(w.fail ? w.rx[j] : w.cw[j]);
        e_fail.push_back(w.fail);
      end
    end

    repeat (3) @(negedge clk);
    rst_n = 1;
    t = 0;
    while (t < d_sym.size() + N + 1) begin
      @(negedge clk);
      if (sym_tick) begin
        // outputs of the previous tick edge: symbol t-1-N
        if (t >= 1) begin
          if (t - 1 - N >= 0) begin
            check(out_valid == 1'b1, $sformatf("out_valid at tick %0d", t - 1));
            check(out_sym == e_sym[t-1-N],
                  $sformatf("symbol %0d: got %h expected %h", t - 1 - N, out_sym, e_sym[t-1-N]));
            check(out_fail == e_fail[t-1-N], $sformatf("out_fail of symbol %0d", t - 1 - N));
          end else begin
            check(out_valid == 1'b0, "out_valid before the first word");
          end
        end
        in_sym  = (t < d_sym.size()) ? d_sym[t] : 4'd0;
        in_flag = (t < d_sym.size()) ? d_flag[t] : 1'b0;
        t++;
      end
    end

    $display("swaps up=%0d down=%0d located=%0d erasure-values=%0d over4=%0d two-errors=%0d",
             n_swap_up, n_swap_dn, n_located, n_lv, n_over, n_two);
    check(n_swap_up > 0, "GATE1 never rose");
    check(n_swap_dn > 0, "GATE1 never fell");
    check(n_located > 0, "no error located");
    check(n_lv > 0, "no erasure value added");
    check(n_over > 0, "more-than-four-erasures refusal never happened");
    check(n_two > 0, "two-error refusal never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
