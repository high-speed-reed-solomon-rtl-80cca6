// syndrome_calc_tb: feeds random words (highest order first) into a full-length
// (N = 15) and a shortened (N = 7) syndrome unit, checks S_i = r(a^i)
// (a^(8i) r(a^i) for N = 7, the syndromes of X^8 r(X)), then shifts cyclically and checks the syndromes
// of the cyclically shifted word, computed from the shifted coefficients.
module syndrome_calc_tb;
  import rs_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load = 0, absorb = 0, cshift = 0;
  logic [3:0] din = 0;
  logic [3:0] s15 [4], s7 [4];

  syndrome_calc #(.N(15)) dut15 (.clk, .rst_n, .load, .absorb, .cshift, .din, .s(s15));
  syndrome_calc #(.N(7))  dut7  (.clk, .rst_n, .load, .absorb, .cshift, .din, .s(s7));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym_t w [];
    sym_t ws [];
    w = new[15];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 20; rep++) begin
      foreach (w[j]) w[j] = sym_t'($urandom);
      for (int j = 14; j >= 0; j--) begin
        din = w[j]; load = (j == 14); absorb = (j != 14);
        @(negedge clk);
      end
      load = 0; absorb = 0;
      for (int i = 1; i <= 4; i++)
        check(s15[i-1] == r_eval(w, i), $sformatf("rep %0d S%0d", rep, i));
      // shortened unit: syndromes of X^8 r(X), i.e. a^(8i) r(a^i)
      for (int i = 1; i <= 4; i++)
        check(s7[i-1] == r_mul(r_exp(8 * i), r_eval(w, i)), $sformatf("rep %0d short S%0d", rep, i));
      // cyclic shifts of the full-length word
      ws = new[15];
      for (int sh = 1; sh <= 15; sh++) begin
        cshift = 1;
        @(negedge clk);
        cshift = 0;
        foreach (ws[j]) ws[j] = w[(j - sh + 15) % 15];
        for (int i = 1; i <= 4; i++)
          check(s15[i-1] == r_eval(ws, i), $sformatf("rep %0d shift %0d S%0d", rep, sh, i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
