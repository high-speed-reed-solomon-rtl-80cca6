// syn_era_module_tb: one word with erasures into the combined module; the
// syndromes and the locators must both match the reference, and a second word
// started with `rs` must discard the first.
module syn_era_module_tb;
  import rs_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rs = 0, absorb = 0, cshift = 0, flag = 0, store = 0;
  logic [3:0] din = 0, uerr = 0, cu = 0;
  logic [3:0] s [4], u [4];
  logic [3:0] lo13, lo24;
  logic [2:0] cnt;
  logic err, era, over;

  syn_era_module dut (.clk, .rst_n, .rs, .absorb, .cshift, .din, .flag, .store, .uerr, .cu,
                      .s, .u, .lo13, .lo24, .cnt, .err, .era, .over);

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
    bit   fl [15];
    int   pos [$];
    w = new[15];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 50; rep++) begin
      pos.delete();
      for (int j = 14; j >= 0; j--) begin
        w[j] = sym_t'($urandom);
        fl[j] = ($urandom_range(0, 5) == 0);
        if (fl[j]) pos.push_back(j);
        din = w[j]; flag = fl[j]; rs = (j == 14); absorb = (j != 14);
        @(negedge clk);
      end
      rs = 0; absorb = 0; flag = 0;
      for (int i = 1; i <= 4; i++) check(s[i-1] == r_eval(w, i), $sformatf("rep %0d S%0d", rep, i));
      for (int q = 0; q < 4; q++)
        check(u[q] == (q < pos.size() ? r_exp(pos[q]) : 4'd0), $sformatf("rep %0d U%0d", rep, q + 1));
      check(cnt == 3'(pos.size() > 5 ? 5 : pos.size()), "count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
