// locator_tb: random T0, T1 and coefficients in both GATE4 settings; the output
// must be T1/T0 (GATE4 high) or T0/(D0+D1+D2+D3) (GATE4 low), 0 for a zero
// divisor.
module locator_tb;
  import rs_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic gate4;
  logic [3:0] t0, t1, q;
  logic [3:0] d [4];

  locator dut (.gate4, .t0, .t1, .d, .q);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym_t e;
    for (int rep = 0; rep < 2000; rep++) begin
      gate4 = 1'($urandom);
      t0 = sym_t'($urandom); t1 = sym_t'($urandom);
      for (int i = 0; i < 4; i++) d[i] = sym_t'($urandom);
      @(posedge clk);
      e = gate4 ? r_div(t1, t0) : r_div(t0, d[0] ^ d[1] ^ d[2] ^ d[3]);
      checks++;
      if (q !== e) begin
        failures++;
        if (failures < 20) $display("FAIL rep %0d gate4=%b q=%h expected %h", rep, gate4, q, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
