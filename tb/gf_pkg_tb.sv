// gf_pkg_tb: checks the package functions gf_mul, gf_inv, gf_sq and
// gf_alpha_pow exhaustively against the log/antilog reference model.
module gf_pkg_tb;
  import gf_pkg::*;
  import rs_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < 16; b++)
        check(gf_mul(gf_t'(a), gf_t'(b)) == r_mul(sym_t'(a), sym_t'(b)), $sformatf("gf_mul %0d %0d", a, b));
      check(gf_sq(gf_t'(a)) == r_mul(sym_t'(a), sym_t'(a)), $sformatf("gf_sq %0d", a));
      check(gf_inv(gf_t'(a)) == (a == 0 ? 4'd0 : r_div(4'd1, sym_t'(a))), $sformatf("gf_inv %0d", a));
    end
    for (int e = 0; e < 40; e++) check(gf_alpha_pow(e) == r_exp(e), $sformatf("alpha^%0d", e));
    check(gf_alpha_pow(11) == 4'hE, "alpha^11 = 0xE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
