// msc_tb: random coefficients and syndromes; T0 and T1 against the formulas
// evaluated with the reference model.
module msc_tb;
  import rs_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [3:0] d [4], s [4];
  logic [3:0] t0, t1;

  msc dut (.d, .s, .t0, .t1);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym_t e0, e1;
    for (int rep = 0; rep < 2000; rep++) begin
      for (int i = 0; i < 4; i++) begin d[i] = sym_t'($urandom); s[i] = sym_t'($urandom); end
      @(posedge clk);
      e1 = r_mul(d[1], s[3]) ^ r_mul(d[2], s[2]) ^ r_mul(d[3], s[1]);
      e0 = r_mul(d[0], s[3]) ^ r_mul(d[1], s[2]) ^ r_mul(d[2], s[1]) ^ r_mul(d[3], s[0]);
      checks += 2;
      if (t0 !== e0 || t1 !== e1) begin
        failures++;
        if (failures < 20) $display("FAIL rep %0d t0=%h/%h t1=%h/%h", rep, t0, e0, t1, e1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
