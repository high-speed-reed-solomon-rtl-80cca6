// sigma_clock_tb: every input combination of the sigma clock against the rule:
// trigger on a SIGNAL13/24 sub-cycle; in the GATE3 pass only with ERR, in the
// erasure-value pass only when the offered locator is not 1.
module sigma_clock_tb;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic sig13, sig24, gate3, err, step;
  logic [3:0] u;

  sigma_clock dut (.sig13, .sig24, .gate3, .err, .u, .step);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit expect_step;
    for (int v = 0; v < 256; v++) begin
      {sig13, sig24, gate3, err, u} = 8'(v);
      @(posedge clk);
      expect_step = (sig13 || sig24) && (gate3 ? err : (u != 4'd1));
      checks++;
      if (step !== expect_step) begin failures++; $display("FAIL input %b", 8'(v)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
