// gf_inv_tb: all 16 inputs of the inverter; a * a^-1 must be 1 and the
// inverse of 0 must be 0.
module gf_inv_tb;
  import rs_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [3:0] a, y;

  gf_inv dut (.a, .y);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      a = 4'(i);
      @(posedge clk);
      checks++;
      if (i == 0 ? (y !== 4'd0) : (r_mul(a, y) !== 4'd1)) begin
        failures++;
        $display("FAIL inv(%h) = %h", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
