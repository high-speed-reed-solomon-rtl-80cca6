// gf_mul_tb: all 256 operand pairs of the multiplier against the
// log/antilog reference model.
module gf_mul_tb;
  import rs_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [3:0] a, b, p;

  gf_mul dut (.a, .b, .p);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        @(posedge clk);
        checks++;
        if (p !== r_mul(a, b)) begin
          failures++;
          $display("FAIL %h*%h = %h, expected %h", a, b, p, r_mul(a, b));
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
