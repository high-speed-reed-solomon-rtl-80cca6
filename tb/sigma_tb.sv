// sigma_tb: CLEAR, then 0..3 factors (X + U) with random U (0 included); the
// coefficients must equal the product worked out with the reference model.
// Cycles with `step` low in between must not change anything.
module sigma_tb;
  import rs_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear = 0, step = 0;
  logic [3:0] u = 0;
  logic [3:0] d [4];

  sigma dut (.clk, .rst_n, .clear, .step, .u, .d);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sym_t p [4];     // p[j] = coefficient of X^j
    int   nf;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 500; rep++) begin
      clear = 1;
      @(negedge clk);
      clear = 0;
      p = '{1, 0, 0, 0};
      nf = $urandom_range(0, 3);
      for (int f = 0; f < nf; f++) begin
        u = sym_t'($urandom);
        step = 1;
        @(negedge clk);
        step = 0;
        for (int j = 3; j >= 1; j--) p[j] = p[j-1] ^ r_mul(p[j], u);
        p[0] = r_mul(p[0], u);
        if ($urandom_range(0, 1) == 1) begin u = sym_t'($urandom); @(negedge clk); end
      end
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (d[j] !== p[3-j]) begin
          failures++;
          if (failures < 20) $display("FAIL rep %0d D%0d = %h expected %h", rep, j, d[j], p[3-j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
