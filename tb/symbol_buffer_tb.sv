// symbol_buffer_tb: shifts random symbols in, latching BO after every shift
// once the line is full; BO must be the symbol that went in N shifts earlier.
module symbol_buffer_tb;
  localparam int N = 15;
  logic clk = 0, rst_n = 0, shift = 0, latch = 0;
  logic [3:0] din = 0, bo;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [3:0] hist [$];

  symbol_buffer dut (.clk, .rst_n, .shift, .latch, .din, .bo);

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    latch = 1;
    @(negedge clk);
    latch = 0;
    checks++; if (bo !== 4'd0) begin failures++; $display("FAIL reset value"); end
    for (int i = 0; i < 200; i++) begin
      din = 4'($urandom); shift = 1;
      hist.push_back(din);
      @(negedge clk);
      shift = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);      // idle cycle: nothing moves
      latch = 1;
      @(negedge clk);
      latch = 0;
      if (hist.size() >= N) begin
        checks++;
        if (bo !== hist[hist.size() - N]) begin
          failures++;
          $display("FAIL step %0d: bo=%h expected %h", i, bo, hist[hist.size() - N]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
