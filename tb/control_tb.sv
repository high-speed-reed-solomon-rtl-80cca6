// control_tb: runs the sequencer for several words and checks its schedule:
// a tick every SUB clocks, GATE1 toggling every N ticks, one GATE4 and two GATE3
// cycles per word (in the first symbol period), the sub-cycle of each CU select
// and of the cyclic shift, CLEAR before each pass, and RS1/RS2 alternating on
// the first tick of each word.
module control_tb;
  localparam int N = 15, SUB = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic tick, gate1, gate3, gate4, rs1, rs2, sig13, sig24, clear, cshift, first, last;
  logic [3:0] cu;

  control dut (.clk, .rst_n, .tick, .gate1, .gate3, .gate4, .rs1, .rs2, .cu, .sig13, .sig24,
               .clear, .cshift, .first, .last);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (10 * N * SUB + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int   cyc, ph, k, word;
    logic g1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (cyc = 0; cyc < 6 * N * SUB; cyc++) begin
      ph   = cyc % SUB;
      k    = (cyc / SUB) % N;
      word = cyc / (SUB * N);
      g1   = 1'(word % 2);
      check(tick == (ph == SUB - 1), $sformatf("tick at cycle %0d", cyc));
      check(gate1 == g1, $sformatf("GATE1 at cycle %0d", cyc));
      check(gate3 == (k == 0 && ph < 2), "GATE3");
      check(gate4 == (k == 0 && ph == 2), "GATE4");
      check(cshift == (ph == 2), "cyclic shift");
      check(clear == (ph == 2 || ph == SUB - 1), "CLEAR");
      check(cu == ((k == 0 && ph == 0) || ph == 3 ? 4'b0001 :
                   (k == 0 && ph == 1) || ph == 4 ? 4'b0010 :
                   ph == 5 ? 4'b0100 : ph == 6 ? 4'b1000 : 4'b0000), "CU1..CU4");
      check(sig13 == (cu[0] | cu[2]) && sig24 == (cu[1] | cu[3]), "SIGNAL13/24");
      check(rs1 == (ph == SUB - 1 && k == 0 && !g1), "RS1");
      check(rs2 == (ph == SUB - 1 && k == 0 && g1), "RS2");
      check(last == (k == N - 1), "last");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
