// erasure_locator_calc_tb: random erasure patterns of 0..6 erasures in a
// 15-symbol word.  After the word: locators a^j in arrival order, the count
// (saturating at 5), ERR and the more-than-four flag.  Then an error locator is
// stored with the first cyclic shift and the word is shifted through: ERA must
// rise exactly for the erased positions and the stored one, in the right
// order.  The LO13 / LO24 buses are checked under each CU select.
module erasure_locator_calc_tb;
  import rs_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load = 0, absorb = 0, flag = 0, cshift = 0, store = 0;
  logic [3:0] uerr = 0, cu = 0;
  logic [3:0] u [4];
  logic [3:0] lo13, lo24;
  logic [2:0] cnt;
  logic err, era, over;

  erasure_locator_calc dut (.clk, .rst_n, .load, .absorb, .flag, .cshift, .store, .uerr, .cu,
                            .u, .lo13, .lo24, .cnt, .err, .era, .over);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit   fl [15];
    int   pos [$];
    int   nera, epos;
    bit   expect_era [15];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 200; rep++) begin
      nera = $urandom_range(0, 6);
      foreach (fl[j]) fl[j] = 0;
      for (int e = 0; e < nera; e++) begin
        int p;
        do p = $urandom_range(0, 14); while (fl[p]);
        fl[p] = 1;
      end
      pos.delete();
      for (int j = 14; j >= 0; j--) begin
        flag = fl[j]; load = (j == 14); absorb = (j != 14);
        if (fl[j]) pos.push_back(j);
        @(negedge clk);
      end
      load = 0; absorb = 0; flag = 0;
      for (int q = 0; q < 4; q++)
        check(u[q] == (q < pos.size() ? r_exp(pos[q]) : 4'd0), $sformatf("rep %0d U%0d", rep, q + 1));
      check(cnt == 3'(nera > 5 ? 5 : nera), $sformatf("rep %0d count", rep));
      check(err == (nera <= 2), "ERR");
      check(over == (nera > 4), "over");
      // buses
      for (int q = 0; q < 4; q++) begin
        cu = 4'(1 << q);
        #1;
        check((q % 2 == 0 ? lo13 : lo24) == u[q], $sformatf("bus for CU%0d", q + 1));
        check((q % 2 == 0 ? lo24 : lo13) == 4'd0, $sformatf("idle bus for CU%0d", q + 1));
      end
      cu = 0;
      // store an error locator at a free position with the first shift
      foreach (expect_era[j]) expect_era[j] = 0;
      for (int e = 0; e < pos.size() && e < 4; e++) expect_era[pos[e]] = 1;
      epos = -1;
      if (nera <= 2) begin
        do epos = $urandom_range(0, 14); while (fl[epos]);
        expect_era[epos] = 1;
      end
      for (int k = 0; k < 15; k++) begin
        cshift = 1;
        store = (k == 0) && (epos >= 0);
        uerr = (epos >= 0) ? r_exp(epos) : 4'd0;
        @(negedge clk);
        cshift = 0; store = 0;
        check(era == expect_era[14 - k], $sformatf("rep %0d ERA at symbol %0d", rep, 14 - k));
      end
      if (epos >= 0) check(cnt == 3'(nera + 1), "count after store");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
