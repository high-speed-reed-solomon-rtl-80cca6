// ee_correction_tb: drives the correction module the way the decoder does,
// with syndromes built directly from chosen error/erasure patterns.
//   Error pass: 0..2 erasures U1, U2 and one error at X (or none); after the
//   GATE3 pass over U1, U2, the GATE4 cycle must give UERR = X and `store`.
//   Value pass: 1..4 locators, one of them 1; after CU1..CU4 with that one
//   skipped by the sigma clock, LV must be the value at locator 1 (0 when ERA
//   is low).  Refusals: more than four erasures, or no erasure and two errors,
//   must set the failure flag and hold LV at 0.
module ee_correction_tb;
  import rs_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear = 0, sig13 = 0, sig24 = 0, gate3 = 0, gate4 = 0, err = 0, era = 0, over = 0;
  logic [3:0] lo13 = 0, lo24 = 0;
  logic [3:0] s [4];
  logic [2:0] cnt = 0;
  logic [3:0] uerr, uerr_q, lv;
  logic store, fail_q;

  ee_correction dut (.clk, .rst_n, .clear, .sig13, .sig24, .gate3, .gate4, .lo13, .lo24, .s,
                     .cnt, .err, .era, .over, .uerr, .store, .uerr_q, .fail_q, .lv);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // syndromes of a list of (locator, value) pairs
  task automatic set_syn(sym_t loc [$], sym_t val [$]);
    for (int i = 1; i <= 4; i++) begin
      s[i-1] = 0;
      foreach (loc[e]) s[i-1] ^= r_mul(val[e], r_exp(i * r_log(loc[e])));
    end
  endtask

  // distinct random nonzero locators, none equal to 1 unless allowed
  task automatic pick(int nloc, bit with_one, output sym_t loc [$]);
    int e;
    loc.delete();
    if (with_one) loc.push_back(4'd1);
    while (loc.size() < nloc) begin
      e = $urandom_range(1, 14);
      if (!(r_exp(e) inside {loc})) loc.push_back(r_exp(e));
    end
  endtask

  task automatic step_slot(int q, sym_t uval, bit g3);
    sig13 = (q % 2 == 0); sig24 = (q % 2 == 1); gate3 = g3;
    lo13 = (q % 2 == 0) ? uval : 4'd0;
    lo24 = (q % 2 == 1) ? uval : 4'd0;
    @(negedge clk);
    sig13 = 0; sig24 = 0; gate3 = 0; lo13 = 0; lo24 = 0;
  endtask

  task automatic do_clear();
    clear = 1; @(negedge clk); clear = 0;
  endtask

  initial begin
    sym_t loc [$], val [$], eloc, tmp;
    int   ns, nv, p;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 300; rep++) begin
      // ---- error pass
      ns = $urandom_range(0, 2);
      pick(ns + 1, 0, loc);
      val.delete();
      foreach (loc[e]) val.push_back(sym_t'($urandom_range(1, 15)));
      eloc = loc[ns];
      if ($urandom_range(0, 3) == 0) begin loc.pop_back(); val.pop_back(); eloc = 0; end
      set_syn(loc, val);
      cnt = 3'(ns); err = 1; over = 0; era = 0;
      do_clear();
      step_slot(0, ns > 0 ? loc[0] : 4'd0, 1);
      step_slot(1, ns > 1 ? loc[1] : 4'd0, 1);
      gate4 = 1;
      #1;
      check(uerr == eloc, $sformatf("rep %0d UERR %h expected %h (erasures %0d)", rep, uerr, eloc, ns));
      check(store == 1'b1, "store");
      @(negedge clk);
      gate4 = 0;
      check(fail_q == 1'b0, "no failure");
      check(uerr_q == eloc, "UERR latched");
      // ---- value pass: v locators, the first equal to 1
      nv = $urandom_range(1, 4);
      pick(nv, 1, loc);
      val.delete();
      foreach (loc[e]) val.push_back(sym_t'($urandom_range(0, 15)));
      set_syn(loc, val);
      // shuffle the slot order
      p = $urandom_range(0, nv - 1);
      loc[0] = loc[p]; loc[p] = 4'd1;
      tmp = val[0]; val[0] = val[p]; val[p] = tmp;
      do_clear();
      for (int q = 0; q < 4; q++) step_slot(q, q < nv ? loc[q] : 4'd0, 0);
      era = 1;
      #1;
      check(lv == val[p], $sformatf("rep %0d LV %h expected %h (%0d locators)", rep, lv, val[p], nv));
      era = 0;
      #1;
      check(lv == 4'd0, "LV without ERA");
    end
    // ---- refusal: more than four erasures
    cnt = 3'd5; err = 0; over = 1;
    gate4 = 1; @(negedge clk); gate4 = 0;
    era = 1; #1;
    check(fail_q == 1'b1, "over-four refusal flag");
    check(lv == 4'd0, "over-four: LV held at 0");
    // ---- refusal: two errors, no erasure
    for (int rep = 0; rep < 50; rep++) begin
      pick(2, 0, loc);
      val = '{sym_t'($urandom_range(1, 15)), sym_t'($urandom_range(1, 15))};
      set_syn(loc, val);
      cnt = 0; err = 1; over = 0; era = 0;
      do_clear();
      step_slot(0, 0, 1);
      step_slot(1, 0, 1);
      gate4 = 1;
      #1;
      check(store == 1'b0, "two errors: nothing stored");
      @(negedge clk);
      gate4 = 0;
      era = 1; #1;
      check(fail_q == 1'b1, $sformatf("two-error refusal %0d", rep));
      check(lv == 4'd0, "two errors: LV held at 0");
      era = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
