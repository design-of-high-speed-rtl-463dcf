// tb_acs: random check of the add-compare-select element with wrapping
// 8-bit metrics. Each case draws a random base and two offsets; the true
// (unwrapped) candidates are offset + branch metric, and the expected
// result is base + the smaller one, modulo 256, with ties going to the
// upper branch. Cases with one or both predecessors invalid are included.
module tb_acs;
  logic [7:0] pm_up, pm_lo, pm_new;
  logic [4:0] bm_up, bm_lo;
  logic ok_up, ok_lo, dec, ok_new;

  acs dut (.*);

  int checks = 0, failures = 0;
  int n_wrap = 0, n_tie = 0, n_lo = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      int base, a, b, ca, cb, exp_pm;
      bit exp_dec, exp_ok;
      base = $urandom_range(255);
      a = $urandom_range(60); b = $urandom_range(60);
      bm_up = 5'($urandom_range(31)); bm_lo = 5'($urandom_range(31));
      if (i % 3 == 0) begin b = a; bm_lo = bm_up; end   // forced tie
      ok_up = ($urandom_range(7) != 0); ok_lo = ($urandom_range(7) != 0);
      pm_up = 8'(base + a); pm_lo = 8'(base + b);
      #1;
      ca = a + bm_up; cb = b + bm_lo;
      exp_ok = ok_up || ok_lo;
      if (ok_up && ok_lo) exp_dec = (cb < ca);
      else exp_dec = !ok_up;
      exp_pm = base + (exp_dec ? cb : ca);
      check(ok_new == exp_ok, "ok_new");
      if (exp_ok) begin
        check(dec == exp_dec, $sformatf("dec a=%0d b=%0d ca=%0d cb=%0d", a, b, ca, cb));
        check(pm_new == 8'(exp_pm), $sformatf("pm_new %0d exp %0d", pm_new, 8'(exp_pm)));
        if (base + ca > 255 || base + cb > 255) n_wrap++;
        if (ok_up && ok_lo && ca == cb) n_tie++;
        if (exp_dec) n_lo++;
      end
    end
    check(n_wrap > 0 && n_tie > 0 && n_lo > 0, "wrap, tie and lower-branch cases all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
