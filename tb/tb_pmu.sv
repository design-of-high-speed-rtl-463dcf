// tb_pmu: random check of the four-state path metric unit.
// A reference model in the testbench works with unwrapped integers (a
// random base plus small offsets, wrapped only when driven): for each
// state {a,b} it forms the candidates from predecessors {b,0} and {b,1}
// with the (7,5) code words written out as XOR equations, picks the
// smaller (ties to the upper branch), prunes states more than T above the
// given optimal metric, and finds the best survivor (lowest index on a tie).
module tb_pmu;
  logic [7:0] pm [4], pm_new [4], pm_opt, best_pm;
  logic [3:0] ok, ok_new, dec, pruned;
  logic [4:0] bm [4];
  logic [6:0] thresh;
  logic prune_en;
  logic [1:0] best;
  logic [2:0] n_active;

  pmu dut (.*);

  int checks = 0, failures = 0, n_pruned = 0, n_wrap = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  function automatic int cw(int p, int u);
    return ((u ^ (p >> 1) ^ p) & 1) * 2 + ((u ^ p) & 1);
  endfunction

  initial begin
    #1000000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int base, off [4], bmv [4], cand [4], e_dec [4], e_ok [4], e_pr [4];
      int min_c, opt, t, e_best, e_act;
      base = $urandom_range(255);
      do ok = 4'($urandom_range(15)); while (ok == 0);
      for (int s = 0; s < 4; s++) begin
        off[s] = $urandom_range(12);
        pm[s] = 8'(base + off[s]);
        bmv[s] = $urandom_range(4);
        bm[s] = 5'(bmv[s]);
      end
      min_c = 1 << 20;
      for (int s = 0; s < 4; s++) begin
        int a, b, up, lo, cu, cl;
        a = s >> 1; b = s & 1; up = 2 * b; lo = 2 * b + 1;
        cu = off[up] + bmv[cw(up, a)];
        cl = off[lo] + bmv[cw(lo, a)];
        e_ok[s] = ok[up] || ok[lo];
        if (ok[up] && ok[lo]) e_dec[s] = (cl < cu); else e_dec[s] = !ok[up];
        cand[s] = e_dec[s] ? cl : cu;
        if (e_ok[s] && cand[s] < min_c) min_c = cand[s];
      end
      opt = min_c - $urandom_range(1);
      t = $urandom_range(6);
      pm_opt = 8'(base + opt);
      thresh = 7'(t);
      prune_en = ($urandom_range(3) != 0);
      #1;
      e_best = -1; e_act = 0;
      for (int s = 0; s < 4; s++) begin
        e_pr[s] = e_ok[s] && prune_en && (cand[s] - opt > t);
        if (e_pr[s]) e_ok[s] = 0;
        check(ok_new[s] == e_ok[s], $sformatf("case %0d ok_new[%0d]", i, s));
        check(pruned[s] == e_pr[s], $sformatf("case %0d pruned[%0d]", i, s));
        if (e_ok[s]) begin
          e_act++;
          check(dec[s] == e_dec[s], $sformatf("case %0d dec[%0d]", i, s));
          check(pm_new[s] == 8'(base + cand[s]), $sformatf("case %0d pm_new[%0d]", i, s));
          if (e_best < 0 || cand[s] < cand[e_best]) e_best = s;
          if (base + cand[s] > 255) n_wrap++;
        end
        if (e_pr[s]) n_pruned++;
      end
      check(n_active == 3'(e_act), "n_active");
      if (e_best >= 0) begin
        check(best == 2'(e_best), $sformatf("case %0d best %0d exp %0d", i, best, e_best));
        check(best_pm == 8'(base + cand[e_best]), "best_pm");
      end
    end
    check(n_pruned > 0 && n_wrap > 0, "pruning and wrap-around exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
