// tb_precompute: checks the two-step optimal-metric precomputation against
// a brute-force search over every two-step path (j -> i -> k) that starts
// from a surviving state j: pm[j] + bm_prev(j,u1) + bm_cur(i,u2), with the
// code words and next states written out from the (7,5) equations.
// Metrics are a random base plus offsets, so wrap-around is exercised.
module tb_precompute;
  logic [7:0] pm [4], pm_opt;
  logic [3:0] ok;
  logic [4:0] bm_prev [4], bm_cur [4];

  precompute dut (.*);

  int checks = 0, failures = 0, n_wrap = 0;

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
      int base, off [4], bp [4], bc [4], best;
      base = $urandom_range(255);
      do ok = 4'($urandom_range(15)); while (ok == 0);
      for (int s = 0; s < 4; s++) begin
        off[s] = $urandom_range(20);
        pm[s] = 8'(base + off[s]);
        bp[s] = $urandom_range(18); bc[s] = $urandom_range(18);
        bm_prev[s] = 5'(bp[s]); bm_cur[s] = 5'(bc[s]);
      end
      best = 1 << 20;
      for (int j = 0; j < 4; j++) if (ok[j])
        for (int u1 = 0; u1 < 2; u1++)
          for (int u2 = 0; u2 < 2; u2++) begin
            int mid, v;
            mid = u1 * 2 + (j >> 1);
            v = off[j] + bp[cw(j, u1)] + bc[cw(mid, u2)];
            if (v < best) best = v;
          end
      #1;
      check(pm_opt == 8'(base + best), $sformatf("case %0d got %0d exp %0d", i, pm_opt, 8'(base + best)));
      if (base + best > 255) n_wrap++;
    end
    check(n_wrap > 0, "wrap-around exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
