// tb_viterbi_decoder: compares the decoder bit for bit with a software
// Viterbi decoder (class vd_ref below) on noisy channels, where decoding
// errors do occur, so the comparison covers the survivor choices and not
// only the error-free path.
//
// Two decoder instances run side by side on the same message:
//   hard: Q=1 samples, channel bit error rate 1/8;
//   soft: Q=2 samples (code bit -> 0 or 3, plus random disturbance).
// Each runs first with a small threshold (T = 2 hard, T = 18 soft, the
// largest branch metric of each, the T-algorithm pruning mode) and then,
// after a clear, with T at its maximum (full trellis). The reference
// prunes against the exact minimum of each step, so equal outputs also
// confirm the precomputed optimum. Stall cycles are mixed into the first run. In the second, at one symbol
// per cycle, the latency of the first decoded bit is checked (TB_DEPTH+2).
module tb_viterbi_decoder;
  localparam int D = 64;

  class vd_ref;
    int q_bits, t;               // t < 0: no pruning
    int pm [4];
    bit ok [4];
    bit dec_hist [$][4];
    int nstep;
    bit out [$];

    function new(int q_bits);
      this.q_bits = q_bits;
      reset(-1);
    endfunction

    function void reset(int t);
      this.t = t;
      for (int s = 0; s < 4; s++) begin pm[s] = 0; ok[s] = (s == 0); end
      dec_hist.delete();
      nstep = 0;
    endfunction

    static function int cw(int p, int u);
      return ((u ^ (p >> 1) ^ p) & 1) * 2 + ((u ^ p) & 1);
    endfunction

    // x1, x0: received samples
    function void step(int x1, int x0);
      int bm [4], np [4], mn, best, ymax;
      bit nok [4], d [4];
      ymax = (1 << q_bits) - 1;
      for (int c = 0; c < 4; c++) begin
        int y1, y0;
        y1 = (c >> 1) ? ymax : 0; y0 = (c & 1) ? ymax : 0;
        bm[c] = (x1 - y1) * (x1 - y1) + (x0 - y0) * (x0 - y0);
      end
      nstep++;
      mn = 1 << 30;
      for (int s = 0; s < 4; s++) begin
        int a, b, up, lo, cu, cl;
        a = s >> 1; b = s & 1; up = 2 * b; lo = up + 1;
        cu = pm[up] + bm[cw(up, a)]; cl = pm[lo] + bm[cw(lo, a)];
        nok[s] = ok[up] || ok[lo];
        if (ok[up] && ok[lo]) d[s] = (cl < cu); else d[s] = !ok[up];
        np[s] = d[s] ? cl : cu;
        if (nok[s] && np[s] < mn) mn = np[s];
      end
      best = -1;
      for (int s = 0; s < 4; s++) begin
        if (nok[s] && t >= 0 && nstep > 1 && np[s] - mn > t) nok[s] = 0;
        if (nok[s] && (best < 0 || np[s] < np[best])) best = s;
        if (nok[s]) pm[s] = np[s];
        ok[s] = nok[s];
      end
      dec_hist.push_back(d);
      if (nstep > D) begin
        int st;
        st = best;
        for (int k = 0; k < D; k++) st = ((st & 1) << 1) | dec_hist[nstep - 1 - k][st];
        out.push_back(st >> 1);
      end
    endfunction
  endclass

  logic clk = 1'b0, rst_n, clear, in_valid;
  logic [1:0] rx_h;
  logic [3:0] rx_s;
  logic [6:0] t_h, t_s;
  logic ov_h, ob_h, ov_s, ob_s;
  logic [2:0] act_h, pr_h, act_s, pr_s;

  viterbi_decoder u_hard (.clk, .rst_n, .clear, .in_valid, .rx(rx_h), .thresh(t_h),
                          .out_valid(ov_h), .out_bit(ob_h),
                          .active_states(act_h), .pruned_states(pr_h));
  viterbi_decoder #(.Q(2)) u_soft (.clk, .rst_n, .clear, .in_valid, .rx(rx_s), .thresh(t_s),
                          .out_valid(ov_s), .out_bit(ob_s),
                          .active_states(act_s), .pruned_states(pr_s));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0, first_in = -1, first_out = -1;
  int n_prune_h = 0, n_prune_s = 0, n_dec_err = 0, n_cmp = 0;
  bit dut_h [$], dut_s [$], msg [$];
  vd_ref ref_h, ref_s;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL @%0d: %s", cycle, what); end
  endtask

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && !clear) begin
      if (ov_h) begin
        dut_h.push_back(ob_h);
        if (first_out < 0) first_out = cycle;
      end
      if (ov_s) dut_s.push_back(ob_s);
      if (pr_h != 0) n_prune_h++;
      if (pr_s != 0) n_prune_s++;
    end
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Compare the collected outputs with the reference and restart.
  task automatic compare_and_clear(input string phase);
    int n;
    n = dut_h.size();
    check(n > 100 && n + 1 == ref_h.out.size(), $sformatf("%s hard: %0d outputs, ref %0d", phase, n, ref_h.out.size()));
    for (int i = 0; i < n && i < ref_h.out.size(); i++) begin
      check(dut_h[i] == ref_h.out[i], $sformatf("%s hard bit %0d", phase, i));
      if (ref_h.out[i] != msg[i]) n_dec_err++;
      n_cmp++;
    end
    n = dut_s.size();
    check(n > 100 && n + 1 == ref_s.out.size(), $sformatf("%s soft: %0d outputs, ref %0d", phase, n, ref_s.out.size()));
    for (int i = 0; i < n && i < ref_s.out.size(); i++)
      check(dut_s[i] == ref_s.out[i], $sformatf("%s soft bit %0d", phase, i));
    dut_h.delete(); dut_s.delete(); ref_h.out.delete(); ref_s.out.delete(); msg.delete();
    clear = 1; @(negedge clk); clear = 0;
  endtask

  task automatic run(input int n, input bit stalls);
    int st;
    st = 0;
    for (int i = 0; i < n; i++) begin
      int u, c, x1, x0, s1, s0;
      u = $urandom_range(1);
      msg.push_back(u);
      c = vd_ref::cw(st, u);
      st = (u << 1) | (st >> 1);
      // hard channel
      x1 = (c >> 1) ^ ($urandom_range(7) == 0);
      x0 = (c & 1) ^ ($urandom_range(7) == 0);
      // soft channel
      s1 = ((c >> 1) ? 3 : 0) + ($urandom_range(3) == 0 ? int'($urandom_range(4)) - 2 : 0);
      s0 = ((c & 1) ? 3 : 0) + ($urandom_range(3) == 0 ? int'($urandom_range(4)) - 2 : 0);
      if (s1 < 0) s1 = 0; if (s1 > 3) s1 = 3;
      if (s0 < 0) s0 = 0; if (s0 > 3) s0 = 3;
      in_valid = 1; rx_h = 2'({x1[0], x0[0]}); rx_s = 4'(s1 * 4 + s0);
      if (first_in < 0) first_in = cycle;
      ref_h.step(x1, x0);
      ref_s.step(s1, s0);
      @(negedge clk);
      in_valid = 0;
      if (stalls && $urandom_range(3) == 0) repeat ($urandom_range(2, 1)) @(negedge clk);
    end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    ref_h = new(1); ref_s = new(2);
    rst_n = 0; clear = 0; in_valid = 0; rx_h = '0; rx_s = '0;
    t_h = 7'd2; t_s = 7'd18;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // T-algorithm mode
    ref_h.reset(2); ref_s.reset(18);
    run(2000, 1);
    compare_and_clear("pruned");
    check(n_prune_h > 0 && n_prune_s > 0, "pruning occurred in both decoders");
    // full-trellis mode
    t_h = '1; t_s = '1;
    ref_h.reset(-1); ref_s.reset(-1);
    n_prune_h = 0; n_prune_s = 0;
    first_in = -1; first_out = -1;
    run(2000, 0);
    check(first_out - first_in == D + 2, $sformatf("first output after %0d cycles", first_out - first_in));
    compare_and_clear("full");
    check(n_prune_h == 0 && n_prune_s == 0, "no pruning at maximum threshold");
    check(n_dec_err > 0, "noisy channel produced decoding errors (reference)");
    $display("compared=%0d reference decoding errors=%0d", n_cmp, n_dec_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
