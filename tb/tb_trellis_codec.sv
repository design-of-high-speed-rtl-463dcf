// tb_trellis_codec: end-to-end test of the encoder + Viterbi decoder at the
// default parameters (hard decisions, 8-bit metrics, 5-bit branch metrics,
// trace-back depth 64).
//
// Random message bits are encoded, bit errors are injected into the code
// stream, and every decoded bit is compared with the message bit sent
// TB_DEPTH+1 bits earlier. Phases:
//   1. error-free stream, T = 2, one bit per cycle; checks the latency of
//      the first decoded bit (TB_DEPTH+3 cycles);
//   2. one channel bit error every 10..20 symbols, T = 2, enough errors
//      that the path metrics wrap around the 8-bit range;
//   3. the same with irregular input (stall cycles between bits);
//   4. clear after a zero flush, then T at its maximum (no pruning) with
//      errors: the full-trellis mode.
// Counted mechanisms, each must occur: pruned states, metric wrap-around,
// corrected channel errors, stalls, clear, steps with all four states
// surviving, steps with precomputed optimum equal to the real minimum.
module tb_trellis_codec;
  import vd_pkg::*;

  localparam int unsigned TB_DEPTH = 64;
  localparam int unsigned PM_W     = PM_W_DEF;

  logic clk = 1'b0;
  logic rst_n, clear, msg_valid, msg_bit;
  logic [1:0] chan_err;
  logic [PM_W-2:0] thresh;
  logic cw_valid, dec_valid, dec_bit;
  cw_t cw;
  state_t enc_state;
  logic [2:0] active_states, pruned_states;

  trellis_codec dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cycle = 0;
  bit q[$];                      // message bits not yet decoded
  int unsigned n_decoded = 0;
  int unsigned err_gap = 15;     // symbols until next injected error
  bit inject = 0;
  int unsigned n_err = 0, n_prune = 0, n_wrap = 0, n_stall = 0, n_clear = 0;
  int unsigned n_full = 0, n_exact = 0;
  int unsigned first_in = 0, first_out = 0;
  bit seen_in = 0, seen_out = 0;
  logic [PM_W-1:0] last_opt = '0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  always @(posedge clk) cycle <= cycle + 1;

  // Decoded stream checker.
  always @(posedge clk) if (rst_n && dec_valid) begin
    if (!seen_out) begin seen_out = 1; first_out = cycle; end
    if (q.size() == 0) check(0, "decoded bit with no message bit pending");
    else begin
      bit exp_bit;
      exp_bit = q.pop_front();
      check(dec_bit == exp_bit, $sformatf("decoded bit %0d: got %0b exp %0b",
                                          n_decoded, dec_bit, exp_bit));
    end
    n_decoded++;
  end

  // Mechanism monitors on each decoder step.
  always @(posedge clk) if (rst_n && !clear && dut.u_dec.step) begin
    if (dut.u_dec.pruned != '0) n_prune++;
    if (dut.u_dec.n_active == 3'd4) n_full++;
    if (dut.u_dec.prune_q) begin
      if (thresh >= 2) begin
        check(dut.u_dec.best_pm == dut.u_dec.pm_opt_q, "precomputed optimum differs from minimum");
        if (dut.u_dec.best_pm == dut.u_dec.pm_opt_q) n_exact++;
      end
      if (dut.u_dec.pm_opt_q < last_opt) n_wrap++;
      last_opt = dut.u_dec.pm_opt_q;
    end
    if (thresh == '1) check(dut.u_dec.pruned == '0, "pruning with maximum threshold");
  end

  // Channel: inject one bit error every err_gap symbols when enabled.
  always @(negedge clk) begin
    chan_err <= 2'b00;
    if (cw_valid && inject) begin
      if (err_gap == 0) begin
        chan_err <= ($urandom_range(1) != 0) ? 2'b10 : 2'b01;
        n_err++;
        err_gap = $urandom_range(20, 10);
      end else err_gap--;
    end
  end

  task automatic send(input bit b);
    msg_valid = 1'b1;
    msg_bit   = b;
    q.push_back(b);
    if (!seen_in) begin seen_in = 1; first_in = cycle; end
    @(negedge clk);
    msg_valid = 1'b0;
  endtask

  task automatic send_random(input int unsigned n, input bit stalls);
    for (int unsigned i = 0; i < n; i++) begin
      send($urandom_range(1));
      if (stalls && $urandom_range(3) == 0) begin
        n_stall++;
        repeat ($urandom_range(3, 1)) @(negedge clk);
      end
    end
  endtask

  // Watchdog.
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; clear = 1'b0; msg_valid = 1'b0; msg_bit = 1'b0;
    chan_err = 2'b00; thresh = 7'd2;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. error-free, continuous
    send_random(300, 0);
    check(seen_out && (first_out - first_in == TB_DEPTH + 3),
          $sformatf("first decoded bit after %0d cycles, expected %0d",
                    first_out - first_in, TB_DEPTH + 3));

    // 2. errors, continuous
    thresh = 7'd2;
    inject = 1;
    send_random(3000, 0);
    // 3. errors with stalls
    send_random(1500, 1);

    // 4. flush, clear, full-trellis mode
    inject = 0;
    repeat (TB_DEPTH + 3) send(1'b0);
    repeat (4) @(negedge clk);
    check(q.size() == TB_DEPTH + 1, $sformatf("%0d bits pending before clear", q.size()));
    q.delete();
    clear = 1'b1; @(negedge clk); clear = 1'b0; n_clear++;
    last_opt = '0;
    thresh = '1;
    inject = 1;
    send_random(1500, 0);
    inject = 0;
    repeat (TB_DEPTH + 3) send(1'b0);
    repeat (4) @(negedge clk);
    check(q.size() == TB_DEPTH + 1, "bits pending at end");

    $display("decoded=%0d errors=%0d prune_steps=%0d wraps=%0d stalls=%0d full_steps=%0d exact=%0d",
             n_decoded, n_err, n_prune, n_wrap, n_stall, n_full, n_exact);
    check(n_err > 0,   "no channel error injected");
    check(n_prune > 0, "no state was ever pruned");
    check(n_wrap > 0,  "path metrics never wrapped");
    check(n_stall > 0, "no stall");
    check(n_clear > 0, "no clear");
    check(n_full > 0,  "never four survivors");
    check(n_exact > 0, "precomputed optimum never checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
