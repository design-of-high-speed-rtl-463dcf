// tb_activity_compare: ACS work of the T-algorithm decoder against the
// full-trellis decoder on the same stream.
//
// Two trellis_codec instances at default parameters receive the same random
// message and the same channel errors (one bit error every 10..20 symbols).
// One runs with T = 2, the other with T at its maximum (no pruning). Both
// decoded streams must equal the message. The ACS work is measured as the
// number of path-metric register writes (surviving states per step, the
// registers that toggle); the pruned decoder must need fewer, and the
// saving is printed. This is an activity proxy for power, not a power
// figure.
module tb_activity_compare;
  import vd_pkg::*;

  localparam int N = 4000;

  logic clk = 1'b0, rst_n, msg_valid, msg_bit;
  logic [1:0] chan_err;
  logic cwv_t, cwv_f, dv_t, db_t, dv_f, db_f;
  cw_t cw_t_, cw_f_;
  state_t es_t, es_f;
  logic [2:0] act_t, pr_t, act_f, pr_f;

  trellis_codec u_t (.clk, .rst_n, .clear(1'b0), .msg_valid, .msg_bit, .chan_err,
                     .thresh(7'd2), .cw_valid(cwv_t), .cw(cw_t_), .enc_state(es_t),
                     .dec_valid(dv_t), .dec_bit(db_t), .active_states(act_t), .pruned_states(pr_t));
  trellis_codec u_f (.clk, .rst_n, .clear(1'b0), .msg_valid, .msg_bit, .chan_err,
                     .thresh('1), .cw_valid(cwv_f), .cw(cw_f_), .enc_state(es_f),
                     .dec_valid(dv_f), .dec_bit(db_f), .active_states(act_f), .pruned_states(pr_f));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint writes_t = 0, writes_f = 0;
  bit q_t [$], q_f [$];
  int err_gap = 15, n_err = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (u_t.u_dec.step) writes_t += u_t.u_dec.n_active;
    if (u_f.u_dec.step) writes_f += u_f.u_dec.n_active;
    if (dv_t) check(q_t.size() > 0 && db_t == q_t.pop_front(), "pruned decoder bit");
    if (dv_f) check(q_f.size() > 0 && db_f == q_f.pop_front(), "full decoder bit");
  end

  initial begin
    repeat (3 * N) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; msg_valid = 0; msg_bit = 0; chan_err = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N + 70; i++) begin
      bit b;
      b = (i < N) ? 1'($urandom_range(1)) : 1'b0;
      msg_valid = 1; msg_bit = b;
      q_t.push_back(b); q_f.push_back(b);
      chan_err = 2'b00;
      if (cwv_t) begin
        if (err_gap == 0) begin
          chan_err = ($urandom_range(1) != 0) ? 2'b10 : 2'b01;
          err_gap = $urandom_range(20, 10);
          n_err++;
        end else err_gap--;
      end
      @(negedge clk);
    end
    msg_valid = 0;
    repeat (4) @(negedge clk);
    check(q_t.size() == 65 && q_f.size() == 65, "all message bits decoded");
    check(writes_t < writes_f, "pruning saves metric writes");
    $display("channel errors=%0d metric writes: T=2 %0d, full %0d, saved %0d%%",
             n_err, writes_t, writes_f, 100 - 100 * writes_t / writes_f);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
