// tb_smu: checks the trace-back survivor unit against a software
// trace-back. Random decision words and random start (best) states are fed
// on irregular step strobes; the testbench keeps every decision word and
// for each step follows state {a,b} -> {b, d[state]} back TB_DEPTH steps,
// expecting the MSB of the state reached. Also checks that out_valid stays
// low for the first TB_DEPTH steps, the one-cycle output latency, and that
// clear restarts the fill count.
module tb_smu;
  localparam int D = 64;
  logic clk = 1'b0, rst_n, clear, step, out_valid, out_bit;
  logic [3:0] dec;
  logic [1:0] best;

  smu dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_out = 0;
  logic [3:0] hist [$];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int n);
    for (int i = 0; i < n; i++) begin
      bit do_step;
      int st, exp_bit, nsteps;
      do_step = ($urandom_range(4) != 0);
      step = do_step;
      dec = 4'($urandom_range(15));
      best = 2'($urandom_range(3));
      exp_bit = 0;
      if (do_step) begin
        hist.push_back(dec);
        nsteps = hist.size();
        st = best;
        for (int k = 0; k < D; k++) begin
          int d;
          d = hist[nsteps - 1 - k][st];
          st = ((st & 1) << 1) | d;
        end
        exp_bit = st >> 1;
      end
      @(negedge clk);
      if (do_step) begin
        check(out_valid == (hist.size() > D), $sformatf("out_valid at step %0d", hist.size()));
        if (out_valid) begin
          check(out_bit == exp_bit[0], $sformatf("bit at step %0d", hist.size()));
          n_out++;
        end
      end else
        check(!out_valid, "out_valid without step");
    end
  endtask

  initial begin
    rst_n = 0; clear = 0; step = 0; dec = '0; best = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(600);
    step = 0; clear = 1; @(negedge clk); clear = 0;
    hist.delete();
    run(400);
    check(n_out > 400, "enough decoded bits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
