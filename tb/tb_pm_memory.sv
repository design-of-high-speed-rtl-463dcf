// tb_pm_memory: checks reset contents (only S0 alive, metric 0), that a
// step writes only the metrics of surviving states while all flags are
// updated, that no write happens without step, and synchronous clear.
module tb_pm_memory;
  logic clk = 1'b0, rst_n, clear, step;
  logic [7:0] pm_in [4], pm_out [4];
  logic [3:0] ok_in, ok_out;

  pm_memory dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [7:0] model [4];
  logic [3:0] model_ok;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic compare(input string when);
    check(ok_out == model_ok, {when, ": flags"});
    for (int s = 0; s < 4; s++) check(pm_out[s] == model[s], $sformatf("%s: pm[%0d]", when, s));
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; clear = 0; step = 0; ok_in = '0;
    for (int s = 0; s < 4; s++) pm_in[s] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) model[s] = '0;
    model_ok = 4'b0001;
    compare("reset");
    for (int i = 0; i < 1000; i++) begin
      bit do_clear;
      do_clear = ($urandom_range(50) == 0);
      step = ($urandom_range(3) != 0);
      clear = do_clear;
      ok_in = 4'($urandom_range(15));
      for (int s = 0; s < 4; s++) pm_in[s] = 8'($urandom_range(255));
      @(negedge clk);
      if (do_clear) begin
        for (int s = 0; s < 4; s++) model[s] = '0;
        model_ok = 4'b0001;
      end else if (step) begin
        for (int s = 0; s < 4; s++) if (ok_in[s]) model[s] = pm_in[s];
        model_ok = ok_in;
      end
      compare($sformatf("cycle %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
