// tb_conv_encoder: checks the rate-1/2 encoder against the (7,5) code
// equations written out from the message history: c1 = u ^ u[-1] ^ u[-2],
// c0 = u ^ u[-2]. Also checks the one-cycle output latency, the state
// register, that idle cycles hold the state, and reset to S0.
module tb_conv_encoder;
  logic clk = 1'b0, rst_n, in_valid, in_bit, out_valid;
  logic [1:0] out_cw, state;

  conv_encoder dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit u1 = 0, u2 = 0;           // previous two message bits

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; in_valid = 0; in_bit = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(state == 2'b00 && !out_valid, "reset state");
    for (int i = 0; i < 500; i++) begin
      bit u, idle;
      idle = ($urandom_range(4) == 0);
      u = $urandom_range(1);
      in_valid = !idle; in_bit = u;
      @(negedge clk);
      check(out_valid == !idle, "out_valid follows in_valid after one cycle");
      if (!idle) begin
        check(out_cw == {u ^ u1 ^ u2, u ^ u2},
              $sformatf("cw %b for u=%b hist=%b%b", out_cw, u, u1, u2));
        u2 = u1; u1 = u;
      end
      check(state == {u1, u2}, $sformatf("state %b exp %b%b", state, u1, u2));
    end
    in_valid = 0;
    rst_n = 0; @(negedge clk); rst_n = 1;
    check(state == 2'b00, "state cleared by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
