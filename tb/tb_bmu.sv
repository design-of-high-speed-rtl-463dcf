// tb_bmu: exhaustive check of the branch metric look-up table.
// Hard decision (Q=1): the metric must be the Hamming distance between the
// received bit pair and the code word. Soft decision (Q=2): the squared
// Euclidean distance with code bit 0 -> sample 0 and 1 -> sample 3.
module tb_bmu;
  logic [1:0] rx1;
  logic [4:0] bm1 [4];
  logic [3:0] rx2;
  logic [4:0] bm2 [4];

  bmu                 dut_hard (.rx(rx1), .bm(bm1));
  bmu #(.Q(2))        dut_soft (.rx(rx2), .bm(bm2));

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      rx1 = 2'(r);
      #1;
      for (int c = 0; c < 4; c++) begin
        int exp_h;
        exp_h = (r[1] != c[1]) + (r[0] != c[0]);
        check(bm1[c] == 5'(exp_h), $sformatf("hard rx=%0d cw=%0d got %0d exp %0d", r, c, bm1[c], exp_h));
      end
    end
    for (int r = 0; r < 16; r++) begin
      rx2 = 4'(r);
      #1;
      for (int c = 0; c < 4; c++) begin
        int x1, x0, y1, y0, exp_s;
        x1 = r / 4; x0 = r % 4;
        y1 = c[1] ? 3 : 0; y0 = c[0] ? 3 : 0;
        exp_s = (x1 - y1) * (x1 - y1) + (x0 - y0) * (x0 - y0);
        check(bm2[c] == 5'(exp_s), $sformatf("soft rx=%0d cw=%0d got %0d exp %0d", r, c, bm2[c], exp_s));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
