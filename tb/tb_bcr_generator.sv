// tb_bcr_generator: the internal BCR must come every 3564 cycles, be one
// cycle wide, and the bunch number must count 0..3563 with BCR at 0.
`timescale 1ns/1ps
module tb_bcr_generator;
  localparam int PERIOD = 3564;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic bcr;
  logic [11:0] bcnt;
  int checks = 0, failures = 0;

  bcr_generator dut (.clk, .rst_n, .bcr, .bcnt);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    int last = -1, n = 0, expect_cnt = 1;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int c = 0; c < 4 * PERIOD + 10; c++) begin
      @(negedge clk);
      if (bcnt != 12'(expect_cnt) || bcr !== (expect_cnt == 0))
        check(0, $sformatf("cycle %0d bcnt=%0d exp %0d bcr=%b", c, bcnt, expect_cnt, bcr));
      else checks++;
      if (bcr) begin
        if (last >= 0) check(c - last == PERIOD, $sformatf("BCR interval %0d", c - last));
        last = c; n++;
      end
      expect_cnt = (expect_cnt + 1) % PERIOD;
    end
    check(n == 4, $sformatf("%0d BCRs in 4 periods", n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
