// tb_int_trigger_gen: with the full-size dividers, the fast rate must give a
// trigger every 401 cycles (100 kHz at 40.08 MHz) and the slow rate one every
// 400800 cycles (100 Hz); when disabled no trigger may come. Pulses are one
// cycle wide.
`timescale 1ns/1ps
module tb_int_trigger_gen;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic en = 0, fast = 0, trig;
  int checks = 0, failures = 0;

  int_trigger_gen dut (.clk, .rst_n, .en, .fast, .trig);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // count pulses and intervals over `ncyc` cycles
  task automatic measure(input int ncyc, input int expect_period, input int expect_n);
    int last = -1, n = 0, bad = 0, prev = 0;
    for (int c = 0; c < ncyc; c++) begin
      @(negedge clk);
      if (trig && prev) bad++;
      if (trig) begin
        if (last >= 0 && c - last != expect_period) bad++;
        last = c; n++;
      end
      prev = trig;
    end
    check(bad == 0 && n == expect_n,
          $sformatf("period %0d: %0d pulses (expected %0d), %0d bad", expect_period, n, expect_n, bad));
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    measure(5000, 0, 0);                  // disabled
    en = 1; fast = 1;
    measure(401 * 10 + 5, 401, 10);       // 100 kHz
    fast = 0;
    measure(400800 * 2 + 5, 400800, 2);   // 100 Hz
    fast = 1;
    measure(401 * 3 + 5, 401, 3);
    en = 0;
    measure(2000, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #30ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
