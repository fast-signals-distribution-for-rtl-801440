// tb_l1a_delay_line: random pulse trains through the large L1accept delay
// with DLY = 0, 1, 255 and random values; the output must equal the input
// exactly DLY clock cycles earlier, checked on every cycle once the line has
// filled after a DLY change.
`timescale 1ns/1ps
module tb_l1a_delay_line;
  localparam int N = 600;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic [7:0] dly = 0;
  logic d = 0, q;
  int checks = 0, failures = 0;
  bit hist [$];

  l1a_delay_line #(.DW(8)) dut (.clk, .rst_n, .dly, .d, .q);

  task automatic run(input int delay);
    dly = 8'(delay);
    for (int c = 0; c < N; c++) begin
      @(negedge clk);
      // before the new d is applied, q holds the d sampled `delay` clock edges ago
      if (c > 260 && delay > 0) begin
        checks++;
        if (q !== hist[hist.size() - delay]) begin
          failures++;
          if (failures < 10) $display("FAIL: dly=%0d cycle %0d q=%b", delay, c, q);
        end
      end
      d = ($urandom_range(0, 3) == 0);
      hist.push_back(d);
      #1;
      if (delay == 0) begin
        checks++;
        if (q !== d) failures++;
      end
    end
  endtask

  initial begin
    hist.push_back(0);
    repeat (3) @(negedge clk); rst_n = 1;
    run(0); run(1); run(255); run(2); run(128);
    for (int i = 0; i < 5; i++) run($urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
