// tb_calib_sequencer: runs calibration sequences with random L1..L4 and
// compares Calib, veto and L1accept cycle by cycle with the timing rules:
// Calib from L4 for L2 x 16 cycles, veto from L3 for 2*L1+1 cycles and
// L1accept at L3+L1, all counted from the cycle after the accepted request.
// Also checks that a request during a running sequence is refused and that
// the sequence length is max(L4 + 16*L2, L3 + 2*L1 + 1) cycles.
`timescale 1ns/1ps
module tb_calib_sequencer;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic       start = 0;
  logic [3:0] l1;  logic [7:0] l2;  logic [5:0] l3, l4;
  logic       start_ack, busy, calib, l1a, veto;
  int checks = 0, failures = 0;

  calib_sequencer dut (.clk, .rst_n, .start, .l1, .l2, .l3, .l4,
                       .start_ack, .busy, .calib, .l1a, .veto);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  task automatic run_seq(input int a1, input int a2, input int a3, input int a4);
    int len, k, n_l1a;
    bit exp_c, exp_v, exp_l;
    l1 = 4'(a1); l2 = 8'(a2); l3 = 6'(a3); l4 = 6'(a4);
    @(negedge clk); start = 1; #1;
    check(start_ack, "idle sequencer accepts request");
    @(negedge clk); start = 0;
    // change the fields: the running sequence must not see it
    l1 = ~l1; l2 = ~l2; l3 = ~l3; l4 = ~l4;
    len = (a4 + 16 * a2 > a3 + 2 * a1 + 1) ? a4 + 16 * a2 : a3 + 2 * a1 + 1;
    n_l1a = 0;
    for (k = 0; k < len + 3; k++) begin
      exp_c = (k >= a4) && (k < a4 + 16 * a2);
      exp_v = (k >= a3) && (k <= a3 + 2 * a1);
      exp_l = (k == a3 + a1);
      n_l1a += int'(l1a);
      if (calib !== exp_c || veto !== exp_v || l1a !== exp_l || busy !== (k < len))
        check(0, $sformatf("L1=%0d L2=%0d L3=%0d L4=%0d k=%0d calib=%b/%b veto=%b/%b l1a=%b/%b busy=%b",
                           a1, a2, a3, a4, k, calib, exp_c, veto, exp_v, l1a, exp_l, busy));
      else checks++;
      if (k == 1 && len > 2) begin
        start = 1; #1;
        check(!start_ack, "request refused while busy");
        start = 0;
      end
      @(negedge clk);
    end
    check(n_l1a == 1, "exactly one L1accept per sequence");
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    run_seq(0, 0, 0, 0);
    run_seq(15, 255, 63, 63);
    run_seq(15, 0, 63, 0);
    run_seq(0, 1, 0, 63);
    run_seq(3, 2, 5, 10);
    for (int i = 0; i < 15; i++)
      run_seq($urandom_range(0, 15), $urandom_range(0, 40), $urandom_range(0, 63), $urandom_range(0, 63));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
