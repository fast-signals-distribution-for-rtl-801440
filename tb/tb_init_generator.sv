// tb_init_generator: BCR pulses every 3564 cycles; Init commands issued at
// random phases (the first one before any BCR has been seen). Each command
// must give exactly one window of 18 cycles that opens 11 cycles before a BCR,
// so that the BCR is inside it, and one acknowledge in the opening cycle.
`timescale 1ns/1ps
module tb_init_generator;
  localparam int PERIOD = 3564, WIDTH = 18, LEAD = 11;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic bcr = 0, cmd = 0, cmd_ack, init;
  int checks = 0, failures = 0;
  int cyc = 0;

  init_generator #(.PERIOD(PERIOD), .WIDTH(WIDTH), .LEAD(LEAD)) dut (.clk, .rst_n, .bcr, .cmd, .cmd_ack, .init);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  // BCR generator: first BCR at cycle 500, then every PERIOD cycles
  always @(negedge clk) begin
    cyc++;
    bcr <= (cyc >= 500) && ((cyc - 500) % PERIOD == 0);
  end

  // window monitor
  int win_start = -1, win_len = 0, n_win = 0, n_ack = 0, bcr_in_win = 0;
  always @(posedge clk) if (rst_n) begin
    if (cmd_ack) n_ack++;
    if (init) begin
      if (win_len == 0) begin win_start = cyc; n_win++; end
      win_len++;
      if (bcr) begin
        bcr_in_win++;
        check(win_len == LEAD + 1, $sformatf("BCR at window position %0d", win_len));
      end
    end else if (win_len != 0) begin
      check(win_len == WIDTH, $sformatf("window width %0d", win_len));
      win_len = 0;
    end
  end

  task automatic issue(input int wait_cycles);
    int n0;
    n0 = n_win;
    repeat (wait_cycles) @(negedge clk);
    cmd = 1;
    while (!cmd_ack) @(posedge clk);
    @(negedge clk); cmd = 0;
    repeat (WIDTH + 5) @(negedge clk);
    check(n_win == n0 + 1, "one window per command");
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    // command before any BCR: must wait for a known phase
    repeat (10) @(negedge clk);
    cmd = 1;
    repeat (400) @(negedge clk);
    check(!init && n_ack == 0, "no window before the first BCR");
    cmd = 0;
    issue(0);
    for (int i = 0; i < 6; i++) issue($urandom_range(1, PERIOD));
    check(n_ack == 7 && bcr_in_win == 7, $sformatf("%0d acks, %0d BCRs in windows", n_ack, bcr_in_win));
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
