// tb_pdg: the PDG module with a 25 ns internal clock, a 30 ns external
// clock and a VME master. Checks:
//   - MUX loaded from the thumbwheel at reset; register write/read-back of
//     MUX and all eight 12-bit delays;
//   - each output delayed by DLY x 50 ps: every output CLK rising edge lies
//     DLY x 50 ps after an internal-clock rising edge, with its BCR/L1accept
//     changing on that same edge;
//   - internal BCR every 3564 cycles; internal 100 kHz trigger every 401
//     cycles; trigger code 10 gives no trigger;
//   - external trigger (one flop resynchronisation) and external BCR
//     selection; external clock selection (30 ns period at the outputs).
`timescale 1ns/1ps
module tb_pdg;
  import fsd_pkg::*;
  localparam logic [31:0] BASE = 32'h3C00_0000;
  logic int_clk = 0, ext_clk = 0, rst_n = 0;
  always #12.5 int_clk = ~int_clk;
  always #15   ext_clk = ~ext_clk;

  logic ext_trig = 0, ext_bcr = 0;
  pdg_bundle_t out [8];
  logic        as_n, ds_n, write_n, dtack_n;
  logic [5:0]  am;
  logic [31:0] addr, wdata, rdata;
  int checks = 0, failures = 0;

  pdg dut (.rst_n, .int_clk, .ext_clk, .ext_trig, .ext_bcr, .thumbwheel(4'b0001), .out,
           .sw_base(8'h3C),
           .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n), .vme_am(am),
           .vme_addr(addr), .vme_wdata(wdata), .vme_rdata(rdata), .vme_dtack_n(dtack_n));
  vme_master m (.as_n, .ds_n, .write_n, .am, .addr, .wdata, .rdata, .dtack_n);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic wr(input int off, input logic [31:0] d);
    logic ack;
    m.write(BASE + off, d, ack);
    check(ack, $sformatf("write %h acknowledged", off));
  endtask
  task automatic rd(input int off, input logic [31:0] exp_d);
    logic ack; logic [31:0] d;
    m.read(BASE + off, d, ack);
    check(ack && d == exp_d, $sformatf("read %h = %h, expected %h", off, d, exp_d));
  endtask

  // output monitors: edge alignment, pulse counts and intervals per output
  int dly_code [8];
  int n_clk_bad = 0, n_pulse_bad = 0, n_width_bad = 0;
  realtime last_bcr [8], last_l1a [8], bcr_int [8], l1a_int [8];
  int n_bcr [8], n_l1a [8];
  for (genvar n = 0; n < 8; n++) begin : g_mon
    realtime t_clk;
    logic oclk, obcr, ol1a;
    assign {oclk, ol1a, obcr} = {out[n].clk, out[n].l1a, out[n].bcr};
    always @(posedge oclk) begin
      realtime base;
      t_clk = $realtime;
      if (!dut.mux[3]) begin
        base = $realtime - dly_code[n] * 0.050;
        // internal clock rising edges are at 12.5 + k*25 ns
        if ((base - 12.5) - 25.0 * $rtoi((base - 12.5) / 25.0 + 0.5) > 0.001 ||
            (base - 12.5) - 25.0 * $rtoi((base - 12.5) / 25.0 + 0.5) < -0.001) n_clk_bad++;
      end
    end
    always @(posedge obcr) begin
      if ($realtime != t_clk) n_pulse_bad++;
      bcr_int[n] = $realtime - last_bcr[n]; last_bcr[n] = $realtime; n_bcr[n]++;
    end
    // pulses are one clock period wide
    always @(negedge obcr) if ($realtime > 1000 && ($realtime - last_bcr[n] > 30.01)) n_width_bad++;
    always @(negedge ol1a) if ($realtime > 1000 && ($realtime - last_l1a[n] > 30.01)) n_width_bad++;
    always @(posedge ol1a) begin
      if ($realtime != t_clk) n_pulse_bad++;
      l1a_int[n] = $realtime - last_l1a[n]; last_l1a[n] = $realtime; n_l1a[n]++;
    end
  end

  function automatic logic [31:0] dly_word(input int r);
    // register r holds DLY(2r) in [27:16] and DLY(2r+1) in [11:0]
    logic [31:0] w = '0;
    if (r > 0)     w[27:16] = 12'(dly_code[2*r - 1]);
    if (2*r < 8)   w[11:0]  = 12'(dly_code[2*r]);
    return w;
  endfunction

  initial begin
    int b0, l0;
    foreach (dly_code[n]) begin dly_code[n] = 0; n_bcr[n] = 0; n_l1a[n] = 0; last_bcr[n] = 0; last_l1a[n] = 0; end
    repeat (3) @(posedge int_clk); rst_n = 1;
    rd(0, 32'h0001_0000);                       // thumbwheel = 0001: 100 kHz trigger
    // ---- delays
    dly_code = '{0, 1, 4095, 500, 123, 2048, 7, 3000};
    for (int r = 0; r < 5; r++) wr(4*r, dly_word(r) | ((r == 0) ? 32'h0001_0000 : 0));
    for (int r = 0; r < 5; r++) rd(4*r, dly_word(r) | ((r == 0) ? 32'h0001_0000 : 0));
    #300; n_clk_bad = 0; n_pulse_bad = 0;
    // ---- internal BCR and 100 kHz trigger
    b0 = n_bcr[0]; l0 = n_l1a[0];
    #(3 * 3564 * 25);
    check(n_bcr[0] - b0 >= 2 && bcr_int[0] == 3564 * 25.0, $sformatf("BCR interval %0.1f ns", bcr_int[0]));
    check(n_l1a[0] - l0 >= 20 && l1a_int[0] == 401 * 25.0, $sformatf("trigger interval %0.1f ns", l1a_int[0]));
    for (int n = 1; n < 8; n++)
      check(n_bcr[n] == n_bcr[0] && n_l1a[n] == n_l1a[0], $sformatf("output %0d carries the same pulses", n + 1));
    check(n_clk_bad == 0, $sformatf("%0d output clock edges off the programmed delay", n_clk_bad));
    check(n_pulse_bad == 0, $sformatf("%0d pulses not on their clock edge", n_pulse_bad));
    // ---- trigger code 10: no trigger
    wr(0, 32'h0002_0000);
    #2000; l0 = n_l1a[0];
    #(3 * 401 * 25);
    check(n_l1a[0] == l0, "code 10 gives no trigger");
    // ---- external trigger (already synchronous, 5 ns after the clock edge)
    wr(0, 32'h0003_0000);
    #2000; l0 = n_l1a[0];
    for (int k = 0; k < 5; k++) begin
      @(posedge int_clk); #5 ext_trig = 1;
      @(posedge int_clk); #5 ext_trig = 0;
      repeat (10) @(posedge int_clk);
    end
    #300;
    check(n_l1a[0] == l0 + 5, $sformatf("%0d of 5 external triggers passed", n_l1a[0] - l0));
    // ---- external BCR
    wr(0, 32'h0007_0000);
    #2000; b0 = n_bcr[0];
    for (int k = 0; k < 3; k++) begin
      #1003 ext_bcr = 1; #60 ext_bcr = 0;
    end
    #(3600 * 25);
    check(n_bcr[0] == b0 + 3, $sformatf("%0d BCRs with external BCR (expected 3)", n_bcr[0] - b0));
    // ---- external clock
    wr(0, 32'h000F_0000);
    #2000;
    begin
      realtime t1, t2;
      @(posedge g_mon[2].oclk) t1 = $realtime;
      @(posedge g_mon[2].oclk) t2 = $realtime;
      check(t2 - t1 > 29.99 && t2 - t1 < 30.01, $sformatf("output clock period %0.2f ns", t2 - t1));
    end
    check(n_width_bad == 0, $sformatf("%0d pulses longer than one clock period", n_width_bad));
    // registers stay reachable on the internal clock
    rd(0, 32'h000F_0000 | dly_word(0));
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
