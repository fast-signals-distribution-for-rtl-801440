// tb_fanout: a Fan-out module (number 3) fed with a 25 ns clock bundle and a
// PDC bundle, programmed over VME. Checks:
//   - encal and the eight 3-bit delays read back;
//   - output n's CLK edges are DLYn x 2.5 ns after the input clock edges;
//   - every input L1accept/BCR pulse appears once on every output, one clock
//     period later (plus the channel delay), on a CLK rising edge;
//   - an Init window that holds a BCR gives one Init pulse, together with
//     that BCR; a window without BCR gives none;
//   - Calib reaches exactly the enabled outputs, without re-timing.
`timescale 1ns/1ps
module tb_fanout;
  import fsd_pkg::*;
  localparam logic [31:0] BASE = 32'h5A00_0300;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic l1a = 0, bcr = 0, calib = 0, init = 0;
  pdg_bundle_t pdg_in;
  pdc_bundle_t pdc_in;
  assign pdg_in = '{clk: clk, l1a: l1a, bcr: bcr};
  assign pdc_in = '{calib: calib, init: init};
  fe_bundle_t  out [8];
  logic        as_n, ds_n, write_n, dtack_n;
  logic [5:0]  am;
  logic [31:0] addr, wdata, rdata;
  int checks = 0, failures = 0;

  fanout dut (.rst_n, .pdg_in, .pdc_in, .out, .sw_base(8'h5A), .sw_y(4'd3),
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

  int code [8] = '{0, 7, 3, 1, 5, 2, 6, 4};
  logic [7:0] encal = 8'b1010_0110;
  bit armed = 0;
  int n_bad_clk = 0, n_bad_pulse = 0, n_l1a [8], n_bcr [8], n_init [8], n_init_alone = 0;
  realtime t_in_l1a [$], t_in_bcr [$];
  always @(posedge clk) begin
    #0.1;
    if (l1a) t_in_l1a.push_back($realtime - 0.1);
    if (bcr) t_in_bcr.push_back($realtime - 0.1);
  end

  for (genvar n = 0; n < 8; n++) begin : g_mon
    logic oclk, ol1a, obcr, oinit, ocal;
    assign {oclk, ol1a, obcr, oinit, ocal} = {out[n].clk, out[n].l1a, out[n].bcr, out[n].init, out[n].calib};
    realtime t_clk;
    int il = 0, ib = 0;
    always @(posedge oclk) if (armed) begin
      realtime base;
      t_clk = $realtime;
      base = $realtime - code[n] * 2.5 - 12.5;
      if (base - 25.0 * $rtoi(base / 25.0 + 0.5) > 0.001 || base - 25.0 * $rtoi(base / 25.0 + 0.5) < -0.001) n_bad_clk++;
    end
    always @(posedge ol1a) if (armed) begin
      if ($realtime != t_in_l1a[il] + 25.0 + code[n] * 2.5 || $realtime != t_clk) n_bad_pulse++;
      il++; n_l1a[n]++;
    end
    always @(posedge obcr) if (armed) begin
      if ($realtime != t_in_bcr[ib] + 25.0 + code[n] * 2.5 || $realtime != t_clk) n_bad_pulse++;
      ib++; n_bcr[n]++;
    end
    always @(posedge oinit) if (armed) begin
      n_init[n]++;
      if (!obcr) n_init_alone++;
    end
  end

  task automatic pulse_bcr_l1a(input int k);
    @(posedge clk); l1a <= (k % 3 == 0); bcr <= (k % 5 == 0);
    @(posedge clk); l1a <= 0; bcr <= 0;
    repeat (3) @(posedge clk);
  endtask

  initial begin
    foreach (n_l1a[n]) begin n_l1a[n] = 0; n_bcr[n] = 0; n_init[n] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    rd(0, 0);
    wr(0,  {8'h0, encal, 13'h0, 3'(code[0])});
    wr(4,  {13'h0, 3'(code[1]), 13'h0, 3'(code[2])});
    wr(8,  {13'h0, 3'(code[3]), 13'h0, 3'(code[4])});
    wr(12, {13'h0, 3'(code[5]), 13'h0, 3'(code[6])});
    wr(16, {13'h0, 3'(code[7]), 16'h0});
    rd(0,  {8'h0, encal, 13'h0, 3'(code[0])});
    rd(4,  {13'h0, 3'(code[1]), 13'h0, 3'(code[2])});
    rd(16, {13'h0, 3'(code[7]), 16'h0});
    repeat (4) @(posedge clk);
    armed = 1;
    // pulses
    for (int k = 0; k < 30; k++) pulse_bcr_l1a(k);
    repeat (4) @(posedge clk);
    for (int n = 0; n < 8; n++)
      check(n_l1a[n] == 10 && n_bcr[n] == 6, $sformatf("output %0d: %0d L1accepts, %0d BCRs", n + 1, n_l1a[n], n_bcr[n]));
    check(n_bad_clk == 0, $sformatf("%0d clock edges off the programmed delay", n_bad_clk));
    check(n_bad_pulse == 0, $sformatf("%0d pulses off their expected edge", n_bad_pulse));
    // Init window with a BCR inside (window from an unrelated phase)
    #3.3 init = 1;
    repeat (8) @(posedge clk);
    bcr <= 1; @(posedge clk); bcr <= 0;
    repeat (9) @(posedge clk); #3.3 init = 0;
    repeat (6) @(posedge clk);
    // Init window without BCR, then a BCR outside any window
    #3.3 init = 1;
    repeat (18) @(posedge clk); #3.3 init = 0;
    repeat (4) @(posedge clk);
    bcr <= 1; @(posedge clk); bcr <= 0;
    repeat (6) @(posedge clk);
    for (int n = 0; n < 8; n++)
      check(n_init[n] == 1, $sformatf("output %0d: %0d Init pulses", n + 1, n_init[n]));
    check(n_init_alone == 0, "every Init comes with a BCR");
    // Calib gating, immediate
    for (int k = 0; k < 6; k++) begin
      #7.3 calib = ~calib;
      #0.01;
      for (int n = 0; n < 8; n++)
        check(out[n].calib == (calib && encal[n]), $sformatf("Calib on output %0d", n + 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
