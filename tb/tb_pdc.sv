// tb_pdc: the PDC module driven by a PDG-like bundle (25 ns clock, BCR every
// 3564 cycles) and a VME master. Checks:
//   - register write/read-back and self-clearing request bits;
//   - a VME calibration sequence: Calib width L2 x 16 cycles, and the trigger
//     output (L1accept) DLY + L3 + L1 - L4 + 1 cycles after the Calib edge;
//   - all six output bundles identical;
//   - an external Trig1 trigger (mode 01) reaching the trigger output after
//     DLY + 3..5 cycles, a Trig2 trigger n_in the calibration veto dropped,
//     a Trig2 edge in mode 11 starting a calibration sequence;
//   - a VME Init request giving one 18-cycle Init window around a BCR.
`timescale 1ns/1ps
module tb_pdc;
  import fsd_pkg::*;
  localparam logic [31:0] BASE = 32'h3C00_0800;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  int cyc = 0;
  logic bcr = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    bcr <= ((cyc + 1) % BCR_PERIOD == 100);
  end

  pdg_bundle_t bundle_in;
  assign bundle_in = '{clk: clk, l1a: 1'b0, bcr: bcr};

  logic trig1 = 0, trig2 = 0, trig_out;
  pdc_bundle_t out [6];
  logic        as_n, ds_n, write_n, dtack_n;
  logic [5:0]  am;
  logic [31:0] addr, wdata, rdata;
  int checks = 0, failures = 0;

  pdc dut (.rst_n, .bundle_in, .trig1, .trig2, .trig_out, .out, .sw_base(8'h3C),
           .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n), .vme_am(am),
           .vme_addr(addr), .vme_wdata(wdata), .vme_rdata(rdata), .vme_dtack_n(dtack_n));
  vme_master m (.as_n, .ds_n, .write_n, .am, .addr, .wdata, .rdata, .dtack_n);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // monitors (cycle numbers of edges)
  int trig_cyc [$], cal_rise [$], cal_fall [$], init_rise [$], init_fall [$], bcr_cyc [$];
  logic cal_p = 0, init_p = 0;
  int mismatch = 0, n_vetoed = 0;
  always @(posedge clk) begin
    #1;
    if (trig_out) trig_cyc.push_back(cyc);
    if (out[0].calib && !cal_p) cal_rise.push_back(cyc);
    if (!out[0].calib && cal_p) cal_fall.push_back(cyc);
    if (out[0].init && !init_p) init_rise.push_back(cyc);
    if (!out[0].init && init_p) init_fall.push_back(cyc);
    if (bcr) bcr_cyc.push_back(cyc);
    if (dut.u_trig.ext_vetoed) n_vetoed++;
    cal_p = out[0].calib; init_p = out[0].init;
    for (int i = 1; i < 6; i++) if (out[i] != out[0]) mismatch++;
  end

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

  int edge_cyc;   // cycle number (as the monitors count it) of the last input edge
  task automatic pulse(ref logic t, input int ncyc);
    @(posedge clk); #7;
    t = 1; edge_cyc = cyc; repeat (ncyc) @(posedge clk); #7; t = 0;
  endtask

  initial begin
    int n0;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (5) @(posedge clk);
    // ---- registers
    rd(0, 0); rd(4, 0); rd(8, 0);
    wr(4, 32'h0002_0003);            // L1 = 2, L2 = 3
    wr(8, 32'h0005_0007);            // L3 = 5, L4 = 7
    wr(0, 32'h000D_000A);            // Mode2 = 11, Mode1 = 01, DLY = 10
    rd(4, 32'h0002_0003); rd(8, 32'h0005_0007); rd(0, 32'h000D_000A);
    wr(4, 32'hFFFF_FFFF); rd(4, 32'h000F_00FF);
    wr(8, 32'hFFFF_FFFF); rd(8, 32'h003F_003F);
    wr(4, 32'h0002_0003); wr(8, 32'h0005_0007);

    // ---- VME calibration
    n0 = trig_cyc.size();
    wr(0, 32'h010D_000A);            // bit 24
    repeat (120) @(posedge clk);
    rd(0, 32'h000D_000A);            // request bit cleared
    check(cal_rise.size() == 1 && cal_fall.size() == 1, "one Calib pulse");
    check(cal_fall[0] - cal_rise[0] == 3 * 16, $sformatf("Calib width %0d cycles", cal_fall[0] - cal_rise[0]));
    check(trig_cyc.size() == n0 + 1, "one calibration L1accept");
    check(trig_cyc[n0] - cal_rise[0] == 10 + 5 + 2 - 7 + 1,
          $sformatf("Calib to L1accept %0d cycles", trig_cyc[n0] - cal_rise[0]));

    // ---- external trigger on Trig1 (mode 01)
    n0 = trig_cyc.size();
    begin
      int t0;
      pulse(trig1, 2);
      t0 = edge_cyc;
      repeat (30) @(posedge clk);
      check(trig_cyc.size() == n0 + 1, "Trig1 gives one L1accept");
      check(trig_cyc[n0] - t0 >= 10 + 3 && trig_cyc[n0] - t0 <= 10 + 5,
            $sformatf("Trig1 latency %0d cycles", trig_cyc[n0] - t0));
    end

    // ---- Trig1 during a calibration veto is dropped; Trig2 (mode 11) starts a sequence
    wr(0, 32'h0005_000A);            // Mode2 = 01, Mode1 = 01
    wr(4, 32'h000F_0001);            // L1 = 15 (veto of 31 cycles), L2 = 1
    wr(8, 32'h0000_0000);            // L3 = 0, L4 = 0
    n0 = trig_cyc.size();
    wr(0, 32'h0105_000A);            // start calibration
    // VME cycle takes ~4 cycles after DS; the veto is open for 31 cycles
    pulse(trig2, 1);
    repeat (60) @(posedge clk);
    check(trig_cyc.size() == n0 + 1, $sformatf("trigger in veto dropped (%0d L1accepts)", trig_cyc.size() - n0));
    check(n_vetoed == 1, $sformatf("%0d external triggers vetoed", n_vetoed));
    wr(0, 32'h000D_000A);            // Mode2 = 11
    n0 = cal_rise.size();
    pulse(trig2, 2);
    repeat (60) @(posedge clk);
    check(cal_rise.size() == n0 + 1, "Trig2 in mode 11 starts a calibration sequence");

    // ---- Init on VME request
    n0 = init_rise.size();
    wr(0, 32'h1000_0000);
    while (init_fall.size() == n0) @(posedge clk);
    rd(0, 32'h0000_0000);
    check(init_rise.size() == n0 + 1 && init_fall[n0] - init_rise[n0] == INIT_CYCLES,
          $sformatf("Init window of %0d cycles", init_fall[n0] - init_rise[n0]));
    begin
      int n_in = 0;
      foreach (bcr_cyc[i]) if (bcr_cyc[i] >= init_rise[n0] && bcr_cyc[i] < init_fall[n0]) n_in++;
      check(n_in == 1, $sformatf("%0d BCRs n_in the Init window", n_in));
    end
    check(mismatch == 0, "six identical output bundles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
