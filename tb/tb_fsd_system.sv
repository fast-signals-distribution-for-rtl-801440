// tb_fsd_system: end-to-end test of the whole system at its full size (PDG,
// PDC, seven Fan-out modules, 56 outputs) with every parameter at its default.
// The VME master programs the system as in normal operation (PDG on its
// internal clock and BCR, trigger from the PDC; PDC DLY and L1..L4; fine
// delays in the PDG and the Fan-outs; Calib enables), then runs:
//   1. a physics trigger on Trig1, and a second one on Trig2 one cycle later
//      that the dead time must drop;
//   2. a calibration sequence from VME, with a Trig1 trigger inside its veto;
//   3. a calibration sequence requested by Trig2 (mode 11);
//   4. an Init from VME, twice: with the PDC's PDG channel at a short and at
//      the maximum delay;
//   5. a switch of the PDG to its internal 100 kHz trigger.
// At every output it checks the pulse counts, that Init comes with BCR, that
// Calib only reaches enabled outputs of Fan-outs 1..6, that BCR has a period
// of 3564 cycles, that output timing differences equal the programmed fine
// delays and that Calib-to-L1accept spacing follows DLY + L3 + L1 - L4.
// Each mechanism is counted and a mechanism that never happened is a failure.
`timescale 1ns/1ps
module tb_fsd_system;
  import fsd_pkg::*;
  localparam int NF = 7;
  localparam logic [31:0] B = 32'h4200_0000;
  logic int_clk = 0, rst_n = 0;
  always #12.5 int_clk = ~int_clk;     // 40 MHz stand-in for the 40.08 MHz oscillator

  logic trig1 = 0, trig2 = 0;
  fe_bundle_t  fe_out [NF][8];
  logic        as_n, ds_n, write_n, dtack_n;
  logic [5:0]  am;
  logic [31:0] addr, wdata, rdata;
  int checks = 0, failures = 0;

  fsd_system dut (.rst_n, .int_clk, .ext_clk(1'b0), .ext_bcr(1'b0), .trig1, .trig2,
                  .thumbwheel(4'b0011), .sw_base(8'h42),
                  .vme_as_n(as_n), .vme_ds_n(ds_n), .vme_write_n(write_n), .vme_am(am),
                  .vme_addr(addr), .vme_wdata(wdata), .vme_rdata(rdata), .vme_dtack_n(dtack_n),
                  .fe_out);
  vme_master m (.as_n, .ds_n, .write_n, .am, .addr, .wdata, .rdata, .dtack_n);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask
  task automatic wr(input logic [31:0] a, input logic [31:0] d);
    logic ack;
    m.write(B + a, d, ack);
    check(ack, $sformatf("write %h acknowledged", a));
  endtask
  task automatic rd(input logic [31:0] a, input logic [31:0] exp_d);
    logic ack; logic [31:0] d;
    m.read(B + a, d, ack);
    check(ack && d == exp_d, $sformatf("read %h = %h, expected %h", a, d, exp_d));
  endtask

  // programmed values
  localparam int DLY = 20, L1 = 4, L2 = 2, L3 = 10, L4 = 3;
  int pdg_dly [8] = '{40, 0, 1000, 4095, 77, 2500, 123, 3300};
  int fo_dly [NF][8];
  logic [7:0] encal [NF];

  // ------------------------------------------------------------ monitors
  int n_l1a [NF][8], n_bcr [NF][8], n_init [NF][8], n_cal [NF][8];
  realtime t_l1a [NF][8], t_cal [NF][8], t_bcr [NF][8], bcr_per [NF][8];
  int n_init_alone = 0;
  for (genvar k = 0; k < NF; k++) begin : g_k
    for (genvar n = 0; n < 8; n++) begin : g_n
      logic ol1a, obcr, oinit, ocal;
      assign {ol1a, obcr, oinit, ocal} = {fe_out[k][n].l1a, fe_out[k][n].bcr, fe_out[k][n].init, fe_out[k][n].calib};
      always @(posedge ol1a) begin n_l1a[k][n]++; t_l1a[k][n] = $realtime; end
      always @(posedge obcr) begin
        bcr_per[k][n] = $realtime - t_bcr[k][n];
        n_bcr[k][n]++; t_bcr[k][n] = $realtime;
      end
      always @(posedge oinit) begin
        n_init[k][n]++; #0.01;
        if (!obcr && rst_n) begin n_init_alone++; $display("Init without BCR at output %0d.%0d, t=%0t", k + 1, n + 1, $realtime); end
      end
      always @(posedge ocal) begin n_cal[k][n]++; t_cal[k][n] = $realtime; end
    end
  end

  // mechanism counters
  int m_dead = 0, m_veto = 0, m_seq_vme = 0, m_seq_ext = 0, m_init = 0, m_ext_l1a = 0, m_int_trig = 0;
  always @(posedge dut.u_pdc.clk) begin
    if (dut.u_pdc.u_trig.ext_vetoed && dut.u_pdc.seq_veto) m_veto++;
    if (dut.u_pdc.u_trig.ext_vetoed && !dut.u_pdc.seq_veto) m_dead++;
    if (dut.u_pdc.seq_ack && dut.u_pdc.req_calib) m_seq_vme++;
    if (dut.u_pdc.seq_ack && !dut.u_pdc.req_calib) m_seq_ext++;
    if (dut.u_pdc.init_ack) m_init++;
  end

  function automatic int total(input int a [NF][8]);
    int s = 0;
    for (int k = 0; k < NF; k++) for (int n = 0; n < 8; n++) s += a[k][n];
    return s;
  endfunction

  task automatic snapshot(output int l [NF][8], output int c [NF][8], output int i [NF][8]);
    l = n_l1a; c = n_cal; i = n_init;
  endtask

  task automatic trig_pulse(ref logic t);
    @(posedge int_clk); #3 t = 1;
    @(posedge int_clk); #3 t = 0;
  endtask

  initial begin
    int l0 [NF][8], c0 [NF][8], i0 [NF][8];
    for (int k = 0; k < NF; k++) begin
      encal[k] = 8'($urandom) | 8'h01;
      for (int n = 0; n < 8; n++) begin
        fo_dly[k][n] = $urandom_range(0, 7);
        n_l1a[k][n] = 0; n_bcr[k][n] = 0; n_init[k][n] = 0; n_cal[k][n] = 0; t_bcr[k][n] = 0;
      end
    end
    repeat (4) @(posedge int_clk); rst_n = 1;
    repeat (10) @(posedge int_clk);

    // ---------------------------------------------------- configuration
    rd(32'h000, 32'h0003_0000);                       // thumbwheel: external trigger
    wr(32'h000, {12'h000, 4'b0011, 4'h0, 12'(pdg_dly[0])});
    for (int r = 1; r < 5; r++)
      wr(4 * r, {4'h0, 12'(pdg_dly[2*r - 1]), 4'h0, (r < 4) ? 12'(pdg_dly[2*r]) : 12'h0});
    rd(32'h00C, {4'h0, 12'(pdg_dly[5]), 4'h0, 12'(pdg_dly[6])});
    #1000;   // the PDC and Fan-out clocks have moved: let them settle
    for (int k = 0; k < NF; k++) begin
      logic [31:0] fb;
      fb = B + 32'((k + 1) << 8);
      wr(32'((k + 1) << 8) + 0,  {8'h0, encal[k], 13'h0, 3'(fo_dly[k][0])});
      for (int r = 1; r < 5; r++)
        wr(32'((k + 1) << 8) + 4 * r, {13'h0, 3'(fo_dly[k][2*r - 1]), 13'h0, (r < 4) ? 3'(fo_dly[k][2*r]) : 3'h0});
      rd(32'((k + 1) << 8), {8'h0, encal[k], 13'h0, 3'(fo_dly[k][0])});
    end
    wr(32'h804, {12'h0, 4'(L1), 8'h0, 8'(L2)});
    wr(32'h808, {10'h0, 6'(L3), 10'h0, 6'(L4)});
    wr(32'h800, {12'h0, 2'b01, 2'b01, 8'h0, 8'(DLY)});   // Trig1 and Trig2 physics
    rd(32'h800, {12'h0, 2'b01, 2'b01, 8'h0, 8'(DLY)});
    #1000;

    // ------------------------------- 1. physics trigger, dead-time drop
    snapshot(l0, c0, i0);
    fork
      trig_pulse(trig1);
      begin @(posedge int_clk); @(posedge int_clk); trig_pulse(trig2); end
    join
    #2000;
    check(total(n_l1a) - total(l0) == NF * 8, $sformatf("one L1accept per output (%0d)", total(n_l1a) - total(l0)));
    m_ext_l1a += (total(n_l1a) - total(l0)) / (NF * 8);
    // output timing follows the programmed fine delays, relative to output (1,1)
    for (int k = 0; k < NF; k++)
      for (int n = 0; n < 8; n++) begin
        realtime d_exp, d_got;
        d_exp = (pdg_dly[k + 1] - pdg_dly[1]) * 0.050 + (fo_dly[k][n] - fo_dly[0][0]) * 2.5;
        d_got = t_l1a[k][n] - t_l1a[0][0];
        if (d_got - d_exp > 0.001 || d_exp - d_got > 0.001)
          check(0, $sformatf("output %0d.%0d L1accept skew %0.3f ns, expected %0.3f", k + 1, n + 1, d_got, d_exp));
        else checks++;
      end

    // -------------------- 2. VME calibration with a trigger in its veto
    snapshot(l0, c0, i0);
    fork
      wr(32'h800, {7'h0, 1'b1, 4'h0, 2'b01, 2'b01, 8'h0, 8'(DLY)});
      begin
        // the veto opens L3 cycles after the sequence starts and lasts 2*L1+1
        wait (dut.u_pdc.seq_veto);
        #2; trig1 = 1; @(posedge int_clk); #3 trig1 = 0;
      end
    join
    #5000;
    for (int k = 0; k < NF; k++)
      for (int n = 0; n < 8; n++) begin
        int exp_cal;
        exp_cal = (k < 6 && encal[k][n]) ? 1 : 0;
        if (n_cal[k][n] - c0[k][n] != exp_cal || n_l1a[k][n] - l0[k][n] != 1)
          check(0, $sformatf("output %0d.%0d: %0d Calib, %0d L1accept after a calibration", k + 1, n + 1,
                             n_cal[k][n] - c0[k][n], n_l1a[k][n] - l0[k][n]));
        else checks++;
      end
    begin
      // Calib to L1accept at output 1.1 (Calib is enabled there)
      realtime sp; int cyc_sp;
      sp = t_l1a[0][0] - t_cal[0][0];
      cyc_sp = $rtoi(sp / 25.0);
      check(cyc_sp >= DLY + L3 + L1 - L4 && cyc_sp <= DLY + L3 + L1 - L4 + 8,
            $sformatf("Calib to L1accept %0.2f ns (%0d cycles, programmed %0d)", sp, cyc_sp, DLY + L3 + L1 - L4));
    end

    // ------------------------------ 3. calibration requested by Trig2
    wr(32'h800, {12'h0, 2'b11, 2'b01, 8'h0, 8'(DLY)});
    snapshot(l0, c0, i0);
    trig_pulse(trig2);
    #5000;
    check(n_cal[0][0] - c0[0][0] == 1 && n_l1a[0][0] - l0[0][0] == 1, "Trig2 in mode 11 runs a calibration");

    // --------------------------------------------------------- 4. Init
    snapshot(l0, c0, i0);
    wr(32'h800, {3'h0, 1'b1, 8'h0, 2'b11, 2'b01, 8'h0, 8'(DLY)});
    #(3564 * 25 + 2000);
    rd(32'h800, {12'h0, 2'b11, 2'b01, 8'h0, 8'(DLY)});   // both request bits cleared
    for (int k = 0; k < NF; k++)
      for (int n = 0; n < 8; n++) begin
        int exp_i;
        exp_i = (k < 6) ? 1 : 0;
        if (n_init[k][n] - i0[k][n] != exp_i)
          check(0, $sformatf("output %0d.%0d: %0d Init pulses", k + 1, n + 1, n_init[k][n] - i0[k][n]));
        else checks++;
      end
    // Init again with the PDC's own channel at the maximum delay: the Fan-outs
    // now see their BCR up to 205 ns before the PDC does
    wr(32'h000, {12'h000, 4'b0011, 4'h0, 12'd4095});
    #2000;
    snapshot(l0, c0, i0);
    wr(32'h800, {3'h0, 1'b1, 8'h0, 2'b11, 2'b01, 8'h0, 8'(DLY)});
    #(3564 * 25 + 2000);
    for (int k = 0; k < NF; k++)
      for (int n = 0; n < 8; n++) begin
        int exp_i;
        exp_i = (k < 6) ? 1 : 0;
        if (n_init[k][n] - i0[k][n] != exp_i)
          check(0, $sformatf("PDC channel at 205 ns: output %0d.%0d: %0d Init pulses", k + 1, n + 1, n_init[k][n] - i0[k][n]));
        else checks++;
      end
    check(n_init_alone == 0, "every Init comes with BCR");
    for (int k = 0; k < NF; k++)
      check(bcr_per[k][7] == 3564 * 25.0, $sformatf("BCR period at Fan-out %0d: %0.1f ns", k + 1, bcr_per[k][7]));

    // ----------------------------------- 5. PDG internal 100 kHz trigger
    snapshot(l0, c0, i0);
    wr(32'h000, {12'h000, 4'b0001, 4'h0, 12'(pdg_dly[0])});
    #(401 * 25 * 5);
    wr(32'h000, {12'h000, 4'b0011, 4'h0, 12'(pdg_dly[0])});
    m_int_trig = n_l1a[3][3] - l0[3][3];
    check(m_int_trig >= 4 && m_int_trig <= 6, $sformatf("%0d internal triggers in 5 periods", m_int_trig));

    // ------------------------------------------------------ mechanisms
    $display("mechanisms: ext L1A %0d, dead-time drop %0d, veto drop %0d, VME calib %0d, Trig calib %0d, Init %0d, internal trig %0d",
             m_ext_l1a, m_dead, m_veto, m_seq_vme, m_seq_ext, m_init, m_int_trig);
    check(m_ext_l1a > 0, "external physics trigger happened");
    check(m_dead > 0, "dead-time drop happened");
    check(m_veto > 0, "calibration veto drop happened");
    check(m_seq_vme > 0, "VME calibration sequence happened");
    check(m_seq_ext > 0, "input-requested calibration sequence happened");
    check(m_init > 0, "Init happened");
    check(m_int_trig > 0, "internal trigger happened");
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
