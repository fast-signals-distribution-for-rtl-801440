// tb_pdc_trigger_logic: random Trig1/Trig2 pulses, calibration L1accepts and
// veto windows under every Mode combination. A cycle-level model of the PDC
// trigger rules predicts every L1accept and calibration request:
//   - an input edge is seen 2 cycles after it arrives (synchroniser);
//   - an external trigger counts only in mode 01 and is dropped while the
//     calibration veto is high or within 2 cycles after an L1accept;
//   - a calibration L1accept always passes;
//   - a mode 11 edge is a calibration request; modes 00 and 10 do nothing.
// Also counts the vetoed triggers and checks the 75 ns minimum spacing.
`timescale 1ns/1ps
module tb_pdc_trigger_logic;
  import fsd_pkg::*;
  localparam int N = 8000;
  logic clk = 0, rst_n = 0;
  always #12.5 clk = ~clk;

  logic trig1 = 0, trig2 = 0, calib_l1a = 0, calib_veto = 0;
  trig_mode_e mode1 = TRIG_UNUSED, mode2 = TRIG_UNUSED;
  logic l1a, calib_req, ext_vetoed;
  int checks = 0, failures = 0, n_l1a = 0, n_creq = 0, n_vetoed = 0, n_drop_dead = 0;

  pdc_trigger_logic dut (.clk, .rst_n, .trig1, .trig2, .mode1, .mode2,
                         .calib_l1a, .calib_veto, .l1a, .calib_req, .ext_vetoed);

  bit t1 [N], t2 [N], cl [N], cv [N], el [N];
  trig_mode_e m1 [N], m2 [N];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  function automatic bit rise(input bit a [N], input int c);
    return c >= 1 && a[c] && !a[c-1];
  endfunction

  initial begin
    int p, w;
    trig_mode_e modes [4] = '{TRIG_L1A, TRIG_CALIB, TRIG_UNUSED, TRIG_RSVD};
    // build the stimulus: 8 phases of 1000 cycles with fixed modes
    for (int c = 0; c < N; c++) begin
      t1[c] = 0; t2[c] = 0; cl[c] = 0; cv[c] = 0;
      m1[c] = (c / 1000 < 4) ? TRIG_L1A : modes[(c / 1000) % 4];
      m2[c] = (c / 1000 == 0) ? TRIG_L1A : modes[(c / 1000 + 1) % 4];
    end
    for (int c = 20; c < N - 20; c++) begin
      if (c % 1000 > 980) continue;       // quiet before a mode change
      if ($urandom_range(0, 5) == 0) begin w = $urandom_range(1, 3); for (int k = 0; k < w; k++) t1[c+k] = 1; end
      if ($urandom_range(0, 6) == 0) begin w = $urandom_range(1, 3); for (int k = 0; k < w; k++) t2[c+k] = 1; end
      if ($urandom_range(0, 60) == 0) cl[c] = 1;
      if ($urandom_range(0, 80) == 0) begin w = $urandom_range(1, 12); for (int k = 0; k < w; k++) cv[c+k] = 1; end
    end
    // model
    for (int q = 0; q < N; q++) begin
      bit ext;
      el[q] = 0;
      if (q < 6) continue;
      ext = (rise(t1, q - 3) && m1[q-1] == TRIG_L1A) || (rise(t2, q - 3) && m2[q-1] == TRIG_L1A);
      el[q] = cl[q-1] || (ext && !cv[q-1] && !el[q-1] && !el[q-2]);
      if (ext && !cv[q-1] && (el[q-1] || el[q-2])) n_drop_dead++;
    end

    repeat (3) @(negedge clk); rst_n = 1;
    for (int c = 0; c < N; c++) begin
      @(negedge clk);
      // sample the outputs of this cycle
      if (c >= 6) begin
        bit ecr;
        ecr = (rise(t1, c - 2) && m1[c] == TRIG_CALIB) || (rise(t2, c - 2) && m2[c] == TRIG_CALIB);
        if (l1a !== el[c] || calib_req !== ecr)
          check(0, $sformatf("cycle %0d: l1a=%b exp %b, calib_req=%b exp %b", c, l1a, el[c], calib_req, ecr));
        else checks++;
      end
      n_l1a += int'(l1a); n_creq += int'(calib_req); n_vetoed += int'(ext_vetoed);
      // drive the stimulus of this cycle
      trig1 = t1[c]; trig2 = t2[c]; calib_l1a = cl[c]; calib_veto = cv[c];
      mode1 = m1[c]; mode2 = m2[c];
    end
    check(n_l1a > 100, $sformatf("%0d L1accepts seen", n_l1a));
    check(n_creq > 50, $sformatf("%0d calibration requests seen", n_creq));
    check(n_vetoed > 10, $sformatf("%0d triggers vetoed", n_vetoed));
    check(n_drop_dead > 5, $sformatf("%0d triggers dropped by the 2-cycle dead time", n_drop_dead));
    $display("l1a=%0d calib_req=%0d vetoed=%0d dead-time drops=%0d", n_l1a, n_creq, n_vetoed, n_drop_dead);
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
