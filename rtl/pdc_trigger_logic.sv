// pdc_trigger_logic: external trigger handling of the PDC module.
//
// Trig1 (ECL input) and Trig2 (NIM input) are asynchronous. Each is
// re-synchronised to the PDC clock (two flops) and its leading edge turned
// into a single-cycle pulse, which costs a jitter of up to one clock period.
// The 2-bit Mode field of each input decides what a pulse does:
//   00 input unused; 01 input is a physics trigger (L1accept);
//   11 input requests a calibration sequence; 10 is not defined and is
//   treated here as unused.
// Physics triggers from both inputs are OR-ed and masked: they are dropped
// while the calibration veto is high and during the L1A_DEADTIME (2) cycles
// following any L1accept, so two L1accepts are always at least 75 ns apart.
// The system L1accept is the OR of the calibration L1accept and the masked
// external triggers; it is registered, one cycle after the decision.
// Calibration requests from the inputs are passed on (unmasked) to the
// sequencer.
//
// Masking rules, mode coding and the OR follow the PDC description; the
// synchroniser depth and the handling of code 10 are this design's choices.
`timescale 1ns/1ps
module pdc_trigger_logic
  import fsd_pkg::*;
#(
  parameter int unsigned DEADTIME = L1A_DEADTIME
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       trig1,        // asynchronous Trig1 input
  input  logic       trig2,        // asynchronous Trig2 input
  input  trig_mode_e mode1,
  input  trig_mode_e mode2,
  input  logic       calib_l1a,    // L1accept from the calibration sequencer
  input  logic       calib_veto,   // veto window from the calibration sequencer
  output logic       l1a,          // system L1accept (before the large delay)
  output logic       calib_req,    // calibration request from an input
  output logic       ext_vetoed    // an external trigger was dropped (one cycle)
);

  logic t1_rise, t2_rise, t1_lvl, t2_lvl;
  logic ext_req, ext_ok, l1a_next;
  logic [1:0] dead;

  sync_edge u_sync1 (.clk, .rst_n, .d(trig1), .level(t1_lvl), .rise(t1_rise));
  sync_edge u_sync2 (.clk, .rst_n, .d(trig2), .level(t2_lvl), .rise(t2_rise));

  assign ext_req   = (t1_rise && mode1 == TRIG_L1A)   || (t2_rise && mode2 == TRIG_L1A);
  assign calib_req = (t1_rise && mode1 == TRIG_CALIB) || (t2_rise && mode2 == TRIG_CALIB);
  assign ext_ok    = (dead == 0) && !calib_veto;
  assign l1a_next  = calib_l1a || (ext_req && ext_ok);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dead       <= '0;
      l1a        <= 1'b0;
      ext_vetoed <= 1'b0;
    end else begin
      l1a        <= l1a_next;
      ext_vetoed <= ext_req && !ext_ok;
      if (l1a_next)      dead <= 2'(DEADTIME);
      else if (dead != 0) dead <= dead - 1'b1;
    end
  end

  // Two L1accepts are never closer than DEADTIME+1 cycles unless one of them
  // is a calibration trigger.
  a_spacing: assert property (@(posedge clk) disable iff (!rst_n)
                              l1a |=> !l1a || $past(calib_l1a));

endmodule
