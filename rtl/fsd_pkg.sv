// Package fsd_pkg: constants and types shared by the fast-signal distribution
// system (PDC, PDG and Fan-out modules and their VME interfaces).
//
// The system runs on the 40.08 MHz LHC bunch clock (one cycle is about 25 ns).
// Timing values quoted in nanoseconds are converted here into clock cycles.
// Register field positions follow the VME maps of the three modules; field
// positions that the maps leave ambiguous are this design's choice and are
// noted next to the constant.
`timescale 1ns/1ps
package fsd_pkg;

  // ---------------------------------------------------------------- timing
  // Bunch-counter reset period in clock cycles.
  localparam int unsigned BCR_PERIOD     = 3564;
  // Init window produced by the PDC: 450 ns = 18 cycles of 25 ns.
  localparam int unsigned INIT_CYCLES    = 18;
  // One unit of the Calib width field L2: 400 ns = 16 cycles.
  localparam int unsigned CALIB_UNIT     = 16;
  // Cycles vetoed after every L1accept (at least 2 untriggered cycles).
  localparam int unsigned L1A_DEADTIME   = 2;
  // Internal trigger periods of the PDG: 40.08 MHz / 100 Hz and / 100 kHz.
  localparam int unsigned TRIG_SLOW_DIV  = 400800;
  localparam int unsigned TRIG_FAST_DIV  = 401;

  // --------------------------------------------------------------- bundles
  // One front-end output bundle (Fan-out output).
  typedef struct packed {
    logic clk;
    logic l1a;
    logic bcr;
    logic init;
    logic calib;
  } fe_bundle_t;

  // Bundle from a PDG output: CLK, L1accept, BCR.
  typedef struct packed {
    logic clk;
    logic l1a;
    logic bcr;
  } pdg_bundle_t;

  // Bundle from a PDC output: Calib, Init (long window).
  typedef struct packed {
    logic calib;
    logic init;
  } pdc_bundle_t;

  // ------------------------------------------------------------------ VME
  // Accepted address modifiers (A32 extended accesses).
  localparam logic [5:0] AM_EXT_SUP_PROG  = 6'h0E;
  localparam logic [5:0] AM_EXT_SUP_DATA  = 6'h0D;
  localparam logic [5:0] AM_EXT_USER_PROG = 6'h0A;
  localparam logic [5:0] AM_EXT_USER_DATA = 6'h09;

  // Module code in address bits 11..8: 0 = PDG, 1..7 = Fan-out number Y, 8 = PDC.
  localparam logic [3:0] MOD_PDG = 4'h0;
  localparam logic [3:0] MOD_PDC = 4'h8;

  // External trigger input modes (PDC Mode1 / Mode2 fields).
  typedef enum logic [1:0] {
    TRIG_UNUSED = 2'b00,
    TRIG_L1A    = 2'b01,
    TRIG_RSVD   = 2'b10,   // coding not defined: treated as unused
    TRIG_CALIB  = 2'b11
  } trig_mode_e;

  // PDG trigger source (MUX bits 1..0).
  typedef enum logic [1:0] {
    SRC_INT_100HZ  = 2'b00,
    SRC_INT_100KHZ = 2'b01,
    SRC_NONE       = 2'b10,  // coding not defined: no trigger
    SRC_EXTERNAL   = 2'b11
  } trig_src_e;

  function automatic logic am_ok(input logic [5:0] am);
    return (am == AM_EXT_SUP_PROG) || (am == AM_EXT_SUP_DATA) ||
           (am == AM_EXT_USER_PROG) || (am == AM_EXT_USER_DATA);
  endfunction

endpackage
