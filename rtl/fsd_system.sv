// fsd_system: complete fast-signal distribution system.
//
// One PDG, one PDC and N_FANOUT (up to seven) Fan-out modules, all VME
// slaves on one bus, wired as the system is cabled in the crate:
//   * PDG output 1 feeds the PDC: it is the PDC's clock and BCR.
//   * PDG outputs 2..8 feed Fan-out modules 1..7 (CLK, L1accept, BCR).
//   * PDC Calib/Init outputs 1..6 feed Fan-out modules 1..6; Fan-out 7 gets
//     no Calib/Init (it is meant for the mini-RODs, which need neither), so
//     its Calib outputs are constant zero.
//   * The PDC trigger output is the PDG's external trigger input; the PDG
//     must be programmed to use it (MUX = x011), and to use its internal BCR.
// The Fan-out number switch of module k is set to k (1..7), and all modules
// share the XX base-address switches `sw_base`, which puts them at
// XX000000 (PDG), XX000k00 (Fan-out k) and XX000800 (PDC).
// The read-data lines of the slaves are OR-ed and their DTACK* AND-ed; an
// idle slave drives zero data.
//
// Each of the N_FANOUT x 8 outputs is a front-end bundle: CLK, L1accept,
// BCR and Init change on the rising edge of its CLK; Calib is asynchronous.
// An external trigger needs about 2 (PDC synchroniser) + 2 + DLY (PDC) +
// 2 (PDG) + 1 (Fan-out) cycles plus the programmed fine delays to reach the
// outputs.
// The module set and the cabling follow the system description; the shared
// base switch and the wired-OR read bus are this design's choices.
`timescale 1ns/1ps
module fsd_system
  import fsd_pkg::*;
#(
  parameter int unsigned N_FANOUT  = 7,
  parameter int unsigned BCR_PER   = BCR_PERIOD,
  parameter int unsigned DIV_SLOW  = TRIG_SLOW_DIV,
  parameter int unsigned DIV_FAST  = TRIG_FAST_DIV,
  parameter int unsigned INIT_LEAD = 11
) (
  input  logic        rst_n,        // power-up reset
  input  logic        int_clk,      // internal 40.08 MHz oscillator of the PDG
  input  logic        ext_clk,      // PDG external clock (NIM)
  input  logic        ext_bcr,      // PDG external BCR (NIM), unused in normal operation
  input  logic        trig1,        // PDC Trig1 (ECL)
  input  logic        trig2,        // PDC Trig2 (NIM)
  input  logic [3:0]  thumbwheel,   // PDG power-up configuration
  input  logic [7:0]  sw_base,      // XX base-address switches
  // VME
  input  logic        vme_as_n,
  input  logic        vme_ds_n,
  input  logic        vme_write_n,
  input  logic [5:0]  vme_am,
  input  logic [31:0] vme_addr,
  input  logic [31:0] vme_wdata,
  output logic [31:0] vme_rdata,
  output logic        vme_dtack_n,
  // front-end outputs
  output fe_bundle_t  fe_out [N_FANOUT][8]
);

  localparam int unsigned N_PDC_OUT = 6;
  localparam int unsigned N_PDG_OUT = 8;

  pdg_bundle_t pdg_out [N_PDG_OUT];
  pdc_bundle_t pdc_out [N_PDC_OUT];
  logic        pdc_trig;

  logic [31:0] rdata_pdg, rdata_pdc;
  logic        dtack_pdg, dtack_pdc;
  logic [31:0] rdata_fo [N_FANOUT];
  logic        dtack_fo [N_FANOUT];

  pdg #(.N_OUT(N_PDG_OUT), .BCR_PER(BCR_PER), .DIV_SLOW(DIV_SLOW), .DIV_FAST(DIV_FAST)) u_pdg (
    .rst_n, .int_clk, .ext_clk, .ext_trig(pdc_trig), .ext_bcr, .thumbwheel,
    .out(pdg_out), .sw_base,
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_am, .vme_addr, .vme_wdata,
    .vme_rdata(rdata_pdg), .vme_dtack_n(dtack_pdg)
  );

  pdc #(.N_OUT(N_PDC_OUT), .BCR_PER(BCR_PER), .INIT_LEAD(INIT_LEAD)) u_pdc (
    .rst_n, .bundle_in(pdg_out[0]), .trig1, .trig2, .trig_out(pdc_trig),
    .out(pdc_out), .sw_base,
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_am, .vme_addr, .vme_wdata,
    .vme_rdata(rdata_pdc), .vme_dtack_n(dtack_pdc)
  );

  for (genvar k = 0; k < int'(N_FANOUT); k++) begin : g_fo
    pdc_bundle_t pdc_in;
    if (k < int'(N_PDC_OUT)) begin : g_cal
      assign pdc_in = pdc_out[k];
    end else begin : g_nocal
      assign pdc_in = '0;
    end

    fanout #(.N_OUT(8)) u_fo (
      .rst_n, .pdg_in(pdg_out[k + 1]), .pdc_in, .out(fe_out[k]),
      .sw_base, .sw_y(4'(k + 1)),
      .vme_as_n, .vme_ds_n, .vme_write_n, .vme_am, .vme_addr, .vme_wdata,
      .vme_rdata(rdata_fo[k]), .vme_dtack_n(dtack_fo[k])
    );
  end

  always_comb begin
    vme_rdata   = rdata_pdg | rdata_pdc;
    vme_dtack_n = dtack_pdg & dtack_pdc;
    for (int k = 0; k < int'(N_FANOUT); k++) begin
      vme_rdata   = vme_rdata | rdata_fo[k];
      vme_dtack_n = vme_dtack_n & dtack_fo[k];
    end
  end

  initial assert (N_FANOUT >= 1 && N_FANOUT <= N_PDG_OUT - 1)
    else $error("a system has 1 to 7 Fan-out modules");

endmodule
