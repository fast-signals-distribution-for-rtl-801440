// pdc: the PDC (programmable delay for calibration) module.
//
// The PDC makes the system L1accept, the Calib pulse and the Init window.
//   * Its clock and BCR come from one PDG output bundle (CLK, L1accept, BCR).
//     The L1accept of that bundle is not used.
//   * Trig1 (ECL) and Trig2 (NIM) are external physics triggers or
//     calibration requests, as set by the Mode fields (pdc_trigger_logic).
//   * A calibration sequence (calib_sequencer) starts on the VME bit 00<24>
//     or on an input programmed for calibration. It makes Calib, a
//     calibration L1accept and a veto that blanks external triggers around it.
//   * The L1accept (calibration OR masked external) passes through the large
//     delay of DLY x 25 ns (l1a_delay_line). It then leaves on the NIM trigger
//     output, which goes to the PDG trigger input.
//   * The VME bit 00<28> makes a 450 ns Init window that brackets a BCR
//     (init_generator).
//   * Six identical Calib/Init bundles feed the Fan-out modules.
// All outputs are registered on the rising (reference) edge of the PDC clock.
// The pulses of the incoming bundle change on that same edge, so BCR is taken
// on the falling edge, in the middle of its pulse.
//
// Registers (VME offsets from XX000800; all read back, all zero at reset):
//   00: [28] Init request, [24] calibration request (both clear themselves
//       once obeyed), [19:18] Mode2, [17:16] Mode1, [7:0] DLY
//   04: [19:16] L1, [7:0] L2
//   08: [21:16] L3, [5:0] L4
// The register layout, the function of every field and the six outputs
// follow the specification. Falling-edge capture of BCR, the synchronisers and
// the output registers are this design's choices.
// Latency: an L1accept decided in cycle t (calibration or external) appears
// on trig_out at cycle t + 2 + DLY.
`timescale 1ns/1ps
module pdc
  import fsd_pkg::*;
#(
  parameter int unsigned N_OUT       = 6,
  parameter int unsigned BCR_PER     = BCR_PERIOD,
  parameter int unsigned INIT_LEAD   = 11
) (
  input  logic        rst_n,
  input  pdg_bundle_t bundle_in,     // CLK, L1accept (unused), BCR from the PDG
  input  logic        trig1,         // Trig1, asynchronous
  input  logic        trig2,         // Trig2, asynchronous
  output logic        trig_out,      // NIM trigger output to the PDG
  output pdc_bundle_t out [N_OUT],   // Calib / Init to the Fan-out modules
  // VME
  input  logic [7:0]  sw_base,
  input  logic        vme_as_n,
  input  logic        vme_ds_n,
  input  logic        vme_write_n,
  input  logic [5:0]  vme_am,
  input  logic [31:0] vme_addr,
  input  logic [31:0] vme_wdata,
  output logic [31:0] vme_rdata,
  output logic        vme_dtack_n
);

  logic clk;
  assign clk = bundle_in.clk;

  // ------------------------------------------------------------ registers
  logic        req_init, req_calib;
  trig_mode_e  mode1, mode2;
  logic [7:0]  dly;
  logic [3:0]  l1;
  logic [7:0]  l2;
  logic [5:0]  l3, l4;

  logic        reg_wr, reg_rd;
  logic [5:0]  reg_idx;
  logic [31:0] reg_wdata, reg_rdata;

  vme_slave #(.NUM_REGS(3)) u_vme (
    .clk, .rst_n, .sw_base, .mod_code(MOD_PDC),
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_am, .vme_addr, .vme_wdata,
    .vme_rdata, .vme_dtack_n,
    .reg_wr, .reg_rd, .reg_idx, .reg_wdata, .reg_rdata
  );

  logic seq_ack, init_ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_init  <= 1'b0;
      req_calib <= 1'b0;
      mode1     <= TRIG_UNUSED;
      mode2     <= TRIG_UNUSED;
      dly       <= '0;
      l1 <= '0; l2 <= '0; l3 <= '0; l4 <= '0;
    end else begin
      if (seq_ack)  req_calib <= 1'b0;
      if (init_ack) req_init  <= 1'b0;
      if (reg_wr) begin
        unique case (reg_idx)
          6'd0: begin
            req_init  <= reg_wdata[28];
            req_calib <= reg_wdata[24];
            mode2     <= trig_mode_e'(reg_wdata[19:18]);
            mode1     <= trig_mode_e'(reg_wdata[17:16]);
            dly       <= reg_wdata[7:0];
          end
          6'd1: begin
            l1 <= reg_wdata[19:16];
            l2 <= reg_wdata[7:0];
          end
          6'd2: begin
            l3 <= reg_wdata[21:16];
            l4 <= reg_wdata[5:0];
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    unique case (reg_idx)
      6'd0:    reg_rdata = {3'b0, req_init, 3'b0, req_calib, 4'b0, mode2, mode1, 8'b0, dly};
      6'd1:    reg_rdata = {12'b0, l1, 8'b0, l2};
      6'd2:    reg_rdata = {10'b0, l3, 10'b0, l4};
      default: reg_rdata = '0;
    endcase
  end

  // ------------------------------------------------------- BCR reception
  logic bcr_fall;
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) bcr_fall <= 1'b0;
    else        bcr_fall <= bundle_in.bcr;
  end

  // ---------------------------------------------------- calibration path
  logic in_calib_req, seq_busy, seq_calib, seq_l1a, seq_veto;

  calib_sequencer u_seq (
    .clk, .rst_n,
    .start(req_calib || in_calib_req),
    .l1, .l2, .l3, .l4,
    .start_ack(seq_ack), .busy(seq_busy),
    .calib(seq_calib), .l1a(seq_l1a), .veto(seq_veto)
  );

  // -------------------------------------------------------- trigger path
  logic l1a_int, ext_vetoed, l1a_dly;

  pdc_trigger_logic u_trig (
    .clk, .rst_n, .trig1, .trig2, .mode1, .mode2,
    .calib_l1a(seq_l1a), .calib_veto(seq_veto),
    .l1a(l1a_int), .calib_req(in_calib_req), .ext_vetoed
  );

  l1a_delay_line #(.DW(8)) u_dly (
    .clk, .rst_n, .dly, .d(l1a_int), .q(l1a_dly)
  );

  // ----------------------------------------------------------- Init path
  logic init_win;

  init_generator #(.PERIOD(BCR_PER), .WIDTH(INIT_CYCLES), .LEAD(INIT_LEAD)) u_init (
    .clk, .rst_n, .bcr(bcr_fall), .cmd(req_init), .cmd_ack(init_ack), .init(init_win)
  );

  // --------------------------------------------------------- output stage
  logic calib_q, init_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_out <= 1'b0;
      calib_q  <= 1'b0;
      init_q   <= 1'b0;
    end else begin
      trig_out <= l1a_dly;
      calib_q  <= seq_calib;
      init_q   <= init_win;
    end
  end

  always_comb
    for (int i = 0; i < int'(N_OUT); i++) out[i] = '{calib: calib_q, init: init_q};

endmodule
