// pdg: the PDG (programmable delay generator) module.
//
// The PDG is the source of CLK, BCR and the distributed L1accept, and a first
// level of fan-out: eight output bundles (CLK, L1accept, BCR), each with its
// own programmable fine delay.
//   * Clock: the internal 40.08 MHz oscillator or the external NIM clock,
//     chosen by MUX bit 3. The clock multiplexer is a plain select; it is
//     meant to be switched while the system is idle.
//   * Trigger (MUX bits 1..0): 00 internal 100 Hz, 01 internal 100 kHz,
//     11 external NIM trigger (in the system: the PDC trigger output); code
//     10 is not defined and gives no trigger. The external trigger is already
//     synchronous to a delayed copy of this clock, so it is sampled by a
//     single flop on the non-delayed clock: no jitter is added, but a channel
//     delay that puts the PDC edge on this clock edge gives metastability.
//   * BCR (MUX bit 2): 0 internal, one pulse every 3564 cycles; 1 external
//     NIM BCR, synchronised and edge-detected.
//   * Output n (1..8) is delayed by DLYn x 50 ps (12-bit field, 0..~205 ns).
// Output pulses are one cycle wide and change on the rising edge of the
// non-delayed clock; the delay line shifts CLK and pulses together.
//
// The register file runs on the internal oscillator clock so that it stays
// reachable whatever the clock selection. At reset MUX takes the value of the
// front-panel thumbwheel; all delays reset to 0. MUX crosses into the
// selected-clock domain through two-flop synchronisers.
// Registers (VME offsets from XX000000):
//   00: [19:16] MUX, [11:0] DLY1      04: [27:16] DLY2, [11:0] DLY3
//   08: [27:16] DLY4, [11:0] DLY5     0C: [27:16] DLY6, [11:0] DLY7
//   10: [27:16] DLY8
// Field layout and codings follow the specification. The thumbwheel loading
// only MUX, the clock domains and the synchronisers are this design's choices.
`timescale 1ns/1ps
module pdg
  import fsd_pkg::*;
#(
  parameter int unsigned N_OUT    = 8,
  parameter int unsigned BCR_PER  = BCR_PERIOD,
  parameter int unsigned DIV_SLOW = TRIG_SLOW_DIV,
  parameter int unsigned DIV_FAST = TRIG_FAST_DIV
) (
  input  logic        rst_n,
  input  logic        int_clk,       // internal 40.08 MHz oscillator
  input  logic        ext_clk,       // external NIM clock
  input  logic        ext_trig,      // external NIM trigger
  input  logic        ext_bcr,       // external NIM BCR
  input  logic [3:0]  thumbwheel,    // power-up MUX configuration
  output pdg_bundle_t out [N_OUT],
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

  // ------------------------------------------- registers (int_clk domain)
  logic [3:0]  mux;
  logic [11:0] dly [N_OUT];

  logic        reg_wr, reg_rd;
  logic [5:0]  reg_idx;
  logic [31:0] reg_wdata, reg_rdata;

  vme_slave #(.NUM_REGS(5)) u_vme (
    .clk(int_clk), .rst_n, .sw_base, .mod_code(MOD_PDG),
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_am, .vme_addr, .vme_wdata,
    .vme_rdata, .vme_dtack_n,
    .reg_wr, .reg_rd, .reg_idx, .reg_wdata, .reg_rdata
  );

  // DLYn sits in register n/2: high half ([27:16]) for even n, low half for odd n.
  always_ff @(posedge int_clk or negedge rst_n) begin
    if (!rst_n) begin
      mux <= thumbwheel;
      for (int n = 0; n < int'(N_OUT); n++) dly[n] <= '0;
    end else if (reg_wr) begin
      if (reg_idx == 6'd0) mux <= reg_wdata[19:16];
      for (int n = 1; n <= int'(N_OUT); n++) begin
        if (32'(reg_idx) == n / 2) dly[n-1] <= (n % 2 == 0) ? reg_wdata[27:16] : reg_wdata[11:0];
      end
    end
  end

  always_comb begin
    reg_rdata = '0;
    if (reg_idx == 6'd0) reg_rdata[19:16] = mux;
    for (int n = 1; n <= int'(N_OUT); n++) begin
      if (32'(reg_idx) == n / 2) begin
        if (n % 2 == 0) reg_rdata[27:16] = dly[n-1];
        else            reg_rdata[11:0]  = dly[n-1];
      end
    end
  end

  // ------------------------------------------------------ clock selection
  logic clk;
  assign clk = mux[3] ? ext_clk : int_clk;

  // ------------------------------------------- selected-clock domain logic
  logic [2:0] mux_s1, mux_s2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mux_s1 <= thumbwheel[2:0];
      mux_s2 <= thumbwheel[2:0];
    end else begin
      mux_s1 <= mux[2:0];
      mux_s2 <= mux_s1;
    end
  end

  trig_src_e trig_src;
  logic      ext_bcr_sel;
  assign trig_src    = trig_src_e'(mux_s2[1:0]);
  assign ext_bcr_sel = mux_s2[2];

  logic int_trig, int_bcr, ext_bcr_rise, ext_bcr_lvl, ext_trig_q;
  logic [$clog2(BCR_PER)-1:0] bcnt;

  int_trigger_gen #(.DIV_SLOW(DIV_SLOW), .DIV_FAST(DIV_FAST)) u_itrig (
    .clk, .rst_n,
    .en(trig_src == SRC_INT_100HZ || trig_src == SRC_INT_100KHZ),
    .fast(trig_src == SRC_INT_100KHZ),
    .trig(int_trig)
  );

  bcr_generator #(.PERIOD(BCR_PER)) u_bcr (.clk, .rst_n, .bcr(int_bcr), .bcnt);

  sync_edge u_ebcr (.clk, .rst_n, .d(ext_bcr), .level(ext_bcr_lvl), .rise(ext_bcr_rise));

  // Single-flop resynchronisation of the (already synchronous) trigger.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ext_trig_q <= 1'b0;
    else        ext_trig_q <= ext_trig;
  end

  logic l1a_q, bcr_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1a_q <= 1'b0;
      bcr_q <= 1'b0;
    end else begin
      unique case (trig_src)
        SRC_INT_100HZ, SRC_INT_100KHZ: l1a_q <= int_trig;
        SRC_EXTERNAL:                  l1a_q <= ext_trig_q;
        default:                       l1a_q <= 1'b0;
      endcase
      bcr_q <= ext_bcr_sel ? ext_bcr_rise : int_bcr;
    end
  end

  // --------------------------------------------------- delayed outputs
  logic [2:0] dq [N_OUT];
  for (genvar n = 0; n < int'(N_OUT); n++) begin : g_out
    prog_delay_line #(.WIDTH(3), .CW(12), .STEP_PS(50)) u_dl (
      .code(dly[n]), .d({clk, l1a_q, bcr_q}), .q(dq[n])
    );
  end

  always_comb
    for (int n = 0; n < int'(N_OUT); n++) out[n] = '{clk: dq[n][2], l1a: dq[n][1], bcr: dq[n][0]};

endmodule
