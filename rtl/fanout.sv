// fanout: the Fan-out module, eight front-end output bundles.
//
// Inputs are one PDG bundle (CLK, L1accept, BCR) and one PDC bundle (Calib,
// Init window). Each of the eight outputs carries CLK, L1accept, BCR, Init and
// Calib to one front-end card.
//   * L1accept and BCR change on the rising edge of the received CLK, so they
//     are captured on its falling edge and re-issued on the next rising edge.
//   * Init processing: the long Init window from the PDC is brought into the
//     CLK domain by a two-flop synchroniser. The one-cycle output Init is the
//     BCR pulse that falls inside the window, so Init always comes together
//     with a BCR.
//   * CLK, L1accept, BCR and Init of output n are delayed together by
//     DLYn x 2.5 ns (3-bit field, 0..17.5 ns).
//   * Calib is neither re-timed nor delayed; it reaches output n only when
//     its enable bit in the encal field is set.
// Output pulses lag the input bundle by one clock cycle plus the channel
// delay.
//
// Registers (VME offsets from XX000Y00, Y = Fan-out number 1..7 from the
// third rotary switch; all zero at reset; clocked by the received CLK):
//   00: [23:16] encal (bit 16 = output 1 .. bit 23 = output 8), [2:0] DLY1
//   04: [18:16] DLY2, [2:0] DLY3   08: [18:16] DLY4, [2:0] DLY5
//   0C: [18:16] DLY6, [2:0] DLY7   10: [18:16] DLY8
// Field layout, the Calib enables and the undelayed Calib follow the
// specification. Making Init from the window and BCR, and the falling-edge
// capture, are this design's choices.
`timescale 1ns/1ps
module fanout
  import fsd_pkg::*;
#(
  parameter int unsigned N_OUT = 8
) (
  input  logic        rst_n,
  input  pdg_bundle_t pdg_in,
  input  pdc_bundle_t pdc_in,
  output fe_bundle_t  out [N_OUT],
  // VME
  input  logic [7:0]  sw_base,
  input  logic [3:0]  sw_y,          // Fan-out number 1..7
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
  assign clk = pdg_in.clk;

  // ------------------------------------------------------------ registers
  logic [N_OUT-1:0] encal;
  logic [2:0]       dly [N_OUT];

  logic        reg_wr, reg_rd;
  logic [5:0]  reg_idx;
  logic [31:0] reg_wdata, reg_rdata;

  vme_slave #(.NUM_REGS(5)) u_vme (
    .clk, .rst_n, .sw_base, .mod_code(sw_y),
    .vme_as_n, .vme_ds_n, .vme_write_n, .vme_am, .vme_addr, .vme_wdata,
    .vme_rdata, .vme_dtack_n,
    .reg_wr, .reg_rd, .reg_idx, .reg_wdata, .reg_rdata
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      encal <= '0;
      for (int n = 0; n < int'(N_OUT); n++) dly[n] <= '0;
    end else if (reg_wr) begin
      if (reg_idx == 6'd0) encal <= reg_wdata[16 +: N_OUT];
      for (int n = 1; n <= int'(N_OUT); n++) begin
        if (32'(reg_idx) == n / 2) dly[n-1] <= (n % 2 == 0) ? reg_wdata[18:16] : reg_wdata[2:0];
      end
    end
  end

  always_comb begin
    reg_rdata = '0;
    if (reg_idx == 6'd0) reg_rdata[16 +: N_OUT] = encal;
    for (int n = 1; n <= int'(N_OUT); n++) begin
      if (32'(reg_idx) == n / 2) begin
        if (n % 2 == 0) reg_rdata[18:16] = dly[n-1];
        else            reg_rdata[2:0]   = dly[n-1];
      end
    end
  end

  // ----------------------------------------------------- re-timing, Init
  logic l1a_f, bcr_f, init_lvl, init_rise;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1a_f <= 1'b0;
      bcr_f <= 1'b0;
    end else begin
      l1a_f <= pdg_in.l1a;
      bcr_f <= pdg_in.bcr;
    end
  end

  sync_edge u_isync (.clk, .rst_n, .d(pdc_in.init), .level(init_lvl), .rise(init_rise));

  logic l1a_q, bcr_q, init_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1a_q  <= 1'b0;
      bcr_q  <= 1'b0;
      init_q <= 1'b0;
    end else begin
      l1a_q  <= l1a_f;
      bcr_q  <= bcr_f;
      init_q <= bcr_f && init_lvl;
    end
  end

  a_init_with_bcr: assert property (@(posedge clk) disable iff (!rst_n) init_q |-> bcr_q);

  // ------------------------------------------------------------- outputs
  for (genvar n = 0; n < int'(N_OUT); n++) begin : g_out
    logic [3:0] q;
    prog_delay_line #(.WIDTH(4), .CW(3), .STEP_PS(2500)) u_dl (
      .code(dly[n]), .d({clk, l1a_q, bcr_q, init_q}), .q
    );
    assign out[n] = '{clk: q[3], l1a: q[2], bcr: q[1], init: q[0],
                      calib: pdc_in.calib && encal[n]};
  end

endmodule
