// vme_slave: A32/D32 VME slave front end shared by the PDC, PDG and Fan-out
// modules.
//
// A module answers at base address XX000M00, where XX (A31..A24) is set on two
// rotary switches, A23..A12 are zero (all modules share a 4K space at the
// bottom of a 16M segment) and M (A11..A8) is the module code: 0 for the PDG,
// the Fan-out number 1..7 for a Fan-out, 8 for the PDC. Address bits A7..A2
// select a 32-bit register; only the four extended (A32) address modifiers
// 0E, 0D, 0A and 09 are answered.
//
// The VME strobes are asynchronous to the module clock. AS* and DS* are
// brought in through two-flop synchronisers; once both are seen low and the
// address matches, the slave issues a single-cycle reg_wr or reg_rd strobe to
// the register file, captures the read data on the next cycle and pulls
// DTACK* low. DTACK* is released once DS* is seen high again. Address, data,
// WRITE* and AM are taken as stable while the strobes are asserted, as the
// VME protocol requires. Latency from DS* low to DTACK* low: 4 clock cycles.
// While not acknowledging, vme_rdata is all zero, so several slaves can share
// a read bus by OR-ing their outputs (no tri-states); DTACK* likewise by AND.
//
// The handshake is the usual VME slave sequence; the synchroniser depth and
// the OR-combined read bus are choices of this design.
`timescale 1ns/1ps
module vme_slave
  import fsd_pkg::*;
#(
  parameter int unsigned NUM_REGS = 5
) (
  input  logic        clk,
  input  logic        rst_n,
  // switches
  input  logic [7:0]  sw_base,      // XX rotary switches (A31..A24)
  input  logic [3:0]  mod_code,     // A11..A8 code of this module
  // VME bus (active-low strobes)
  input  logic        vme_as_n,
  input  logic        vme_ds_n,
  input  logic        vme_write_n,
  input  logic [5:0]  vme_am,
  input  logic [31:0] vme_addr,
  input  logic [31:0] vme_wdata,
  output logic [31:0] vme_rdata,
  output logic        vme_dtack_n,
  // register file side
  output logic        reg_wr,
  output logic        reg_rd,
  output logic [5:0]  reg_idx,      // register number = A7..A2
  output logic [31:0] reg_wdata,
  input  logic [31:0] reg_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_ACCESS, S_ACK} state_e;
  state_e state;

  logic [1:0] as_sync, ds_sync;
  logic       as_act, ds_act, hit;
  logic [31:0] rdata_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      as_sync <= 2'b11;
      ds_sync <= 2'b11;
    end else begin
      as_sync <= {as_sync[0], vme_as_n};
      ds_sync <= {ds_sync[0], vme_ds_n};
    end
  end

  assign as_act = !as_sync[1];
  assign ds_act = !ds_sync[1];

  assign hit = am_ok(vme_am) &&
               (vme_addr[31:24] == sw_base) &&
               (vme_addr[23:12] == 12'h000) &&
               (vme_addr[11:8]  == mod_code) &&
               (vme_addr[1:0]   == 2'b00) &&
               (32'(vme_addr[7:2]) < NUM_REGS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      reg_wr  <= 1'b0;
      reg_rd  <= 1'b0;
      reg_idx <= '0;
      reg_wdata <= '0;
      rdata_q <= '0;
    end else begin
      reg_wr <= 1'b0;
      reg_rd <= 1'b0;
      unique case (state)
        S_IDLE: if (as_act && ds_act && hit) begin
          state     <= S_ACCESS;
          reg_idx   <= vme_addr[7:2];
          reg_wdata <= vme_wdata;
          reg_wr    <= !vme_write_n;
          reg_rd    <= vme_write_n;
        end
        S_ACCESS: begin
          rdata_q <= vme_write_n ? reg_rdata : 32'h0;
          state   <= S_ACK;
        end
        S_ACK: if (!ds_act) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign vme_dtack_n = (state != S_ACK);
  assign vme_rdata   = (state == S_ACK) ? rdata_q : 32'h0;

  // A register strobe is a single cycle and never both read and write.
  a_one_strobe: assert property (@(posedge clk) disable iff (!rst_n) !(reg_wr && reg_rd));

endmodule
