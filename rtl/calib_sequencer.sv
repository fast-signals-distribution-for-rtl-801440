// calib_sequencer: calibration sequence generator of the PDC module.
//
// A start request (VME command or an external input programmed for
// calibration) launches one sequence. The sequence counts clock cycles from
// the cycle after the request (count 0) and produces, relative to count 0:
//   * Calib    high from count L4 for L2 x 400 ns (L2 x CALIB_UNIT cycles);
//   * veto     high from count L3 to count L3 + 2*L1 inclusive (2*L1+1 cycles);
//   * L1accept a single-cycle pulse at count L3 + L1, the middle of the veto.
// L1 to L4 are sampled when the sequence starts, so reprogramming a running
// sequence has no effect on it. The sequence is over when both Calib and the
// veto have ended; requests arriving while it runs are ignored (start_ack is
// only given for an accepted request).
//
// Field widths (L1 4 bits, L2 8 bits, L3 and L4 6 bits) and units (25 ns
// steps, 400 ns for L2) follow the PDC register description; the one-cycle
// start latency, the inclusive veto ends and the refusal of overlapping
// requests are this design's choices. With L2 = 0 no Calib pulse is produced.
// Outputs are combinational decodes of the cycle counter; the PDC registers
// them before they leave the module.
`timescale 1ns/1ps
module calib_sequencer
  import fsd_pkg::*;
#(
  parameter int unsigned UNIT = CALIB_UNIT   // cycles per L2 step (400 ns)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,        // request, single cycle or level
  input  logic [3:0] l1,           // half veto width, 25 ns units
  input  logic [7:0] l2,           // Calib width, 400 ns units
  input  logic [5:0] l3,           // delay before the veto, 25 ns units
  input  logic [5:0] l4,           // delay before Calib, 25 ns units
  output logic       start_ack,    // request accepted (one cycle)
  output logic       busy,
  output logic       calib,
  output logic       l1a,
  output logic       veto
);

  localparam int CW = 16;

  logic [CW-1:0] cnt;
  logic [CW-1:0] calib_beg, calib_end, veto_beg, veto_last, l1a_at, seq_end;
  logic [3:0]    l1_q;
  logic [7:0]    l2_q;
  logic [5:0]    l3_q, l4_q;

  always_comb begin
    calib_beg = CW'(l4_q);
    calib_end = CW'(l4_q) + CW'(l2_q) * CW'(UNIT);
    veto_beg  = CW'(l3_q);
    veto_last = CW'(l3_q) + 2 * CW'(l1_q);
    l1a_at    = CW'(l3_q) + CW'(l1_q);
    seq_end   = (calib_end > veto_last + 1) ? calib_end : veto_last + 1;
  end

  assign start_ack = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cnt  <= '0;
      l1_q <= '0;
      l2_q <= '0;
      l3_q <= '0;
      l4_q <= '0;
    end else if (start_ack) begin
      busy <= 1'b1;
      cnt  <= '0;
      l1_q <= l1;
      l2_q <= l2;
      l3_q <= l3;
      l4_q <= l4;
    end else if (busy) begin
      cnt <= cnt + 1'b1;
      if (cnt + 1'b1 >= seq_end) busy <= 1'b0;
    end
  end

  assign calib = busy && (cnt >= calib_beg) && (cnt < calib_end);
  assign veto  = busy && (cnt >= veto_beg) && (cnt <= veto_last);
  assign l1a   = busy && (cnt == l1a_at);

  a_l1a_in_veto: assert property (@(posedge clk) disable iff (!rst_n) l1a |-> veto);

endmodule
