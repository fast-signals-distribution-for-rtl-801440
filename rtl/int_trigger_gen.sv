// int_trigger_gen: internal trigger source of the PDG module.
//
// Produces single-cycle trigger pulses at a fixed rate: one every DIV_SLOW
// cycles (100 Hz from the 40.08 MHz clock) when `fast` is 0, one every
// DIV_FAST cycles (100 kHz, rounded to 401 cycles) when `fast` is 1. The
// divider restarts whenever `fast` changes or `en` is low, so the first pulse
// comes a full period after the rate is selected. The two rates follow the
// PDG MUX field coding; the divider is this design's choice.
`timescale 1ns/1ps
module int_trigger_gen
  import fsd_pkg::*;
#(
  parameter int unsigned DIV_SLOW = TRIG_SLOW_DIV,
  parameter int unsigned DIV_FAST = TRIG_FAST_DIV
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  logic fast,
  output logic trig
);
  localparam int CW = $clog2(DIV_SLOW + 1);

  logic [CW-1:0] cnt;
  logic          fast_q;
  logic [CW-1:0] last;

  assign last = fast ? CW'(DIV_FAST - 1) : CW'(DIV_SLOW - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt    <= '0;
      fast_q <= 1'b0;
      trig   <= 1'b0;
    end else begin
      fast_q <= fast;
      trig   <= 1'b0;
      if (!en || fast != fast_q) begin
        cnt <= '0;
      end else if (cnt >= last) begin
        cnt  <= '0;
        trig <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
