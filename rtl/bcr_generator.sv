// bcr_generator: internal bunch-counter-reset source of the PDG module.
//
// A free-running bunch counter counts 0 .. PERIOD-1 (3564 bunch positions of
// the LHC orbit) on every clock cycle. `bcr` is high for the single cycle in
// which the counter is 0, i.e. one pulse every PERIOD cycles; the first one
// comes in the first cycle after reset. `bcnt` is the current bunch number.
// The period follows the specification; the counter is this design's choice.
`timescale 1ns/1ps
module bcr_generator
  import fsd_pkg::*;
#(
  parameter int unsigned PERIOD = BCR_PERIOD
) (
  input  logic                      clk,
  input  logic                      rst_n,
  output logic                      bcr,
  output logic [$clog2(PERIOD)-1:0] bcnt
);
  localparam int CW = $clog2(PERIOD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        bcnt <= '0;
    else if (bcnt == CW'(PERIOD - 1))  bcnt <= '0;
    else                               bcnt <= bcnt + 1'b1;
  end

  assign bcr = (bcnt == '0);
endmodule
