// init_generator: produces the long Init window of the PDC module.
//
// The front-end Init pulse is one clock cycle long and must always coincide
// with a BCR pulse. The PDC cannot produce that pulse itself, because every
// Fan-out receives CLK and BCR through its own, separately delayed PDG
// output. Instead the PDC sends a 450 ns (INIT_CYCLES = 18 cycle) window that
// brackets the next BCR, and each Fan-out keeps only the BCR pulse that falls
// inside the window.
//
// To place the window, this block counts the BCR phase from the BCR it
// receives with its clock (from the PDG): the cycle after a BCR is phase 1,
// and the next BCR is due at phase PERIOD. After a command (`cmd`, the VME
// Init bit) and once a first BCR has been seen, the window opens at phase
// PERIOD - LEAD (LEAD cycles before the BCR) and stays open for WIDTH
// cycles; `cmd_ack` pulses in the cycle before it opens, which clears the
// VME bit.
//
// Choice of LEAD: the PDG channel delays (0..205 ns each) let a Fan-out's
// clock and BCR be up to 205 ns earlier or later than the PDC's. Counting the
// PDC's falling-edge BCR capture, its output register and the Fan-out's
// two-flop synchroniser, a Fan-out produces its Init when its channel delay
// minus the PDC channel delay lies in [50 - 25*LEAD, 500 - 25*LEAD) ns.
// LEAD = 11 makes that [-225, +225) ns, centred on the possible range.
//
// The 450 ns width, the 3564-cycle period and the rule that Init goes with
// BCR follow the specification; the window placement and LEAD are this
// design's choices.
`timescale 1ns/1ps
module init_generator
  import fsd_pkg::*;
#(
  parameter int unsigned PERIOD = BCR_PERIOD,
  parameter int unsigned WIDTH  = INIT_CYCLES,
  parameter int unsigned LEAD   = 11
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bcr,       // BCR pulse received from the PDG
  input  logic cmd,       // Init request (level, held until acknowledged)
  output logic cmd_ack,   // request obeyed (one cycle)
  output logic init       // Init window
);
  localparam int CW = $clog2(PERIOD + 1);
  localparam int WW = $clog2(WIDTH + 1);

  logic [CW-1:0] phase;
  logic          phase_ok;
  logic [WW-1:0] left;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase    <= '0;
      phase_ok <= 1'b0;
    end else if (bcr) begin
      phase    <= CW'(1);
      phase_ok <= 1'b1;
    end else if (phase != CW'(PERIOD)) begin
      phase <= phase + 1'b1;
    end
  end

  assign cmd_ack = cmd && phase_ok && (left == 0) && (phase == CW'(PERIOD - LEAD - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         left <= '0;
    else if (cmd_ack)   left <= WW'(WIDTH);
    else if (left != 0) left <= left - 1'b1;
  end

  assign init = (left != 0);

endmodule
