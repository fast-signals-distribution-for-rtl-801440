// l1a_delay_line: the large programmable L1accept delay of the PDC module.
//
// Delays a single-bit signal by `dly` whole clock cycles, 0 to 2**DW-1
// (255 cycles, about 6.4 us at 40.08 MHz, for the 8-bit DLY field). The
// signal enters a shift register of 2**DW-1 flops and the output tap is
// selected by `dly`; dly = 0 passes the input straight through, so the
// delay from `d` to `q` is exactly `dly` cycles. Changing `dly` takes effect
// immediately and may drop or repeat pulses already in the line.
//
// Step size and range follow the PDC DLY field; the shift-register
// implementation is this design's choice.
`timescale 1ns/1ps
module l1a_delay_line #(
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] dly,
  input  logic          d,
  output logic          q
);
  localparam int unsigned DEPTH = (1 << DW) - 1;

  logic [DEPTH-1:0] sr;   // sr[i] holds d delayed by i+1 cycles

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else        sr <= {sr[DEPTH-2:0], d};
  end

  assign q = (dly == 0) ? d : sr[dly - 1'b1];
endmodule
