// sync_edge: brings an asynchronous level into the clock domain through a
// two-flop synchroniser and reports its rising edges as single-cycle pulses.
// Outputs: `level` (synchronised level, 2 cycles after the input) and `rise`
// (high for the one cycle in which `level` goes from 0 to 1).
`timescale 1ns/1ps
module sync_edge (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic level,
  output logic rise
);
  logic [2:0] sh;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sh <= '0;
    else        sh <= {sh[1:0], d};
  end
  assign level = sh[1];
  assign rise  = sh[1] && !sh[2];
endmodule
