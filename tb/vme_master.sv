// vme_master: behavioural VME bus master used by the testbenches.
//
// Not part of the design: it stands for the crate's VME processor. The tasks
// perform single A32/D32 cycles with the usual strobe sequence (address and
// AM set up, AS* low, DS* low, wait for DTACK*, release strobes, wait for
// DTACK* to go high). A cycle that gets no DTACK* within `TIMEOUT_NS` is
// ended and reported as not acknowledged (a bus error).
`timescale 1ns/1ps
module vme_master #(
  parameter int unsigned TIMEOUT_NS = 2000
) (
  output logic        as_n,
  output logic        ds_n,
  output logic        write_n,
  output logic [5:0]  am,
  output logic [31:0] addr,
  output logic [31:0] wdata,
  input  logic [31:0] rdata,
  input  logic        dtack_n
);
  initial begin
    as_n = 1'b1; ds_n = 1'b1; write_n = 1'b1; am = 6'h09; addr = '0; wdata = '0;
  end

  // One bus cycle; `ack` tells whether DTACK* came, `rd` holds the read data.
  task automatic cycle(input logic wr, input logic [31:0] a, input logic [31:0] d,
                       input logic [5:0] amod, output logic [31:0] rd, output logic ack);
    int waited;
    addr = a; am = amod; write_n = !wr; wdata = d;
    #10 as_n = 1'b0;
    #10 ds_n = 1'b0;
    waited = 0;
    while (dtack_n && waited < int'(TIMEOUT_NS)) begin
      #5 waited += 5;
    end
    ack = !dtack_n;
    rd  = rdata;
    #5 ds_n = 1'b1; as_n = 1'b1;
    waited = 0;
    while (!dtack_n && waited < int'(TIMEOUT_NS)) begin
      #5 waited += 5;
    end
    #20;
  endtask

  task automatic write(input logic [31:0] a, input logic [31:0] d, output logic ack);
    logic [31:0] rd;
    cycle(1'b1, a, d, 6'h09, rd, ack);
  endtask

  task automatic read(input logic [31:0] a, output logic [31:0] rd, output logic ack);
    cycle(1'b0, a, 32'h0, 6'h0D, rd, ack);
  endtask
endmodule
