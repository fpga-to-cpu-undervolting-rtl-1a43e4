// sample_ram: on-chip memory for sensor samples, one write port and one read port.
//
// A simple dual-port RAM of DEPTH words of W bits in the style that maps onto FPGA
// block RAM: the write happens at the clock edge when `we` is high, and the read is
// synchronous, so `rdata` shows the word at `raddr` one cycle after the address is
// presented. Reading and writing one address in the same cycle returns the old word.
// Storing the readings in on-chip memory follows the published setup; the port
// arrangement and read latency are this design's choices. Contents are not reset.
module sample_ram
  import undervolt_pkg::*;
#(
  parameter int unsigned DEPTH = DEPTH_DEF,
  parameter int unsigned W     = SENSE_W
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [W-1:0]             rdata
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
