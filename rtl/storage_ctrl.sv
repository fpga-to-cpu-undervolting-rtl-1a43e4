// storage_ctrl: records the voltage-sensor readings taken during an attack so that
// software can read them back afterwards.
//
// `start` (the attack controller's accept pulse) rewinds the write pointer. From the
// next cycle on, every cycle in which `rec` is high writes the current `sample` to the
// next word of a sample_ram, until DEPTH words are stored; a sample arriving when the
// memory is full is dropped and sets `overflow` until the next start. `count` is the
// number of words stored by the last attack. The read side is a plain address/data
// pair for a GPIO: `rd_data` holds the word at `rd_addr` one cycle after the address.
// Recording one reading per cycle during the attack follows the published setup; the
// pointer scheme, overflow flag and depth (one word per cycle of the longest swept
// attack, 16384 cycles, plus its 14-cycle stagger tail: 16398 words) are this design's
// choices.
module storage_ctrl
  import undervolt_pkg::*;
#(
  parameter int unsigned DEPTH = DEPTH_DEF,
  parameter int unsigned W     = SENSE_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,     // rewind: a new attack begins
  input  logic                     rec,       // store `sample` this cycle
  input  logic [W-1:0]             sample,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [W-1:0]             rd_data,
  output logic [$clog2(DEPTH):0]   count,     // words stored since the last start
  output logic                     overflow   // a sample was dropped because memory was full
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned AW = $clog2(DEPTH);

  logic [AW:0] wr_ptr;
  wire         full = (wr_ptr == (AW+1)'(DEPTH));
  wire         we   = rec & ~start & ~full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      overflow <= 1'b0;
    end else if (start) begin
      wr_ptr   <= '0;
      overflow <= 1'b0;
    end else if (rec) begin
      if (full) overflow <= 1'b1;
      else      wr_ptr   <= wr_ptr + 1'b1;
    end
  end

  sample_ram #(.DEPTH(DEPTH), .W(W)) u_ram (
    .clk  (clk),
    .we   (we),
    .waddr(wr_ptr[AW-1:0]),
    .wdata(sample),
    .raddr(rd_addr),
    .rdata(rd_data)
  );

  assign count = wr_ptr;

  a_ptr_in_range: assert property (@(posedge clk) disable iff (!rst_n) wr_ptr <= (AW+1)'(DEPTH));
endmodule
