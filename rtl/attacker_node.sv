// attacker_node: one attacker node, N_BLOCK blocks of N_RO ring oscillators.
//
// The node has a single enable (its place in the staggered activation pattern) and
// receives the block mask chosen by software. Block b oscillates while node_en is high
// and blk_mask[b] is set, so software picks how many blocks per node take part and the
// attack controller picks when the node runs. `blk_en` reports the enables actually
// applied (it is what loads the supply) and `blk_probe` gives the output of the first
// oscillator of each block for observation. The gating is combinational: a block
// follows node_en within one gate delay. Nodes of 16 blocks of 500 oscillators follow
// the published design; the probe output is this design's addition.
module attacker_node #(
  parameter int unsigned N_BLOCK        = 16,
  parameter int unsigned N_RO           = 500,
  parameter int unsigned HALF_PERIOD_PS = 1000
) (
  input  logic               node_en,    // node activation from the attack controller
  input  logic [N_BLOCK-1:0] blk_mask,   // blocks selected by software
  output logic [N_BLOCK-1:0] blk_en,     // enable applied to each block
  output logic [N_BLOCK-1:0] blk_probe   // one oscillator output per block
);
  timeunit 1ns;
  timeprecision 1ps;

  assign blk_en = blk_mask & {N_BLOCK{node_en}};

  for (genvar b = 0; b < N_BLOCK; b++) begin : g_blk
    logic [N_RO-1:0] osc;
    ro_block #(.N_RO(N_RO), .HALF_PERIOD_PS(HALF_PERIOD_PS)) u_blk (.en(blk_en[b]), .osc(osc));
    assign blk_probe[b] = osc[0];
  end
endmodule
