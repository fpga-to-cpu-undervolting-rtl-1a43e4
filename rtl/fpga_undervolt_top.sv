// fpga_undervolt_top: programmable-logic side of an FPGA-to-CPU undervolting attack.
//
// The fabric is filled with ring oscillators grouped into N_NODES nodes of N_BLOCK
// blocks of N_RO oscillators. Switching them on together draws enough current from the
// supply the FPGA shares with the processor cores to pull that supply down, and an
// overclocked core then computes wrong results. Software on a processor core programs
// the attack through GPIO registers (cfg, trigger) and reads back what a delay-line
// voltage sensor saw during the attack (rd_addr / rd_data).
//
//   trigger, cfg --> attack_ctrl --node_en, blk_mask--> N_NODES x attacker_node
//                        | start, busy                    (blk_en = the current load)
//   vdd_pl_mv --> vsensor --reading--> storage_ctrl --> rd_data, sample_count
//
// Ports that stand for parts outside this logic: the GPIO side (trigger, cfg, rd_addr,
// rd_data, sample_count, overflow, busy, done, trig_ignored) connects to the PS
// through AXI GPIO cores; vdd_pl_mv is the supply voltage at the sensor and blk_en the
// set of running oscillator blocks, the two ends of the shared power network.
// Timing: 100 MHz clock. An attack starts one cycle after a trigger edge, node 0 rises
// one cycle later, and the recording holds one reading per cycle: duration readings in
// simultaneous mode, duration + N_NODES - 1 in staggered mode.
// The partitioning (attack control, nodes, sensor, storage) and all default sizes
// except the sensor length and memory depth follow the published setup.
module fpga_undervolt_top
  import undervolt_pkg::*;
#(
  parameter int unsigned N_NODES        = N_NODES_DEF,
  parameter int unsigned N_BLOCK        = N_BLOCK_DEF,
  parameter int unsigned N_RO           = N_RO_DEF,
  parameter int unsigned RO_HALF_PS     = 1000,
  parameter int unsigned N_TAPS         = N_TAPS_DEF,
  parameter int unsigned TAP_PS_NOM     = 22,
  parameter int unsigned DEPTH          = DEPTH_DEF
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // PS control (GPIO outputs of the processing system)
  input  logic                             trigger,
  input  attack_cfg_t                      cfg,
  input  logic [$clog2(DEPTH)-1:0]         rd_addr,
  // PS status and readout (GPIO inputs of the processing system)
  output logic                             busy,
  output logic                             done,
  output logic                             trig_ignored,
  output logic [SENSE_W-1:0]               rd_data,
  output logic [$clog2(DEPTH):0]           sample_count,
  output logic                             overflow,
  // Shared power network
  input  logic [11:0]                      vdd_pl_mv,
  output logic [N_NODES-1:0][N_BLOCK-1:0]  blk_en,
  // Observation
  output logic [N_NODES-1:0]               node_en,
  output logic [N_NODES-1:0][N_BLOCK-1:0]  blk_probe,
  output logic [SENSE_W-1:0]               reading
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [N_BLOCK-1:0] blk_mask;
  logic               start;
  logic               sense_valid;

  attack_ctrl #(.N_NODES(N_NODES), .N_BLOCK(N_BLOCK)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .trigger     (trigger),
    .cfg         (cfg),
    .node_en     (node_en),
    .blk_mask    (blk_mask),
    .start       (start),
    .busy        (busy),
    .done        (done),
    .trig_ignored(trig_ignored)
  );

  for (genvar n = 0; n < N_NODES; n++) begin : g_node
    attacker_node #(.N_BLOCK(N_BLOCK), .N_RO(N_RO), .HALF_PERIOD_PS(RO_HALF_PS)) u_node (
      .node_en  (node_en[n]),
      .blk_mask (blk_mask),
      .blk_en   (blk_en[n]),
      .blk_probe(blk_probe[n])
    );
  end

  vsensor #(.N_TAPS(N_TAPS), .TAP_PS_NOM(TAP_PS_NOM)) u_sensor (
    .clk    (clk),
    .rst_n  (rst_n),
    .vdd_mv (vdd_pl_mv),
    .reading(reading),
    .valid  (sense_valid)
  );

  storage_ctrl #(.DEPTH(DEPTH), .W(SENSE_W)) u_store (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .rec     (busy & sense_valid),
    .sample  (reading),
    .rd_addr (rd_addr),
    .rd_data (rd_data),
    .count   (sample_count),
    .overflow(overflow)
  );
endmodule
