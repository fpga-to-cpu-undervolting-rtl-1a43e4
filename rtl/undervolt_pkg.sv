// undervolt_pkg: constants and types shared by the power-waster attack design.
//
// The programmable-logic (PL) attacker is organised as N_NODES nodes, each made of
// N_BLOCK blocks of N_RO enable-gated ring oscillators (15 x 16 x 500 as built on a
// Zynq UltraScale+ XCZU3EG). Software on the processing system (PS) programs an attack
// through a handful of control values, collected here in attack_cfg_t:
//   n_blocks  - how many blocks of every node are switched on (0..16)
//   duration  - clock cycles during which the enable pattern runs (128..16384 swept)
//   period    - clock cycles between two activations of one node (10..2200 swept)
//   duty      - clock cycles per period during which the enable is high
//   mode      - all nodes together (simultaneous) or one more node per cycle (staggered)
// The node/block/RO counts and the swept ranges follow the published setup; the field
// widths are the smallest that hold those ranges and are this design's choice.
package undervolt_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  // Organisation of the attacker
  localparam int unsigned N_NODES_DEF = 15;
  localparam int unsigned N_BLOCK_DEF = 16;
  localparam int unsigned N_RO_DEF    = 500;

  // Control field widths (hold the swept ranges: duration <= 16384, period <= 2200)
  localparam int unsigned NBLK_W = 5;
  localparam int unsigned DUR_W  = 15;
  localparam int unsigned PER_W  = 12;
  localparam int unsigned DUTY_W = 12;

  // Voltage sensor
  localparam int unsigned N_TAPS_DEF = 640;  // delay-line length (readings up to ~600)
  localparam int unsigned SENSE_W    = 10;   // width of one sensor reading

  // Sample storage: one reading per cycle of the longest swept attack, staggered
  // (16384 cycles plus the N_NODES-1 cycles in which the later nodes finish)
  localparam int unsigned DEPTH_DEF = 16384 + N_NODES_DEF - 1;

  typedef enum logic {
    ACT_SIMULTANEOUS = 1'b0,
    ACT_STAGGERED    = 1'b1
  } act_mode_e;

  typedef struct packed {
    logic [NBLK_W-1:0] n_blocks;
    logic [DUR_W-1:0]  duration;
    logic [PER_W-1:0]  period;
    logic [DUTY_W-1:0] duty;
    act_mode_e         mode;
  } attack_cfg_t;

endpackage
