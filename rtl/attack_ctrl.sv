// attack_ctrl: turns the attack parameters written by the processing system into the
// enable signals of the attacker nodes.
//
// A rising edge on `trigger` while idle starts an attack: the configuration is latched,
// a duration counter runs for cfg.duration cycles and a phase counter wraps every
// cfg.period cycles. The base enable is high while the phase is below cfg.duty, so the
// duty cycle is a number of clock cycles within one period (38.57 % of 140 = 54 cycles).
// The base enable is registered into a shift register with one stage per node. In
// staggered mode node i sees the base pattern i+1 cycles after the counters (one more
// node switches on, and later off, every cycle); in simultaneous mode every node sees
// stage 0. `blk_mask` is a thermometer code with the lowest cfg.n_blocks bits set: each
// node gates it with its own enable.
//
// Timing: `start` pulses in the cycle after the trigger edge is seen; node 0 rises one
// cycle after that. `busy` covers the duration plus the tail in which the last node is
// still running (N_NODES cycles staggered, one cycle simultaneous); `done` pulses once
// when busy falls. Triggers during busy are ignored (`trig_ignored` pulses).
// The parameters, period/duty semantics and the staggering by one node per cycle follow
// the published attack; the shift-register realisation, the tail length, the behaviour
// for period 0 (phase counter wraps at 2**PER_W) and duration 0 (no attack) are this
// design's choices.
module attack_ctrl
  import undervolt_pkg::*;
#(
  parameter int unsigned N_NODES = N_NODES_DEF,
  parameter int unsigned N_BLOCK = N_BLOCK_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                trigger,      // level from the PS, rising edge starts an attack
  input  attack_cfg_t         cfg,          // attack parameters, sampled at the trigger edge
  output logic [N_NODES-1:0]  node_en,      // enable of each attacker node
  output logic [N_BLOCK-1:0]  blk_mask,     // which blocks of a node take part
  output logic                start,        // one-cycle pulse: attack accepted
  output logic                busy,         // attack (including stagger tail) in progress
  output logic                done,         // one-cycle pulse at the end of an attack
  output logic                trig_ignored  // one-cycle pulse: trigger edge while busy
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned TAIL_W = $clog2(N_NODES + 1);

  attack_cfg_t       cfg_q;
  logic              trig_q;
  logic              active;
  logic [DUR_W-1:0]  t_cnt;
  logic [PER_W-1:0]  phase;
  logic [TAIL_W-1:0] tail;
  logic [N_NODES-1:0] stag_sr;
  logic              busy_q;

  wire trig_edge = trigger & ~trig_q;
  wire accept    = trig_edge & ~busy & (cfg.duration != '0);
  wire base_en   = active & (phase < PER_W'(cfg_q.duty));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig_q       <= 1'b0;
      cfg_q        <= '0;
      active       <= 1'b0;
      t_cnt        <= '0;
      phase        <= '0;
      tail         <= '0;
      stag_sr      <= '0;
      busy_q       <= 1'b0;
      start        <= 1'b0;
      trig_ignored <= 1'b0;
    end else begin
      trig_q       <= trigger;
      busy_q       <= busy;
      start        <= accept;
      trig_ignored <= trig_edge & busy;
      stag_sr      <= {stag_sr[N_NODES-2:0], base_en};
      if (accept) begin
        stag_sr <= '0;   // drop what a simultaneous attack left in the later stages
        cfg_q  <= cfg;
        active <= 1'b1;
        t_cnt  <= '0;
        phase  <= '0;
        tail   <= '0;
      end else if (active) begin
        t_cnt <= t_cnt + 1'b1;
        phase <= (phase == cfg_q.period - 1'b1) ? '0 : phase + 1'b1;
        if (t_cnt == cfg_q.duration - 1'b1) begin
          active <= 1'b0;
          tail   <= (cfg_q.mode == ACT_STAGGERED) ? TAIL_W'(N_NODES) : TAIL_W'(1);
        end
      end else if (tail != '0) begin
        tail <= tail - 1'b1;
      end
    end
  end

  assign busy = active | (tail != '0);
  assign done = busy_q & ~busy;

  always_comb begin
    for (int unsigned i = 0; i < N_NODES; i++)
      node_en[i] = (cfg_q.mode == ACT_STAGGERED) ? stag_sr[i] : stag_sr[0];
    for (int unsigned b = 0; b < N_BLOCK; b++)
      blk_mask[b] = (b < 32'(cfg_q.n_blocks));
  end

  // No node may be enabled outside an attack.
  a_en_in_attack: assert property (@(posedge clk) disable iff (!rst_n) (node_en != '0) |-> busy_q || busy);
  // The attack pattern needs a period of at least one cycle.
  a_period_nonzero: assert property (@(posedge clk) disable iff (!rst_n) accept |-> cfg.period != '0);
endmodule
