// ro_block: one block of the attacker, N_RO ring oscillators that share one enable.
//
// A block is the unit software switches on or off: all its oscillators see the same
// enable, so enabling a block adds N_RO oscillating LUTs (500 in the published setup)
// to the load on the shared supply at once. The oscillator outputs are kept as ports so
// that no oscillator is left without a sink; on the FPGA the cells are additionally
// kept from being optimised away by placement constraints. Timing: the oscillators
// start within one loop delay of `en` rising and stop within one loop delay of it
// falling. The grouping into blocks of 500 follows the published design; the per-cell
// loop delay is an assumption of the oscillator model.
module ro_block #(
  parameter int unsigned N_RO           = 500,
  parameter int unsigned HALF_PERIOD_PS = 1000
) (
  input  logic            en,   // block enable
  output logic [N_RO-1:0] osc   // outputs of the individual oscillators
);
  timeunit 1ns;
  timeprecision 1ps;

  for (genvar r = 0; r < N_RO; r++) begin : g_ro
    ro_cell #(.HALF_PERIOD_PS(HALF_PERIOD_PS)) u_ro (.en(en), .osc(osc[r]));
  end
endmodule
