// pdn_model: first-order behavioural model of the shared supply, for testbenches only.
// The supply relaxes each clock cycle towards VNOM minus a drop proportional to the
// number of running oscillator blocks:
//     target = VNOM_UV - n_active * DROP_UV_PER_BLOCK
//     v     <= v + (target - v) / TAU
// With 240 blocks and 870 uV per block the target is about 641 mV, near the minimum
// reported for the programmable logic under the chosen attack. The constants are
// illustrative, not a model of a real board (no resonance, no regulator loop).
module pdn_model #(
  parameter int VNOM_UV           = 850000,
  parameter int DROP_UV_PER_BLOCK = 870,
  parameter int TAU               = 6
) (
  input  logic        clk,
  input  int          n_active,   // running oscillator blocks
  output logic [11:0] vdd_mv      // supply voltage, millivolts
);
  timeunit 1ns;
  timeprecision 1ps;

  int v_uv = VNOM_UV;

  always @(posedge clk) v_uv <= v_uv + (VNOM_UV - n_active * DROP_UV_PER_BLOCK - v_uv) / TAU;

  assign vdd_mv = 12'(v_uv / 1000);
endmodule
