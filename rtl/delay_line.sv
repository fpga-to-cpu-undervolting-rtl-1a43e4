// delay_line: behavioural model of the tapped delay line of the voltage sensor (on the
// FPGA a chain of LUT or carry elements; the analog part of the sensor).
//
// Every change of `launch` ripples down N_TAPS elements; `taps[i]` follows `taps[i-1]`
// (taps[0] follows `launch`) after one element delay. The element delay grows as the
// supply drops, which is what turns a voltage into a distance travelled in one clock
// period. The model uses a simple alpha-power-like law evaluated when an edge enters an
// element:
//     d(V) = TAP_PS_NOM * (VNOM_MV - VT_MV) / (V - VT_MV)   picoseconds,  V = vdd_mv
// (V at or below VT_MV is treated as VT_MV + 1). With the defaults an edge covers
// about 10000/22 = 454 elements of a 10 ns (100 MHz) clock period at 850 mV and about
// 100 at 642 mV, the range of readings shown for the published sensor. The law and its
// constants are this model's assumptions; the published design only names the sensor.
module delay_line #(
  parameter int unsigned N_TAPS     = 640,
  parameter int unsigned TAP_PS_NOM = 22,    // element delay at the nominal supply, ps
  parameter int unsigned VNOM_MV    = 850,   // nominal supply, mV
  parameter int unsigned VT_MV      = 580    // supply at which the delay diverges, mV
) (
  input  logic              launch,   // edge injected at the head of the line
  input  logic [11:0]       vdd_mv,   // local supply voltage, millivolts
  output logic [N_TAPS-1:0] taps      // state of every element
);
  timeunit 1ns;
  timeprecision 1ps;

  function automatic realtime elem_delay(input logic [11:0] v);
    int unsigned over;
    over = (int'(v) > int'(VT_MV)) ? (int'(v) - VT_MV) : 1;
    return (real'(TAP_PS_NOM) * real'(VNOM_MV - VT_MV) / real'(over)) * 1ps;
  endfunction

  initial taps = '0;

  always @(launch) taps[0] <= #(elem_delay(vdd_mv)) launch;

  for (genvar i = 1; i < N_TAPS; i++) begin : g_tap
    always @(taps[i-1]) taps[i] <= #(elem_delay(vdd_mv)) taps[i-1];
  end
endmodule
