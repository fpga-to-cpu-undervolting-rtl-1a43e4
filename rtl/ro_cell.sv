// ro_cell: behavioural model of one power-wasting ring oscillator (not synthesizable
// as written; on the FPGA it is a single LUT configured as a NAND whose output is fed
// back to one of its own inputs).
//
// The other NAND input is the enable `en`. While `en` is low the NAND output settles
// to 1 and the loop is still; while `en` is high the output inverts itself after every
// gate delay, so `osc` toggles with a period of 2*HALF_PERIOD_PS and burns dynamic
// power in the LUT and its routing. The structure (NAND with an enable closing the
// loop) is the one of the published attacker; the loop delay (HALF_PERIOD_PS, default
// 1 ns, i.e. a 500 MHz oscillation) is this model's assumption. A synthesis tool that
// ignores the delays infers a latch from this model; on the device the cell is placed as
// a LUT loop, not synthesized from this text.
module ro_cell #(
  parameter int unsigned HALF_PERIOD_PS = 1000   // delay around the loop, in picoseconds
) (
  input  logic en,   // NAND enable input
  output logic osc   // NAND output, fed back to its other input
);
  timeunit 1ns;
  timeprecision 1ps;

  localparam realtime LOOP_DELAY = HALF_PERIOD_PS * 1ps;

  initial osc = 1'b1;

  // NAND(en, osc) re-evaluated one loop delay after each change.
  always begin
    if (en || !osc) begin
      #(LOOP_DELAY);
      osc = ~(en & osc);
    end else begin
      @(en);
    end
  end
endmodule
