// vsensor: delay-line based voltage sensor. Each clock cycle it measures how far an
// edge travels down a delay line in one clock period; a lower supply slows the line,
// so a lower reading means a deeper voltage drop.
//
// A launch flip-flop toggles every cycle and feeds the delay line. One cycle later the
// capture register samples all taps together with the value that was launched. The
// encoder counts how many taps, starting from the head of the line, already hold the
// launched value: that run length is the reading. Counting the run from the head (and
// not the ones in the whole word) keeps the reading correct when a slow line still
// holds older edges further down. Because the launched value alternates, no reset of
// the line is needed between measurements.
// Timing: one reading per cycle; `reading` refers to the edge launched three clock
// edges earlier (launch, capture, encode). `reading` saturates at N_TAPS.
// A delay-line sensor read out into a count follows the published setup; the toggling
// launch, the run-length encoder and the line length (640) are this design's choices.
module vsensor
  import undervolt_pkg::*;
#(
  parameter int unsigned N_TAPS     = N_TAPS_DEF,
  parameter int unsigned TAP_PS_NOM = 22
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [11:0]        vdd_mv,    // supply seen by the delay line, millivolts
  output logic [SENSE_W-1:0] reading,   // taps reached in one clock period
  output logic               valid      // reading holds a measurement
);
  timeunit 1ns;
  timeprecision 1ps;

  logic              launch;
  logic [N_TAPS-1:0] taps;
  logic [N_TAPS-1:0] cap;
  logic              cap_pol;
  logic [1:0]        vld_sr;
  logic [SENSE_W-1:0] run_len;

  delay_line #(.N_TAPS(N_TAPS), .TAP_PS_NOM(TAP_PS_NOM)) u_line (
    .launch(launch),
    .vdd_mv(vdd_mv),
    .taps  (taps)
  );

  // Length of the run of taps, from the head, that equal the launched value.
  always_comb begin
    logic stop;
    run_len = '0;
    stop    = 1'b0;
    for (int unsigned i = 0; i < N_TAPS; i++) begin
      if (!stop && cap[i] == cap_pol) run_len = run_len + 1'b1;
      else                            stop    = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      launch  <= 1'b0;
      cap     <= '0;
      cap_pol <= 1'b0;
      vld_sr  <= '0;
      reading <= '0;
    end else begin
      launch  <= ~launch;
      cap     <= taps;
      cap_pol <= launch;
      vld_sr  <= {vld_sr[0], 1'b1};
      reading <= run_len;
    end
  end

  assign valid = vld_sr[1];
endmodule
