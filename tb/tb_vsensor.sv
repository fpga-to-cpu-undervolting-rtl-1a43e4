// tb_vsensor: holds the sensor supply at several voltages and checks every reading
// against the number of delay elements an edge crosses in one 10 ns clock period,
// floor(10000 ps / d(V)) with d(V) = 22 ps * 270 / (V - 580 mV), capped at the line
// length. The low voltages leave older edges inside the line, so a reading that
// counted all matching taps instead of the run from the head would fail here. Also
// checks the latency: after a voltage step the reading settles within 4 cycles.
module tb_vsensor;
  import undervolt_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 640;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [11:0] vdd = 12'd850;
  logic [SENSE_W-1:0] reading;
  logic valid;

  vsensor #(.N_TAPS(N)) dut (.clk(clk), .rst_n(rst_n), .vdd_mv(vdd), .reading(reading), .valid(valid));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic hold(input int v, input int d_ps);
    int exp;
    exp = 10000 / d_ps;
    if (exp > N) exp = N;
    @(negedge clk) vdd = 12'(v);
    repeat (4) @(negedge clk);
    repeat (20) begin
      check(valid && reading == SENSE_W'(exp), $sformatf("V=%0d: reading %0d, expected %0d", v, reading, exp));
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    check(!valid, "no reading during reset");
    rst_n = 1'b1;
    hold(850, 22);    // 454
    hold(760, 33);    // 303
    hold(670, 66);    // 151
    hold(715, 44);    // 227
    hold(640, 99);    // 101: line holds two older edges
    hold(1120, 11);   // saturates at 640
    hold(850, 22);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
