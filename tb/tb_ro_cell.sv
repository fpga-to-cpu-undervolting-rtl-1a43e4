// tb_ro_cell: checks the ring-oscillator model. Disabled, the output must rest at 1;
// enabled, it must toggle once per loop delay (counted over a fixed window); disabled
// again, it must return to 1 within one loop delay and stay there.
module tb_ro_cell;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned HALF_PS = 1000;
  int checks = 0, failures = 0;
  logic en = 1'b0;
  logic osc;
  int toggles = 0;
  realtime last_edge = 0, min_gap = 1.0e9, max_gap = 0;

  ro_cell #(.HALF_PERIOD_PS(HALF_PS)) dut (.en(en), .osc(osc));

  always @(osc) begin
    toggles++;
    if (last_edge != 0) begin
      if ($realtime - last_edge < min_gap) min_gap = $realtime - last_edge;
      if ($realtime - last_edge > max_gap) max_gap = $realtime - last_edge;
    end
    last_edge = $realtime;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #50;
    check(osc == 1'b1, "disabled RO rests at 1");
    toggles = 0;
    #50;
    check(toggles == 0, "disabled RO does not toggle");
    en = 1'b1;
    #100.5;
    // first toggle after 1 ns, then every 1 ns: 100 toggles in 100.5 ns
    check(toggles == 100, $sformatf("100 toggles in 100.5 ns, got %0d", toggles));
    check(min_gap > 0.999 && max_gap < 1.001, $sformatf("toggle spacing 1 ns, got %f..%f", min_gap, max_gap));
    en = 1'b0;
    #1.5;
    check(osc == 1'b1, "RO returns to 1 after disable");
    toggles = 0;
    #100;
    check(toggles == 0, "RO stays still after disable");
    en = 1'b1;
    #10.5;
    check(toggles == 10, $sformatf("restart: 10 toggles in 10.5 ns, got %0d", toggles));
    en = 1'b0;
    #5;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
