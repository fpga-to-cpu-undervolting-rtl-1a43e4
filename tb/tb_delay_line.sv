// tb_delay_line: checks the delay-line model. After an edge is launched, the number
// of elements that have taken the new value at a given time must equal
// floor(t / d(V)) with d(V) = 22 ps * 270 / (V - 580 mV), worked out here for supplies
// at which d is a whole number of picoseconds.
module tb_delay_line;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 640;
  int checks = 0, failures = 0;
  logic launch = 1'b0;
  logic [11:0] vdd = 12'd850;
  logic [N-1:0] taps;

  delay_line #(.N_TAPS(N)) dut (.launch(launch), .vdd_mv(vdd), .taps(taps));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int lead_run(input logic [N-1:0] t, input logic v);
    int n = 0;
    while (n < N && t[n] == v) n++;
    return n;
  endfunction

  // Launch an edge at supply v and look at the line at several instants.
  task automatic probe(input int v, input int d_ps);
    int exp;
    vdd = 12'(v);
    #20;                       // let the previous edge settle everywhere
    launch = ~launch;
    for (int s = 1; s <= 4; s++) begin
      #(s == 1 ? 1.003 : 1.9);
      exp = (1003 + (s - 1) * 1900) / d_ps;
      if (exp > N) exp = N;
      check(lead_run(taps, launch) == exp,
            $sformatf("V=%0d mV after %0d ps: %0d elements, expected %0d", v, 1003 + (s-1)*1900, lead_run(taps, launch), exp));
    end
  endtask

  initial begin
    #30;
    check(taps == '0, "line settled at 0");
    probe(850, 22);   // nominal
    probe(715, 44);   // d doubles
    probe(760, 33);
    probe(670, 66);
    probe(1120, 11);  // fast line: the edge runs off the end
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
