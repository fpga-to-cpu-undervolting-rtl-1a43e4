// tb_ro_block: checks that every oscillator of a block follows the shared enable: all
// still at 1 while disabled, all toggling at the loop rate while enabled.
module tb_ro_block;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 8;
  int checks = 0, failures = 0;
  logic en = 1'b0;
  logic [N-1:0] osc;
  int cnt [N];

  ro_block #(.N_RO(N), .HALF_PERIOD_PS(500)) dut (.en(en), .osc(osc));

  for (genvar r = 0; r < N; r++) begin : g_cnt
    always @(osc[r]) cnt[r]++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic clear();
    for (int r = 0; r < N; r++) cnt[r] = 0;
  endtask

  initial begin
    #20;
    check(osc == '1, "disabled block rests at all ones");
    clear();
    #20;
    for (int r = 0; r < N; r++) check(cnt[r] == 0, $sformatf("RO %0d still while disabled", r));
    en = 1'b1;
    #20.25;
    // 0.5 ns loop delay: 40 toggles in 20.25 ns
    for (int r = 0; r < N; r++) check(cnt[r] == 40, $sformatf("RO %0d: 40 toggles, got %0d", r, cnt[r]));
    en = 1'b0;
    #2;
    check(osc == '1, "block back at all ones after disable");
    clear();
    #20;
    for (int r = 0; r < N; r++) check(cnt[r] == 0, $sformatf("RO %0d still after disable", r));
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
