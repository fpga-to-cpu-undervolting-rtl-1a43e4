// tb_storage_ctrl: records bursts of samples and reads them back. A burst shorter than
// the memory must be stored in order with the right count and no overflow; a longer
// one must keep the first DEPTH samples, report DEPTH and set overflow; a new start
// must clear both. Samples offered while rec is low must not be stored.
module tb_storage_ctrl;
  import undervolt_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned D = 16, W = 10;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, rec = 1'b0;
  logic [W-1:0] sample = '0, rd_data;
  logic [3:0] rd_addr = '0;
  logic [4:0] count;
  logic overflow;

  storage_ctrl #(.DEPTH(D), .W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [W-1:0] val(input int i, input int s);
    return W'(100 * s + 3 * i + 1);
  endfunction

  task automatic burst(input int len, input int s);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    for (int i = 0; i < len; i++) begin
      rec = 1'b1; sample = val(i, s);
      @(negedge clk);
      // a gap with rec low in the middle of the burst
      if (i == 3) begin rec = 1'b0; sample = 10'h155; @(negedge clk); end
    end
    rec = 1'b0;
    @(negedge clk);
  endtask

  task automatic readback(input int n, input int s);
    for (int i = 0; i < n; i++) begin
      rd_addr = 4'(i);
      @(negedge clk) check(rd_data == val(i, s), $sformatf("word %0d: %0d vs %0d", i, rd_data, val(i, s)));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(count == 0 && !overflow, "empty after reset");
    burst(10, 1);
    check(count == 10, $sformatf("count 10, got %0d", count));
    check(!overflow, "no overflow for 10 samples");
    readback(10, 1);
    burst(25, 2);
    check(count == 5'(D), $sformatf("count saturates at %0d, got %0d", D, count));
    check(overflow, "overflow after 25 samples");
    readback(D, 2);
    burst(3, 3);
    check(count == 3 && !overflow, "start clears count and overflow");
    readback(3, 3);
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
