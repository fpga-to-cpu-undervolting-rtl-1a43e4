// tb_sample_ram: fills the memory with a pattern, reads it back with the one-cycle
// read latency, and checks that a read of the address being written returns the old
// word.
module tb_sample_ram;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned D = 32, W = 10;
  int checks = 0, failures = 0;
  logic clk = 1'b0, we = 1'b0;
  logic [4:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;

  sample_ram #(.DEPTH(D), .W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic logic [W-1:0] pat(input int a, input int s);
    return W'((a * 37 + s * 101 + 5) % 1024);
  endfunction

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int a = 0; a < D; a++) begin
        @(negedge clk) begin we = 1'b1; waddr = 5'(a); wdata = pat(a, s); end
      end
      @(negedge clk) we = 1'b0;
      for (int a = 0; a < D; a++) begin
        @(negedge clk) raddr = 5'(a);
        @(negedge clk) check(rdata == pat(a, s), $sformatf("addr %0d: %0d vs %0d", a, rdata, pat(a, s)));
      end
    end
    // read during write of the same address returns the previous contents
    @(negedge clk) begin we = 1'b1; waddr = 5'd7; wdata = 10'h3ff; raddr = 5'd7; end
    @(negedge clk) begin we = 1'b0; check(rdata == pat(7, 1), "read-during-write returns old word"); end
    @(negedge clk) check(rdata == 10'h3ff, "new word visible next cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
