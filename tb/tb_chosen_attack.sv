// tb_chosen_attack: one complete attack with the chosen parameters (all 16 blocks,
// 256 cycles, period 100, duty 39 cycles, staggered) on the design with all 15 nodes,
// 16 blocks per node, the 640-element sensor and the 16398-word recording, but NR
// oscillators per block instead of 500 to keep the simulation build small. A
// behavioural supply model closes the loop from running blocks to sensor voltage.
// Checks the node enables every cycle, that all 240 blocks run at the peak, the
// number of stored readings (256 + 15 - 1), every stored word, and a clear voltage drop.
module tb_chosen_attack;
  import undervolt_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned NR = 8;   // oscillators per block (500 in the built design)
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, trigger = 1'b0;
  attack_cfg_t cfg = '0;
  logic [14:0] rd_addr = '0;
  logic busy, done, trig_ignored, overflow;
  logic [SENSE_W-1:0] rd_data, reading;
  logic [15:0] sample_count;
  logic [11:0] vdd_pl_mv;
  logic [N_NODES_DEF-1:0][N_BLOCK_DEF-1:0] blk_en, blk_probe;
  logic [N_NODES_DEF-1:0] node_en;

  fpga_undervolt_top #(.N_RO(NR)) dut (.*);

  pdn_model u_pdn (.clk(clk), .n_active($countones(blk_en)), .vdd_mv(vdd_pl_mv));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic bit ref_base(input int j, input attack_cfg_t c);
    return (j >= 0) && (j < int'(c.duration)) && ((j % int'(c.period)) < int'(c.duty));
  endfunction

  initial begin
    attack_cfg_t c;
    int k, min_r, max_active, base_r;
    logic [SENSE_W-1:0] log_r [$];
    logic [N_NODES_DEF-1:0] exp_en;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (20) @(negedge clk);
    base_r = int'(reading);
    check(base_r == 454, $sformatf("idle reading 454, got %0d", base_r));
    c = '{n_blocks: 5'd16, duration: 15'd256, period: 12'd100, duty: 12'd39, mode: ACT_STAGGERED};
    cfg = c;
    @(negedge clk) trigger = 1'b1;
    @(negedge clk) trigger = 1'b0;
    k = 0; min_r = 1 << SENSE_W; max_active = 0;
    while (!done && k < 1000) begin
      for (int i = 0; i < int'(N_NODES_DEF); i++) exp_en[i] = ref_base(k - 1 - i, c);
      check(node_en == exp_en, $sformatf("k=%0d node_en=%h exp=%h", k, node_en, exp_en));
      if ($countones(blk_en) > max_active) max_active = $countones(blk_en);
      if (k > 0) log_r.push_back(reading);
      if (int'(reading) < min_r) min_r = int'(reading);
      k++;
      @(negedge clk);
    end
    check(max_active == 240, $sformatf("240 blocks running at the peak, got %0d", max_active));
    check(int'(sample_count) == 270, $sformatf("270 readings stored, got %0d", sample_count));
    check(log_r.size() == 270, $sformatf("attack window 270 cycles, got %0d", log_r.size()));
    check(!overflow, "no overflow");
    for (int a = 0; a < 270; a++) begin
      rd_addr = 15'(a);
      @(negedge clk);
      check(rd_data == log_r[a], $sformatf("word %0d: %0d vs %0d", a, rd_data, log_r[a]));
    end
    check(min_r < 200, $sformatf("reading drops below 200 (min %0d)", min_r));
    $display("chosen attack: baseline %0d, min reading %0d, %0d samples", base_r, min_r, sample_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
