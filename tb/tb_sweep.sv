// tb_sweep: the parameter-sweep workload. Runs a set of attack configurations from the
// swept ranges on the design with all 15 nodes and 16 blocks (NR oscillators per block
// to keep the build small), in the way attacker software would: configure, trigger,
// wait for done, read the whole recording back. For each run it checks the number of
// stored readings against the attack definition and the absence of overflow, and
// reports the minimum reading. It then checks the orderings the supply model must
// reproduce: 16 blocks drop the supply further than 8, a 140-cycle period further than
// a 10-cycle one, and the simultaneous attack reaches its minimum earlier than the
// staggered one. The last run is the shortest swept duration with the widest period
// and 50 % duty. The longest swept duration (16384 cycles) is left out: it takes too
// long to simulate with the behavioural oscillators and delay line.
module tb_sweep;
  import undervolt_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned NR = 2;
  localparam int unsigned AW = $clog2(DEPTH_DEF);

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, trigger = 1'b0;
  attack_cfg_t cfg = '0;
  logic [AW-1:0] rd_addr = '0;
  logic busy, done, trig_ignored, overflow;
  logic [SENSE_W-1:0] rd_data, reading;
  logic [AW:0] sample_count;
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

  // One attack; returns the minimum stored reading and the index where it occurred.
  task automatic run(input attack_cfg_t c, output int min_r, output int min_at);
    int exp_n, n;
    cfg = c;
    @(negedge clk) trigger = 1'b1;
    @(negedge clk) trigger = 1'b0;
    n = 0;
    while (!done && n < 40000) begin @(negedge clk); n++; end
    exp_n = int'(c.duration) + ((c.mode == ACT_STAGGERED) ? int'(N_NODES_DEF) - 1 : 0);
    check(int'(sample_count) == exp_n, $sformatf("%0d readings stored, expected %0d", sample_count, exp_n));
    check(!overflow, "no overflow within the swept ranges");
    min_r = 1 << SENSE_W; min_at = -1;
    for (int a = 0; a < int'(sample_count); a++) begin
      rd_addr = AW'(a);
      @(negedge clk);
      if (int'(rd_data) < min_r) begin min_r = int'(rd_data); min_at = a; end
    end
    $display("blocks=%0d dur=%0d period=%0d duty=%0d %s: min reading %0d at sample %0d",
             c.n_blocks, c.duration, c.period, c.duty, c.mode.name(), min_r, min_at);
    repeat (60) @(negedge clk);
  endtask

  initial begin
    int m16, m8, a16, a8, msim, asim, mp10, ap10, mp140, ap140, mp260, ap260, ml, al;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (30) @(negedge clk);
    // Block-count and activation comparison at period 140, 54/140 duty
    run('{n_blocks: 5'd16, duration: 15'd256, period: 12'd140, duty: 12'd54, mode: ACT_STAGGERED},    m16, a16);
    run('{n_blocks: 5'd8,  duration: 15'd256, period: 12'd140, duty: 12'd54, mode: ACT_STAGGERED},    m8, a8);
    run('{n_blocks: 5'd16, duration: 15'd256, period: 12'd140, duty: 12'd54, mode: ACT_SIMULTANEOUS}, msim, asim);
    // Period comparison: 10 (30 %), 260 (101/260)
    run('{n_blocks: 5'd16, duration: 15'd256, period: 12'd10,  duty: 12'd3,   mode: ACT_STAGGERED},   mp10, ap10);
    run('{n_blocks: 5'd16, duration: 15'd256, period: 12'd260, duty: 12'd101, mode: ACT_STAGGERED},   mp260, ap260);
    mp140 = m16; ap140 = a16;
    check(m16 < m8, "16 blocks drop the supply further than 8");
    check(mp140 < mp10, "period 140 drops the supply further than period 10");
    check(asim < a16, "simultaneous activation reaches its minimum earlier than staggered");
    // Sweep extreme: shortest duration, widest period, 50 % duty
    run('{n_blocks: 5'd16, duration: 15'd128,   period: 12'd2200, duty: 12'd1100, mode: ACT_SIMULTANEOUS}, ml, al);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
