// tb_fpga_undervolt_top: end-to-end test of the attacker at reduced size (4 nodes of
// 4 blocks of 4 oscillators, 64-word sample memory) closed through a behavioural supply
// model: the running blocks pull the supply down and the sensor sees it.
// For each attack the testbench plays the software side: writes the configuration,
// raises the trigger, waits for done, reads the recording back word by word and
// compares it with the live sensor readings it logged itself. Every cycle it checks
// the node enables against the attack definition and the block enables against the
// requested block count. Mechanisms counted (each must occur at least once):
// staggered activation, simultaneous activation, partial block count, a voltage drop
// seen by the sensor, a trigger ignored during an attack, recording overflow, and
// oscillation of enabled blocks.
module tb_fpga_undervolt_top;
  import undervolt_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned NN = 4, NB = 4, NR = 4, DEPTH = 64;
  localparam int unsigned AW = $clog2(DEPTH);

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, trigger = 1'b0;
  attack_cfg_t cfg = '0;
  logic [AW-1:0] rd_addr = '0;
  logic busy, done, trig_ignored, overflow;
  logic [SENSE_W-1:0] rd_data, reading;
  logic [AW:0] sample_count;
  logic [11:0] vdd_pl_mv;
  logic [NN-1:0][NB-1:0] blk_en, blk_probe;
  logic [NN-1:0] node_en;

  fpga_undervolt_top #(.N_NODES(NN), .N_BLOCK(NB), .N_RO(NR), .DEPTH(DEPTH)) dut (.*);

  pdn_model #(.DROP_UV_PER_BLOCK(13000)) u_pdn (.clk(clk), .n_active($countones(blk_en)), .vdd_mv(vdd_pl_mv));

  always #5 clk = ~clk;

  // mechanism counters
  int n_stag = 0, n_sim = 0, n_partial = 0, n_drop = 0, n_ignored = 0, n_overflow = 0, n_osc = 0;

  int probe_toggles = 0;
  always @(blk_probe) probe_toggles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic bit ref_base(input int j, input attack_cfg_t c);
    return (j >= 0) && (j < int'(c.duration)) && ((j % int'(c.period)) < int'(c.duty));
  endfunction

  task automatic attack(input attack_cfg_t c, input bit retrigger);
    int k, n_rec, exp_count, min_r, base_r;
    logic [SENSE_W-1:0] log_r [$];
    logic [NN-1:0] exp_en;
    bit seen_ign;
    cfg = c;
    base_r = int'(reading);
    @(negedge clk) trigger = 1'b1;
    @(negedge clk) trigger = 1'b0;
    k = 0; min_r = 1 << SENSE_W; seen_ign = 0;
    probe_toggles = 0;
    // k = 0 is the cycle in which the attack was accepted
    while (!done) begin
      for (int i = 0; i < NN; i++)
        exp_en[i] = ref_base((c.mode == ACT_STAGGERED) ? k - 1 - i : k - 1, c);
      check(node_en == exp_en, $sformatf("k=%0d node_en=%b exp=%b", k, node_en, exp_en));
      for (int n = 0; n < NN; n++)
        for (int b = 0; b < NB; b++)
          check(blk_en[n][b] == (node_en[n] && b < int'(c.n_blocks)), "block enable = node enable and block count");
      if (k > 0) log_r.push_back(reading);      // what storage writes this cycle
      if (int'(reading) < min_r) min_r = int'(reading);
      if (trig_ignored) seen_ign = 1;
      if (retrigger && k == 10) trigger = 1'b1;
      if (retrigger && k == 12) trigger = 1'b0;
      k++;
      @(negedge clk);
      if (k > 100000) break;
    end
    exp_count = int'(c.duration) + ((c.mode == ACT_STAGGERED) ? NN - 1 : 0);
    n_rec = (exp_count > DEPTH) ? DEPTH : exp_count;
    check(int'(sample_count) == n_rec, $sformatf("sample_count %0d, expected %0d", sample_count, n_rec));
    check(overflow == (exp_count > DEPTH), "overflow flag");
    check(log_r.size() == exp_count, $sformatf("attack lasted %0d cycles, expected %0d", log_r.size(), exp_count));
    for (int a = 0; a < n_rec; a++) begin
      rd_addr = AW'(a);
      @(negedge clk);
      check(rd_data == log_r[a], $sformatf("stored word %0d = %0d, live reading was %0d", a, rd_data, log_r[a]));
    end
    if (retrigger) begin check(seen_ign, "trigger during attack ignored"); if (seen_ign) n_ignored++; end
    if (overflow) n_overflow++;
    if (c.mode == ACT_STAGGERED) n_stag++; else n_sim++;
    if (int'(c.n_blocks) < NB && c.n_blocks != 0) n_partial++;
    if (probe_toggles > 0) n_osc++;
    // a full attack must pull the reading well below the idle baseline
    if (c.n_blocks != 0 && min_r < base_r - 100) n_drop++;
    $display("attack mode=%s blocks=%0d dur=%0d per=%0d duty=%0d: baseline %0d, min reading %0d, %0d samples",
             c.mode.name(), c.n_blocks, c.duration, c.period, c.duty, base_r, min_r, sample_count);
    repeat (40) @(negedge clk);   // let the supply recover
  endtask

  initial begin
    attack_cfg_t c;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (40) @(negedge clk);
    check(int'(reading) == 454, $sformatf("idle reading 454 at 850 mV, got %0d", reading));
    c = '{n_blocks: 5'(NB), duration: 15'd48, period: 12'd20, duty: 12'd8, mode: ACT_STAGGERED};
    attack(c, 1'b1);
    c = '{n_blocks: 5'(NB), duration: 15'd40, period: 12'd14, duty: 12'd5, mode: ACT_SIMULTANEOUS};
    attack(c, 1'b0);
    c = '{n_blocks: 5'd2, duration: 15'd30, period: 12'd10, duty: 12'd4, mode: ACT_STAGGERED};
    attack(c, 1'b0);
    c = '{n_blocks: 5'(NB), duration: 15'd90, period: 12'd30, duty: 12'd12, mode: ACT_STAGGERED};
    attack(c, 1'b0);
    $display("mechanisms: staggered=%0d simultaneous=%0d partial=%0d drop=%0d ignored=%0d overflow=%0d oscillation=%0d",
             n_stag, n_sim, n_partial, n_drop, n_ignored, n_overflow, n_osc);
    check(n_stag > 0, "staggered activation exercised");
    check(n_sim > 0, "simultaneous activation exercised");
    check(n_partial > 0, "partial block count exercised");
    check(n_drop > 0, "voltage drop observed");
    check(n_ignored > 0, "ignored trigger exercised");
    check(n_overflow > 0, "recording overflow exercised");
    check(n_osc > 0, "oscillators ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
