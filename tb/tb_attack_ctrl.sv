// tb_attack_ctrl: runs a series of attacks (the chosen staggered configuration, a
// simultaneous one, a short period, a partial block count) and compares node_en,
// blk_mask, busy and done every cycle with a reference computed here from the
// definition: node i in staggered mode, k cycles after the start pulse, is enabled when
// j = k-1-i lies in [0, duration) and j mod period < duty (simultaneous: j = k-1).
// Also checks that a trigger during an attack is ignored and duration 0 starts nothing.
module tb_attack_ctrl;
  import undervolt_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned NN = 15, NB = 16;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, trigger = 1'b0;
  attack_cfg_t cfg;
  logic [NN-1:0] node_en;
  logic [NB-1:0] blk_mask;
  logic start, busy, done, trig_ignored;

  attack_ctrl #(.N_NODES(NN), .N_BLOCK(NB)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic bit ref_base(input int j, input attack_cfg_t c);
    return (j >= 0) && (j < int'(c.duration)) && ((j % int'(c.period)) < int'(c.duty));
  endfunction

  // Runs one attack and checks every cycle until two cycles after done.
  task automatic run_attack(input attack_cfg_t c, input bit retrigger);
    int k, tail, last;
    bit seen_done, seen_ign;
    logic [NN-1:0] exp_en;
    cfg = c;
    @(negedge clk) trigger = 1'b1;
    @(negedge clk) trigger = 1'b0;
    check(start == 1'b1, "start pulse one cycle after trigger edge");
    tail = (c.mode == ACT_STAGGERED) ? NN : 1;
    last = int'(c.duration) + tail;
    seen_done = 0; seen_ign = 0;
    for (k = 0; k <= last + 1; k++) begin
      for (int i = 0; i < NN; i++)
        exp_en[i] = ref_base((c.mode == ACT_STAGGERED) ? k - 1 - i : k - 1, c);
      check(node_en == exp_en, $sformatf("k=%0d node_en=%h exp=%h", k, node_en, exp_en));
      check(busy == (k < last), $sformatf("k=%0d busy=%0d", k, busy));
      check(done == (k == last), $sformatf("k=%0d done=%0d", k, done));
      if (busy) for (int b = 0; b < NB; b++)
        check(blk_mask[b] == (b < int'(c.n_blocks)), $sformatf("blk_mask=%h for %0d blocks", blk_mask, c.n_blocks));
      if (k > 0) check(start == 1'b0, "single start pulse");
      if (done) seen_done = 1;
      if (trig_ignored) seen_ign = 1;
      if (retrigger && k == 20) trigger = 1'b1;
      if (retrigger && k == 22) trigger = 1'b0;
      @(negedge clk);
    end
    check(seen_done, "done seen");
    if (retrigger) check(seen_ign, "trigger during attack reported as ignored");
  endtask

  initial begin
    attack_cfg_t c;
    cfg = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // Chosen configuration: 16 blocks, 256 cycles, period 100, duty 39 cycles, staggered
    c = '{n_blocks: 5'd16, duration: 15'd256, period: 12'd100, duty: 12'd39, mode: ACT_STAGGERED};
    run_attack(c, 1'b1);
    // Simultaneous activation, period 140 with 54 active cycles (38.57 %)
    c = '{n_blocks: 5'd16, duration: 15'd300, period: 12'd140, duty: 12'd54, mode: ACT_SIMULTANEOUS};
    run_attack(c, 1'b0);
    // Short period, 8 blocks, staggered
    c = '{n_blocks: 5'd8, duration: 15'd128, period: 12'd10, duty: 12'd3, mode: ACT_STAGGERED};
    run_attack(c, 1'b0);
    // Duty cycle longer than the period: always on during the duration
    c = '{n_blocks: 5'd1, duration: 15'd40, period: 12'd7, duty: 12'd9, mode: ACT_STAGGERED};
    run_attack(c, 1'b0);
    // Duration 0: nothing starts
    cfg = '{n_blocks: 5'd16, duration: 15'd0, period: 12'd10, duty: 12'd4, mode: ACT_STAGGERED};
    @(negedge clk) trigger = 1'b1;
    @(negedge clk) trigger = 1'b0;
    repeat (5) begin
      check(!busy && !start && node_en == '0, "duration 0 starts no attack");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
