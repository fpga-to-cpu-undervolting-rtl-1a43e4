// tb_attacker_node: drives every combination of node enable and a set of block masks
// and checks the applied block enables against mask AND enable, and that exactly the
// enabled blocks oscillate (their probe toggles) while the others stay still.
module tb_attacker_node;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned NB = 4;
  int checks = 0, failures = 0;
  logic node_en = 1'b0;
  logic [NB-1:0] mask = '0;
  logic [NB-1:0] blk_en, probe;
  int cnt [NB];

  attacker_node #(.N_BLOCK(NB), .N_RO(3), .HALF_PERIOD_PS(500)) dut (
    .node_en(node_en), .blk_mask(mask), .blk_en(blk_en), .blk_probe(probe));

  for (genvar b = 0; b < NB; b++) begin : g_cnt
    always @(probe[b]) cnt[b]++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int m = 0; m < (1 << NB); m++) begin
      for (int e = 0; e < 2; e++) begin
        node_en = e[0];
        mask    = m[NB-1:0];
        #3.25;
        for (int b = 0; b < NB; b++) cnt[b] = 0;
        #10.25;
        check(blk_en == (mask & {NB{node_en}}),
              $sformatf("en=%0d mask=%b: blk_en=%b", e, mask, blk_en));
        for (int b = 0; b < NB; b++)
          if (node_en && mask[b]) check(cnt[b] == 20, $sformatf("block %0d should run, %0d toggles", b, cnt[b]));
          else                    check(cnt[b] == 0,  $sformatf("block %0d should be still, %0d toggles", b, cnt[b]));
      end
    end
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
