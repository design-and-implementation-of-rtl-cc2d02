// tb_ro_puf: generates the 128-bit key on two simulated chips (seeds 1 and
// 2) at the default sizes and checks:
//  - key_valid comes exactly 128 * 3 * (32 + 4 + 3) = 14976 cycles after start;
//  - every key bit equals the majority of "Counter1 > Counter2" over the
//    three evaluations of its challenge, as observed on the counters;
//  - only the selected pair oscillates, and the counts are plausible;
//  - the key is balanced enough, a second run on the same chip gives
//    (nearly) the same key, and the two chips give different keys.
`timescale 1ns / 1ps
module tb_ro_puf;
  localparam int KB = 128, V = 3, W = 32, S = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic busy1, busy2, kv1, kv2;
  logic [KB-1:0] key1, key2, first1, exp1;
  logic [7:0] dis1, dis2;
  int checks = 0, failures = 0;
  int ones, cyc, hd, gt_seen = 0, lt_seen = 0, bad_en = 0, bad_cnt = 0;

  ro_puf #(.SEED(1)) chip1 (.clk, .rst_n, .start, .busy(busy1), .key_valid(kv1), .key(key1), .disagree_count(dis1));
  ro_puf #(.SEED(2)) chip2 (.clk, .rst_n, .start, .busy(busy2), .key_valid(kv2), .key(key2), .disagree_count(dis2));

  always #5 clk = ~clk;

  // independent expectation from the counters of chip 1
  always @(posedge clk) begin
    if (chip1.sample) begin
      if (chip1.cnt1 > chip1.cnt2) begin ones++; gt_seen++; end
      else lt_seen++;
      if (chip1.cnt1 < 50 || chip1.cnt2 < 50) bad_cnt++;
      if (chip1.u_stab.n_eval == 2) begin
        exp1 = {exp1[KB-2:0], ones >= 2};
        ones = 0;
      end
    end
    if (chip1.osc_en) begin
      int p;
      p = int'(chip1.challenge) / 32;
      if (chip1.ro_en != ((4'b1 << p) | (4'b1 << ((p + 1) % 4)))) bad_en++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic gen();
    ones = 0; exp1 = '0; cyc = 0;
    @(negedge clk);
    start = 1; @(negedge clk); start = 0; cyc = 1;
    while (!kv1) begin @(negedge clk); cyc++; end
    check(cyc == KB * V * (W + S + 3), $sformatf("key latency %0d", cyc));
    check(kv2, "chip 2 ready too");
    check(key1 == exp1, $sformatf("key %h vs counters %h", key1, exp1));
  endtask

  function automatic int hamming(input logic [KB-1:0] x);
    return $countones(x);
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    gen();
    first1 = key1;
    $display("chip 1 key %h (disagreeing challenges %0d)", key1, dis1);
    $display("chip 2 key %h (disagreeing challenges %0d)", key2, dis2);
    check($countones(key1) >= 24 && $countones(key1) <= 104, "chip 1 key balance");
    check($countones(key2) >= 24 && $countones(key2) <= 104, "chip 2 key balance");
    hd = hamming(key1 ^ key2);
    $display("inter-chip distance %0d", hd);
    check(hd >= 24, "chips differ");
    gen();
    hd = hamming(key1 ^ first1);
    $display("intra-chip distance %0d", hd);
    check(hd <= 6, "same chip, same key");
    check(bad_en == 0, "only the selected pair oscillates");
    check(bad_cnt == 0, "counts plausible");
    check(gt_seen > 0 && lt_seen > 0, "both response values seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
