// tb_two_chip_keys: the two-chip round-key experiment.
//
// Two copies of the whole design stand for two chips (SEED 1 and 2). Both
// get the same user key 0x...0abc and generate their PUF keys. For each
// chip the 1408-bit round-key set must equal the key schedule of 0x...0abc
// (whose round key 10 is b60f0604e259cec56e5e1bc43917cbb6) XORed with the
// chip's PUF key repeated eleven times. The two chips' round keys must
// differ everywhere the PUF keys differ, and the same plaintext must give
// each chip its own ciphertext, each equal to the reference model's.
`timescale 1ns / 1ps
module tb_two_chip_keys;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, pt_valid = 0;
  logic rdy1, rdy2, busy1, busy2, cv1, cv2;
  logic [127:0] key_in = 128'habc, pt = 128'h00112233445566778899aabbccddeeff, ct1, ct2;
  logic [7:0] dis1, dis2;
  logic [1407:0] sched;
  int checks = 0, failures = 0;

  puf_aes_top #(.SEED(1)) chip1 (.clk, .rst_n, .keygen_start(start), .key_ready(rdy1),
    .aes_key_in(key_in), .pt_valid, .pt, .aes_busy(busy1), .ct_valid(cv1), .ct(ct1),
    .puf_disagree_count(dis1));
  puf_aes_top #(.SEED(2)) chip2 (.clk, .rst_n, .keygen_start(start), .key_ready(rdy2),
    .aes_key_in(key_in), .pt_valid, .pt, .aes_busy(busy2), .ct_valid(cv2), .ct(ct2),
    .puf_disagree_count(dis2));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    start = 1; @(negedge clk); start = 0;
    while (!(rdy1 && rdy2)) @(negedge clk);
    sched = ref_expand(key_in);
    check(sched[1407:1280] == 128'hb60f0604e259cec56e5e1bc43917cbb6, "schedule of 0x...0abc");
    check(chip1.sched == sched && chip2.sched == sched, "both chips expand the same user key alike");
    check(chip1.final_keys == (sched ^ {11{chip1.puf_key}}), "chip 1 round keys");
    check(chip2.final_keys == (sched ^ {11{chip2.puf_key}}), "chip 2 round keys");
    $display("chip 1 PUF key %h, round key 10 %h", chip1.puf_key, chip1.final_keys[1407:1280]);
    $display("chip 2 PUF key %h, round key 10 %h", chip2.puf_key, chip2.final_keys[1407:1280]);
    check($countones(chip1.puf_key ^ chip2.puf_key) >= 24, "PUF keys differ between chips");
    for (int r = 0; r < 11; r++)
      check((chip1.final_keys[128*r +: 128] ^ chip2.final_keys[128*r +: 128])
            == (chip1.puf_key ^ chip2.puf_key), $sformatf("round key %0d difference", r));
    @(negedge clk);
    pt_valid = 1; @(negedge clk); pt_valid = 0;
    while (!cv1) @(negedge clk);
    check(cv2, "both chips finish together");
    check(ct1 == ref_encrypt(pt, sched ^ {11{chip1.puf_key}}), "chip 1 ciphertext");
    check(ct2 == ref_encrypt(pt, sched ^ {11{chip2.puf_key}}), "chip 2 ciphertext");
    check(ct1 != ct2, "chips encrypt differently");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
