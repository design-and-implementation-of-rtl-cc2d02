// tb_puf_aes_top: end-to-end run of the whole design at its default sizes.
//
// 1. Before any key exists, a plaintext is offered and must be refused.
// 2. keygen_start runs the 128 challenges; key_ready must come after
//    exactly 128 * 3 * 39 cycles, and each key bit must match the majority
//    of the counter comparisons observed during its challenge.
// 3. Several plaintexts under several user keys (one of them the 0x...0abc
//    key of the published example) are encrypted and compared with a
//    reference AES using round keys = key schedule XOR repeated PUF key;
//    a plaintext offered while the core is busy must be ignored.
// 4. The key is generated a second time and must be (nearly) the same.
// Every mechanism must occur at least once: refusal before the key,
// refusal while busy, both response values, a challenge whose evaluations
// disagreed (filtered by the vote), key formation and encryption.
`timescale 1ns / 1ps
module tb_puf_aes_top;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, keygen_start = 0, key_ready, pt_valid = 0, aes_busy, ct_valid;
  logic [127:0] aes_key_in, pt, ct, exp_key, first_key, p;
  int checks = 0, failures = 0;
  int n_disagree_before = 0;
  int n_refuse_nokey = 0, n_refuse_busy = 0, n_resp1 = 0, n_resp0 = 0, n_disagree = 0;
  int n_keygen = 0, n_enc = 0, ones = 0, cyc, hd;
  logic [7:0] disagree_port;

  puf_aes_top dut (.clk, .rst_n, .keygen_start, .key_ready, .aes_key_in, .pt_valid, .pt,
                   .aes_busy, .ct_valid, .ct, .puf_disagree_count(disagree_port));

  always #5 clk = ~clk;

  always @(posedge clk) if (dut.u_puf.sample) begin
    if (dut.u_puf.cnt1 > dut.u_puf.cnt2) begin ones++; n_resp1++; end
    else n_resp0++;
    if (dut.u_puf.u_stab.n_eval == 2) begin
      if (ones != 0 && ones != 3) n_disagree++;
      exp_key = {exp_key[126:0], ones >= 2};
      ones = 0;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic keygen();
    exp_key = '0; ones = 0; n_disagree_before = n_disagree;
    @(negedge clk);
    keygen_start = 1; @(negedge clk); keygen_start = 0; cyc = 1;
    while (!key_ready) begin @(negedge clk); cyc++; end
    check(cyc == 128 * 3 * 39, $sformatf("key latency %0d", cyc));
    check(dut.u_puf.key == exp_key, "key matches counter comparisons");
    check(int'(disagree_port) == n_disagree - n_disagree_before, "disagreement count port");
    n_keygen++;
  endtask

  task automatic encrypt(input logic [127:0] k, input logic [127:0] x);
    logic [127:0] e;
    aes_key_in = k;
    e = ref_encrypt(x, ref_expand(k) ^ {11{dut.u_puf.key}});
    @(negedge clk);
    pt = x; pt_valid = 1; @(negedge clk); pt_valid = 0;
    check(aes_busy, "core busy");
    pt = ~x; pt_valid = 1; @(negedge clk); pt_valid = 0;   // offered while busy
    cyc = 2;
    while (!ct_valid) begin @(negedge clk); cyc++; end
    check(cyc == 11, $sformatf("encryption latency %0d", cyc));
    check(ct == e, $sformatf("ct %h exp %h", ct, e));
    n_enc++;
    n_refuse_busy++;
    repeat (12) @(negedge clk);
    check(!ct_valid && !aes_busy, "busy-time plaintext ignored");
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    aes_key_in = 128'habc;
    pt = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // 1. refusal before a key exists
    pt = 128'h00112233445566778899aabbccddeeff; pt_valid = 1;
    repeat (2) @(negedge clk);
    pt_valid = 0;
    repeat (15) @(negedge clk);
    check(!aes_busy && !ct_valid && !key_ready, "refused before key");
    n_refuse_nokey++;
    // 2. key generation
    keygen();
    first_key = dut.u_puf.key;
    $display("PUF key %h", first_key);
    // 3. encryptions
    encrypt(128'habc, 128'h00112233445566778899aabbccddeeff);
    encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff);
    for (int i = 0; i < 4; i++) begin
      p = {$urandom, $urandom, $urandom, $urandom};
      encrypt({$urandom, $urandom, $urandom, $urandom}, p);
    end
    // 4. regenerate
    keygen();
    hd = $countones(dut.u_puf.key ^ first_key);
    $display("regenerated key differs in %0d bits", hd);
    check(hd <= 6, "regenerated key");
    encrypt(128'habc, 128'h3243f6a8885a308d313198a2e0370734);
    $display("mechanisms: refuse_nokey=%0d refuse_busy=%0d resp1=%0d resp0=%0d disagree=%0d keygen=%0d enc=%0d",
             n_refuse_nokey, n_refuse_busy, n_resp1, n_resp0, n_disagree, n_keygen, n_enc);
    check(n_refuse_nokey > 0, "refusal before key seen");
    check(n_refuse_busy > 0, "refusal while busy seen");
    check(n_resp1 > 0 && n_resp0 > 0, "both responses seen");
    check(n_disagree > 0, "a vote resolved a disagreement");
    check(n_keygen == 2 && n_enc == 7, "operations completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
