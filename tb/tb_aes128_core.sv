// tb_aes128_core: FIPS-197 known answers (Appendix B and C.1) and random
// cases against the reference model; checks that done comes exactly ten
// cycles after start and that start is ignored while busy.
`timescale 1ns / 1ps
module tb_aes128_core;
  import aes_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [127:0] pt, ct;
  logic [1407:0] rks;
  int checks = 0, failures = 0;

  aes128_core dut (.clk, .rst_n, .start, .pt, .round_keys(rks), .busy, .done, .ct);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(input logic [127:0] p, input logic [127:0] exp);
    int cyc;
    @(negedge clk);
    pt = p; start = 1;
    @(negedge clk);
    start = 0;
    pt = ~p;                    // core must have captured pt
    cyc = 1;
    // a second start while busy must be ignored
    start = 1;
    @(negedge clk);
    start = 0;
    cyc++;
    while (!done) begin @(negedge clk); cyc++; end
    // cyc counts falling edges from the one after the capturing rising edge:
    // done seen at falling edge 11 = ten rising edges after capture
    check(cyc == 11, $sformatf("latency %0d", cyc));
    check(ct == exp, $sformatf("ct %h exp %h", ct, exp));
    @(negedge clk);
    check(!busy && !done, "idle after done");
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pt = '0;
    rks = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    rks = ref_expand(128'h2b7e151628aed2a6abf7158809cf4f3c);
    run(128'h3243f6a8885a308d313198a2e0370734, 128'h3925841d02dc09fbdc118597196a0b32);
    rks = ref_expand(128'h000102030405060708090a0b0c0d0e0f);
    run(128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    for (int i = 0; i < 10; i++) begin
      logic [127:0] p;
      for (int w = 0; w < 44; w++) rks[32*w +: 32] = $urandom;
      p = {$urandom, $urandom, $urandom, $urandom};
      run(p, ref_encrypt(p, rks));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
