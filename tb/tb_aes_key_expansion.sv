// tb_aes_key_expansion: checks the whole schedule against FIPS-197
// (round key 10 of key 2b7e1516... is d014f9a8c9ee2589e13f0cc8b6630ca6),
// against the published result for key 0x...0abc (round key 10 =
// b60f0604e259cec56e5e1bc43917cbb6, round key 9 starting bb7) and against
// the reference model for random keys.
`timescale 1ns / 1ps
module tb_aes_key_expansion;
  import aes_ref_pkg::*;
  logic [127:0] key;
  logic [1407:0] rks;
  int checks = 0, failures = 0;

  aes_key_expansion dut (.key(key), .round_keys(rks));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    #1;
    check(rks[1407:1280] == 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "fips rk10");
    check(rks[127:0] == key, "rk0 = key");
    key = 128'h00000000000000000000000000000abc;
    #1;
    check(rks[1407:1280] == 128'hb60f0604e259cec56e5e1bc43917cbb6, "abc rk10");
    check(rks[1279:1268] == 12'hbb7, "abc rk9 prefix");
    for (int i = 0; i < 30; i++) begin
      key = {$urandom, $urandom, $urandom, $urandom};
      #1;
      check(rks == ref_expand(key), "random key");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
