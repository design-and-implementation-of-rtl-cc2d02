// tb_aes_keygen_round: checks one key-expansion step against the FIPS-197
// example (key 2b7e1516..., round key 1 = a0fafe17 88542cb1 23a33939
// 2a6c7605) and random keys against the reference model.
`timescale 1ns / 1ps
module tb_aes_keygen_round;
  import aes_ref_pkg::*;
  logic [127:0] kin, kout;
  int checks = 0, failures = 0;
  logic [1407:0] ref_s;

  aes_keygen_round #(.RCON(8'h01)) dut (.key_in(kin), .key_out(kout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    kin = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    #1;
    checks++;
    if (kout !== 128'ha0fafe1788542cb123a339392a6c7605) begin
      failures++; $display("FAIL fips: %h", kout);
    end
    for (int i = 0; i < 50; i++) begin
      kin = {$urandom, $urandom, $urandom, $urandom};
      #1;
      ref_s = ref_expand(kin);
      checks++;
      if (kout !== ref_s[255:128]) begin failures++; $display("FAIL %h -> %h", kin, kout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
