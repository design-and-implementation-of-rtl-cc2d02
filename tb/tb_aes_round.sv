// tb_aes_round: checks a full and a final round against FIPS-197 round
// values and random states against the reference model.
`timescale 1ns / 1ps
module tb_aes_round;
  import aes_ref_pkg::*;
  logic [127:0] si, rk, so;
  logic fin;
  int checks = 0, failures = 0;

  aes_round dut (.state_in(si), .round_key(rk), .final_round(fin), .state_out(so));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: %h", what, so); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // FIPS-197 Appendix B, round 1: start 193de3be..., key a0fafe17...
    si = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    rk = 128'ha0fafe1788542cb123a339392a6c7605;
    fin = 1'b0;
    #1;
    check(so == 128'ha49c7ff2689f352b6b5bea43026a5049, "fips round 1");
    // round 10
    si = 128'heb40f21e592e38848ba113e71bc342d2;
    rk = 128'hd014f9a8c9ee2589e13f0cc8b6630ca6;
    fin = 1'b1;
    #1;
    check(so == 128'h3925841d02dc09fbdc118597196a0b32, "fips round 10");
    for (int i = 0; i < 50; i++) begin
      si  = {$urandom, $urandom, $urandom, $urandom};
      rk  = {$urandom, $urandom, $urandom, $urandom};
      fin = 1'($urandom);
      #1;
      check(so == ref_round(si, rk, fin), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
