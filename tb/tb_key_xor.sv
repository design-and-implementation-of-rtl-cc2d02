// tb_key_xor: checks the published example (schedule of key 0x...0abc XOR
// PUF key 0808...08 starts be070e0cea51c6cd665613cc311fc3be b37; with
// 0606...06 it starts b0090002e45fc8c368581dc23f11cdb0 bd7) and random
// round-key sets slice by slice.
`timescale 1ns / 1ps
module tb_key_xor;
  import aes_ref_pkg::*;
  logic [1407:0] rks, fk;
  logic [127:0] pk;
  int checks = 0, failures = 0;

  key_xor dut (.round_keys(rks), .puf_key(pk), .final_keys(fk));

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
    rks = ref_expand(128'habc);
    pk  = {16{8'h08}};
    #1;
    check(fk[1407:1280] == 128'hbe070e0cea51c6cd665613cc311fc3be, "puf1 rk10");
    check(fk[1279:1268] == 12'hb37, "puf1 rk9 prefix");
    pk  = {16{8'h06}};
    #1;
    check(fk[1407:1280] == 128'hb0090002e45fc8c368581dc23f11cdb0, "puf2 rk10");
    check(fk[1279:1268] == 12'hbd7, "puf2 rk9 prefix");
    for (int i = 0; i < 20; i++) begin
      for (int w = 0; w < 44; w++) rks[32*w +: 32] = $urandom;
      pk = {$urandom, $urandom, $urandom, $urandom};
      #1;
      for (int r = 0; r < 11; r++)
        check(fk[128*r +: 128] == (rks[128*r +: 128] ^ pk), "slice");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
