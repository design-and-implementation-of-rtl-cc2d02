// tb_response_stabilizer: feeds 128 challenges of three random evaluations
// each, with random gaps, and checks the majority key, key_valid timing,
// the vote_done pulses, the disagreement count, and clear.
`timescale 1ns / 1ps
module tb_response_stabilizer;
  logic clk = 0, rst_n = 0, clear = 0, bv = 0, bi = 0;
  logic vote_done, key_valid;
  logic [127:0] key, exp_key;
  logic [7:0] dis;
  int checks = 0, failures = 0, exp_dis = 0, n_done = 0;

  response_stabilizer #(.VOTES(3), .KEY_BITS(128)) dut (.clk, .rst_n, .clear,
    .bit_valid(bv), .bit_in(bi), .vote_done, .key, .key_valid, .disagree_count(dis));

  always #5 clk = ~clk;
  always @(posedge clk) if (vote_done) n_done++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      exp_key = '0; exp_dis = 0; n_done = 0;
      clear = 1; @(negedge clk); clear = 0;
      for (int c = 0; c < 128; c++) begin
        logic [2:0] ev;
        ev = 3'($urandom);
        exp_key = {exp_key[126:0], (int'(ev[0]) + int'(ev[1]) + int'(ev[2])) >= 2};
        if (ev != 3'b000 && ev != 3'b111) exp_dis++;
        for (int e = 0; e < 3; e++) begin
          check(!key_valid, "key_valid early");
          bv = 1; bi = ev[e];
          @(negedge clk);
          bv = 0;
          repeat ($urandom_range(2)) @(negedge clk);
        end
      end
      @(negedge clk);
      check(key_valid, "key_valid");
      check(key == exp_key, $sformatf("key %h exp %h", key, exp_key));
      check(int'(dis) == exp_dis, $sformatf("disagree %0d exp %0d", dis, exp_dis));
      check(n_done == 128, $sformatf("vote_done count %0d", n_done));
      // further bits after the key is complete are ignored
      bv = 1; bi = ~key[0]; @(negedge clk); bv = 0; @(negedge clk);
      check(key == exp_key, "key held");
    end
    clear = 1; @(negedge clk); clear = 0;
    check(!key_valid && key == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
