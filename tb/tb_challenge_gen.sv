// tb_challenge_gen: steps through all 128 challenges and checks CI, the
// pair selects, the enable mask and `last` against the {pair, CI}
// encoding; checks clear and that the counter holds without advance.
`timescale 1ns / 1ps
module tb_challenge_gen;
  logic clk = 0, rst_n = 0, clear = 0, advance = 0;
  logic [6:0] challenge;
  logic [4:0] ci;
  logic [1:0] sel_a, sel_b;
  logic [3:0] ro_sel;
  logic last;
  int checks = 0, failures = 0;

  challenge_gen #(.N_RO(4), .CH_W(7)) dut (.clk, .rst_n, .clear, .advance,
    .challenge, .ci, .sel_a, .sel_b, .ro_sel, .last);

  always #5 clk = ~clk;

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
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 128; i++) begin
      int p;
      p = i / 32;
      check(challenge == 7'(i), $sformatf("challenge %0d", i));
      check(ci == 5'(i % 32), "ci");
      check(sel_a == 2'(p) && sel_b == 2'((p + 1) % 4), $sformatf("pair %0d: %0d %0d", i, sel_a, sel_b));
      check(ro_sel == ((4'b1 << p) | (4'b1 << ((p + 1) % 4))), "ro_sel");
      check(last == (i == 127), "last");
      advance = 1;
      @(negedge clk);
      advance = 0;
      @(negedge clk);
    end
    check(challenge == 0, "wraps");
    advance = 1; @(negedge clk); @(negedge clk); @(negedge clk); advance = 0;
    check(challenge == 3, "three advances");
    repeat (3) @(negedge clk);
    check(challenge == 3, "holds");
    clear = 1; advance = 1; @(negedge clk); clear = 0; advance = 0;
    check(challenge == 0, "clear wins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
