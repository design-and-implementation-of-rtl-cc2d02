// tb_puf_controller: runs the controller against a model of the vote
// counter (vote complete every third sample) and a challenge counter, and
// checks the phase lengths (clear 1, window 32, settle 4), that osc_en and
// cnt_clr never overlap, the number of samples and advances, busy and the
// total run length of 128 * 3 * 39 cycles.
`timescale 1ns / 1ps
module tb_puf_controller;
  localparam int W = 32, S = 4;
  logic clk = 0, rst_n = 0, start = 0, last_ch, vote_done = 0;
  logic osc_en, cnt_clr, sample, advance, ch_clear, busy, done;
  int checks = 0, failures = 0;
  int ch = 0, votes = 0, n_sample = 0, n_adv = 0, osc_run = 0, settle_run = 0, cyc = 0;
  int bad_window = 0, bad_settle = 0, overlap = 0;
  bit in_settle = 0;

  puf_controller #(.WINDOW_CYCLES(W), .SETTLE_CYCLES(S)) dut (.clk, .rst_n, .start,
    .last_challenge(last_ch), .vote_done, .osc_en, .cnt_clr, .sample, .advance,
    .ch_clear, .busy, .done);

  assign last_ch = (ch == 127);
  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    vote_done <= 1'b0;
    if (ch_clear) begin ch <= 0; votes <= 0; end
    if (advance) ch <= ch + 1;
    if (sample) begin
      n_sample++;
      if (votes == 2) begin votes <= 0; vote_done <= 1'b1; end
      else votes <= votes + 1;
    end
    if (advance) n_adv++;
    if (osc_en && cnt_clr) overlap++;
    if (osc_en) osc_run++;
    else if (osc_run != 0) begin
      if (osc_run != W) bad_window++;
      osc_run = 0;
      in_settle = 1;
      settle_run = 0;
    end
    if (in_settle) begin
      if (sample) begin
        if (settle_run != S) bad_settle++;
        in_settle = 0;
      end else settle_run++;
    end
    if (busy) cyc++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy && !osc_en, "idle");
    start = 1; @(negedge clk); start = 0;
    check(busy, "busy after start");
    while (!done) @(negedge clk);
    @(negedge clk);
    check(!busy, "idle after done");
    check(n_sample == 384, $sformatf("samples %0d", n_sample));
    check(n_adv == 127, $sformatf("advances %0d", n_adv));
    check(bad_window == 0, "window length");
    check(bad_settle == 0, "settle length");
    check(overlap == 0, "osc_en with cnt_clr");
    check(cyc == 384 * (W + S + 3), $sformatf("busy cycles %0d", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
