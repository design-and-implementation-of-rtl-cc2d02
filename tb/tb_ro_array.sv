// tb_ro_array: exercises the behavioural ring oscillator array.
// Checks that a disabled oscillator holds its output high, that each enable
// starts only its own oscillator, that an enabled one oscillates, that its period stays inside the range its gate delays
// allow (6 to 11 gate delays per half period), that CI changes the
// frequency, that the oscillators of one chip differ, and that two chips
// (two seeds) differ.
`timescale 1ns / 1ps
module tb_ro_array;
  localparam int N = 4;
  logic [N-1:0] en_a = '0, en_b = '0, f_a, f_b;
  logic [4:0] ci = '0;
  int checks = 0, failures = 0;
  int cnt_a [N];
  int cnt_b [N];
  int per_ci [32];
  int distinct;

  ro_array #(.N_RO(N), .SEED(1)) chip_a (.ro_en(en_a), .ci, .ro_f(f_a));
  ro_array #(.N_RO(N), .SEED(2)) chip_b (.ro_en(en_b), .ci, .ro_f(f_b));

  for (genvar k = 0; k < N; k++) begin : g_cnt
    always @(posedge f_a[k]) cnt_a[k]++;
    always @(posedge f_b[k]) cnt_b[k]++;
  end

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
    for (int k = 0; k < N; k++) begin cnt_a[k] = 0; cnt_b[k] = 0; end
    #50;
    check(f_a == '1 && f_b == '1, "disabled outputs high");
    for (int k = 0; k < N; k++) begin cnt_a[k] = 0; end
    #200;
    check(cnt_a[0] == 0, "no edges while disabled");
    // each enable starts only its own oscillator
    for (int k = 0; k < N; k++) begin
      for (int j = 0; j < N; j++) cnt_a[j] = 0;
      en_a = 4'b1 << k;
      #100;
      en_a = '0;
      #10;
      for (int j = 0; j < N; j++)
        check((cnt_a[j] > 0) == (j == k), $sformatf("enable %0d: ro%0d count %0d", k, j, cnt_a[j]));
    end
    // every oscillator, every configuration, 200 ns window
    for (int c = 0; c < 32; c++) begin
      ci = 5'(c);
      #5;
      for (int k = 0; k < N; k++) begin cnt_a[k] = 0; cnt_b[k] = 0; end
      en_a = '1; en_b = '1;
      #200;
      en_a = '0; en_b = '0;
      #10;
      check(f_a == '1 && f_b == '1, "outputs high after disable");
      for (int k = 0; k < N; k++) begin
        // half period between 6*120 ps and 11*140 ps: 200 ns / 3.08 .. 1.44 ns
        check(cnt_a[k] >= 60 && cnt_a[k] <= 140, $sformatf("ro%0d ci=%0d count %0d", k, c, cnt_a[k]));
      end
      per_ci[c] = cnt_a[0];
      distinct = 0;
      for (int k = 1; k < N; k++) if (cnt_a[k] != cnt_a[0]) distinct++;
      for (int k = 0; k < N; k++) if (cnt_a[k] != cnt_b[k]) distinct++;
      check(distinct > 0, $sformatf("oscillators differ at ci=%0d", c));
    end
    distinct = 0;
    for (int c = 1; c < 32; c++) if (per_ci[c] != per_ci[0]) distinct++;
    check(distinct >= 16, "CI changes the frequency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
