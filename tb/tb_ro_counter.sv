// tb_ro_counter: counts bursts of edges of various lengths, checks the
// asynchronous clear and saturation at 255.
`timescale 1ns / 1ps
module tb_ro_counter;
  logic ro = 1, clr = 0;
  logic [7:0] cnt;
  int checks = 0, failures = 0;

  ro_counter #(.CNT_W(8)) dut (.ro_clk(ro), .clr, .count(cnt));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (count %0d)", what, cnt); end
  endtask

  task automatic pulses(input int n);
    for (int i = 0; i < n; i++) begin
      #0.7 ro = 0;
      #0.7 ro = 1;
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 clr = 1; #1 clr = 0; #1;
    check(cnt == 0, "cleared");
    for (int t = 0; t < 20; t++) begin
      int n;
      n = $urandom_range(200);
      clr = 1; #1 clr = 0; #1;
      pulses(n);
      #1;
      check(cnt == 8'(n), $sformatf("count of %0d edges", n));
    end
    clr = 1; #1 clr = 0; #1;
    pulses(300);
    #1;
    check(cnt == 8'd255, "saturates");
    clr = 1; #1;
    check(cnt == 0, "async clear while high");
    clr = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
