// tb_hw_comparator: all 65536 pairs of 8-bit counts against the
// arithmetic comparison.
`timescale 1ns / 1ps
module tb_hw_comparator;
  logic [7:0] a, b;
  logic agb, alb, aeb, resp;
  int checks = 0, failures = 0;

  hw_comparator #(.CNT_W(8)) dut (.a, .b, .agb, .alb, .aeb, .response(resp));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (agb !== (i > j) || alb !== (i < j) || aeb !== (i == j) || resp !== (i > j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d %0d: %b%b%b %b", i, j, agb, alb, aeb, resp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
