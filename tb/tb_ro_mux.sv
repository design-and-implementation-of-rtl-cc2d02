// tb_ro_mux: every select combination against every input pattern.
`timescale 1ns / 1ps
module tb_ro_mux;
  logic [3:0] f;
  logic [1:0] sa, sb;
  logic a, b;
  int checks = 0, failures = 0;

  ro_mux #(.N_RO(4)) dut (.ro_f(f), .sel_a(sa), .sel_b(sb), .ro_a(a), .ro_b(b));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++)
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          f = 4'(v); sa = 2'(i); sb = 2'(j);
          #1;
          checks++;
          if (a !== v[i] || b !== v[j]) begin
            failures++; $display("FAIL f=%b sa=%0d sb=%0d a=%b b=%b", f, sa, sb, a, b);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
