// ro_counter: oscillation counter (Counter1 / Counter2).
//
// Counts rising edges of ro_clk, the selected oscillator output, which
// clocks the counter directly. `clr` clears it asynchronously. The counter
// saturates at 2^CNT_W - 1 rather than wrapping, so a fast oscillator can
// never appear slower than a slow one. The counting window is the time the
// oscillator is enabled: the controller clears the counter while the
// oscillators are stopped, runs them for a fixed number of system-clock
// cycles and reads `count` only after they have stopped again, so `count`
// is stable in the system clock domain when it is read. The 8-bit width is
// the design's; saturation is this block's choice.
`timescale 1ns / 1ps
module ro_counter
  import puf_pkg::*;
#(
  parameter int unsigned CNT_W = CNT_W_DEF
) (
  input  logic             ro_clk,
  input  logic             clr,
  output logic [CNT_W-1:0] count
);

  always_ff @(posedge ro_clk or posedge clr) begin
    if (clr)         count <= '0;
    else if (~&count) count <= count + 1'b1;
  end

endmodule
