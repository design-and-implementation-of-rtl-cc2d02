// hw_comparator: magnitude comparator that turns two counts into a
// response bit.
//
// agb = (a > b), alb = (a < b), aeb = (a == b); response = agb, so the bit
// is 1 when the oscillator on Counter1 is faster and 0 when it is slower or
// on a tie. The comparator is one chain over the bits from the MSB down:
// at each bit a "still equal" term and a "greater decided" term are
// updated with one AND-NOT and one OR, i.e. about three gates per bit and
// no subtractor. Combinational. The three outputs and the response rule are
// the design's; the tie rule and the chain structure are this block's.
`timescale 1ns / 1ps
module hw_comparator
  import puf_pkg::*;
#(
  parameter int unsigned CNT_W = CNT_W_DEF
) (
  input  logic [CNT_W-1:0] a,
  input  logic [CNT_W-1:0] b,
  output logic             agb,
  output logic             alb,
  output logic             aeb,
  output logic             response
);

  logic [CNT_W:0] eq;  // eq[i]: bits above i are equal
  logic [CNT_W:0] gt;  // gt[i]: a > b decided on bits above i

  always_comb begin
    eq[CNT_W] = 1'b1;
    gt[CNT_W] = 1'b0;
    for (int i = CNT_W - 1; i >= 0; i--) begin
      gt[i] = gt[i+1] | (eq[i+1] & a[i] & ~b[i]);
      eq[i] = eq[i+1] & ~(a[i] ^ b[i]);
    end
    agb      = gt[0];
    aeb      = eq[0];
    alb      = ~gt[0] & ~eq[0];
    response = agb;
  end

endmodule
