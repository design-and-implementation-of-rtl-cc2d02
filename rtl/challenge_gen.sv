// challenge_gen: challenge generator and RO-pair selector.
//
// Holds the current challenge, a CH_W-bit counter stepped by `advance` and
// reset to 0 by `clear`. A challenge is split as {pair, CI}: the low five
// bits are the delay configuration CI[4:0] applied to every oscillator, the
// upper bits choose the pair of oscillators compared. Pair p compares
// oscillator p (MUX1, Counter1) with oscillator (p+1) mod N_RO (MUX2,
// Counter2). With CH_W = 7 and four oscillators this gives 4 x 32 = 128
// challenges, one per key bit. `ro_sel` marks the two oscillators of the
// current pair so that only they are powered. All outputs are registered or
// decoded from the register; `last` is high on the final challenge. That
// the challenges are applied in sequence, one bit each, and that CI has five
// bits is the design's; the split and the pairing are this block's choice.
`timescale 1ns / 1ps
module challenge_gen
  import puf_pkg::*;
#(
  parameter int unsigned N_RO  = N_RO_DEF,
  parameter int unsigned CH_W  = 7,
  parameter int unsigned SEL_W = (N_RO > 1) ? $clog2(N_RO) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             advance,
  output logic [CH_W-1:0]  challenge,
  output logic [CI_W-1:0]  ci,
  output logic [SEL_W-1:0] sel_a,
  output logic [SEL_W-1:0] sel_b,
  output logic [N_RO-1:0]  ro_sel,
  output logic             last
);

  localparam int unsigned PAIR_W = CH_W - CI_W;

  logic [PAIR_W-1:0] pair;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       challenge <= '0;
    else if (clear)   challenge <= '0;
    else if (advance) challenge <= challenge + 1'b1;
  end

  always_comb begin
    ci    = challenge[CI_W-1:0];
    pair  = challenge[CH_W-1:CI_W];
    sel_a = SEL_W'(int'(pair) % N_RO);
    sel_b = SEL_W'((int'(pair) + 1) % N_RO);
    ro_sel = '0;
    ro_sel[sel_a] = 1'b1;
    ro_sel[sel_b] = 1'b1;
    last  = &challenge;
  end

endmodule
