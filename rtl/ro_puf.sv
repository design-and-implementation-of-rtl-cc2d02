// ro_puf: the configurable ring-oscillator PUF, challenge in, 128-bit key out.
//
// A start pulse runs all 2^7 = 128 challenges in order. For each challenge
// the challenge generator sets the delay configuration CI of the ring
// oscillator array and picks a pair of oscillators; the two multiplexers
// route that pair into Counter1 and Counter2; the controller runs the pair
// for a fixed window; the comparator says which one counted more, and the
// response stabiliser takes a majority over VOTES such evaluations and
// shifts the bit into the key. key_valid rises when all KEY_BITS bits are in
// (KEY_BITS * VOTES * (WINDOW_CYCLES + SETTLE_CYCLES + 3) cycles after the
// clock edge that takes start, 14976 at the defaults) and the key stays in the register until the next start.
// Only the selected pair oscillates (ro_en = pair mask AND OSC_EN).
//
// The ring oscillator array is a behavioural (timed) model; SEED and the
// delay parameters choose which simulated chip it is. Everything else is
// synthesizable. The counters are clocked by the oscillator outputs.
`timescale 1ns / 1ps
module ro_puf
  import puf_pkg::*;
#(
  parameter int unsigned N_RO          = N_RO_DEF,
  parameter int unsigned CNT_W         = CNT_W_DEF,
  parameter int unsigned KEY_BITS      = KEY_BITS_DEF,
  parameter int unsigned CH_W          = $clog2(KEY_BITS),
  parameter int unsigned WINDOW_CYCLES = 32,
  parameter int unsigned SETTLE_CYCLES = 4,
  parameter int unsigned VOTES         = 3,
  parameter int unsigned SEED          = 1,
  parameter int unsigned D_NOM_PS      = 120,
  parameter int unsigned D_SPREAD_PS   = 20,
  parameter int unsigned JITTER_PS     = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  output logic                busy,
  output logic                key_valid,
  output logic [KEY_BITS-1:0] key,
  output logic [7:0]          disagree_count
);

  localparam int unsigned SEL_W = (N_RO > 1) ? $clog2(N_RO) : 1;

  logic [CH_W-1:0]  challenge;
  logic [CI_W-1:0]  ci;
  logic [SEL_W-1:0] sel_a, sel_b;
  logic [N_RO-1:0]  ro_sel, ro_en, ro_f;
  logic             last_challenge;
  logic             osc_en, cnt_clr, sample, advance, ch_clear, vote_done, done;
  logic             ro_a, ro_b;
  logic [CNT_W-1:0] cnt1, cnt2;
  logic             agb, alb, aeb, response;

  puf_controller #(.WINDOW_CYCLES(WINDOW_CYCLES), .SETTLE_CYCLES(SETTLE_CYCLES)) u_ctrl (
    .clk, .rst_n, .start, .last_challenge, .vote_done,
    .osc_en, .cnt_clr, .sample, .advance, .ch_clear, .busy, .done
  );

  challenge_gen #(.N_RO(N_RO), .CH_W(CH_W)) u_chal (
    .clk, .rst_n, .clear(ch_clear), .advance,
    .challenge, .ci, .sel_a, .sel_b, .ro_sel, .last(last_challenge)
  );

  assign ro_en = ro_sel & {N_RO{osc_en}};

  ro_array #(
    .N_RO(N_RO), .SEED(SEED), .D_NOM_PS(D_NOM_PS),
    .D_SPREAD_PS(D_SPREAD_PS), .JITTER_PS(JITTER_PS)
  ) u_ros (
    .ro_en, .ci, .ro_f
  );

  ro_mux #(.N_RO(N_RO)) u_mux (
    .ro_f, .sel_a, .sel_b, .ro_a, .ro_b
  );

  ro_counter #(.CNT_W(CNT_W)) u_cnt1 (.ro_clk(ro_a), .clr(cnt_clr), .count(cnt1));
  ro_counter #(.CNT_W(CNT_W)) u_cnt2 (.ro_clk(ro_b), .clr(cnt_clr), .count(cnt2));

  hw_comparator #(.CNT_W(CNT_W)) u_cmp (
    .a(cnt1), .b(cnt2), .agb, .alb, .aeb, .response
  );

  response_stabilizer #(.VOTES(VOTES), .KEY_BITS(KEY_BITS)) u_stab (
    .clk, .rst_n, .clear(ch_clear), .bit_valid(sample), .bit_in(response),
    .vote_done, .key, .key_valid, .disagree_count
  );

endmodule
