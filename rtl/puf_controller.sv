// puf_controller: sequencer of the ring-oscillator PUF.
//
// One evaluation of a challenge takes 1 + WINDOW_CYCLES + SETTLE_CYCLES + 2
// clock cycles:
//   CLEAR  (1 cycle)        cnt_clr high: both counters cleared, oscillators off
//   OSC    (WINDOW_CYCLES)  osc_en high: the selected pair oscillates and is counted
//   SETTLE (SETTLE_CYCLES)  oscillators off again; counters come to rest
//   SAMPLE (1 cycle)        sample high: comparator output handed to the stabiliser
//   CHECK  (1 cycle)        the stabiliser's vote_done is seen; if the vote
//                           for this challenge is complete the challenge
//                           advances (or, after the last one, done pulses)
// then back to CLEAR. start (in IDLE) pulses ch_clear to restart the
// challenge counter and the key register. busy is high from the cycle after
// start until done. The counting window being a fixed time is the design's;
// the state sequence, window and settle lengths are this block's choices.
`timescale 1ns / 1ps
module puf_controller #(
  parameter int unsigned WINDOW_CYCLES = 32,
  parameter int unsigned SETTLE_CYCLES = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic last_challenge,
  input  logic vote_done,
  output logic osc_en,
  output logic cnt_clr,
  output logic sample,
  output logic advance,
  output logic ch_clear,
  output logic busy,
  output logic done
);

  typedef enum logic [2:0] {IDLE, CLEAR, OSC, SETTLE, SAMPLE, CHECK} state_e;

  localparam int unsigned TW = $clog2((WINDOW_CYCLES > SETTLE_CYCLES ? WINDOW_CYCLES : SETTLE_CYCLES) + 1);

  state_e        state;
  logic [TW-1:0] timer;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      timer <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE:   if (start) state <= CLEAR;
        CLEAR: begin
          state <= OSC;
          timer <= TW'(WINDOW_CYCLES - 1);
        end
        OSC: begin
          if (timer == '0) begin
            state <= SETTLE;
            timer <= TW'(SETTLE_CYCLES - 1);
          end else timer <= timer - 1'b1;
        end
        SETTLE: begin
          if (timer == '0) state <= SAMPLE;
          else timer <= timer - 1'b1;
        end
        SAMPLE: state <= CHECK;
        CHECK: begin
          if (vote_done && last_challenge) begin
            state <= IDLE;
            done  <= 1'b1;
          end else state <= CLEAR;
        end
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    osc_en   = (state == OSC);
    cnt_clr  = (state == CLEAR);
    sample   = (state == SAMPLE);
    advance  = (state == CHECK) && vote_done && !last_challenge;
    ch_clear = (state == IDLE) && start;
    busy     = (state != IDLE);
  end

endmodule
