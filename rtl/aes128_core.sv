// aes128_core: iterative AES-128 encryption, one round per clock.
//
// On start (accepted when not busy) the core loads pt ^ round key 0 and
// then applies rounds 1..10 in the following ten cycles using one shared
// aes_round; the last skips MixColumns. done pulses for one cycle together
// with a valid ct exactly ROUNDS cycles after the start cycle; ct holds its
// value until the next result. round_keys must stay stable while busy; it
// packs round key r at round_keys[128*r +: 128]. The ten rounds are the
// design's; doing one round per cycle is this implementation's choice.
`timescale 1ns / 1ps
module aes128_core
  import aes_pkg::*;
#(
  parameter int unsigned ROUNDS = NROUNDS
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  block_t                pt,
  input  logic [SCHED_BITS-1:0] round_keys,
  output logic                  busy,
  output logic                  done,
  output block_t                ct
);

  block_t state, next_state;
  logic [3:0] round;  // round being applied next, 1..ROUNDS

  aes_round u_round (
    .state_in   (state),
    .round_key  (round_keys[BLOCK_BITS*round +: BLOCK_BITS]),
    .final_round(round == 4'(ROUNDS)),
    .state_out  (next_state)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0;
      round <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      ct    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          state <= pt ^ round_keys[BLOCK_BITS-1:0];
          round <= 4'd1;
          busy  <= 1'b1;
        end
      end else begin
        state <= next_state;
        if (round == 4'(ROUNDS)) begin
          busy <= 1'b0;
          done <= 1'b1;
          ct   <= next_state;
          round <= '0;
        end else begin
          round <= round + 4'd1;
        end
      end
    end
  end

endmodule
