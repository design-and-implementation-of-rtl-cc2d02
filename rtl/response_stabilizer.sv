// response_stabilizer: response stabilisation and key formation.
//
// Each challenge is evaluated VOTES times. Every evaluation arrives as a
// bit_in with a one-cycle bit_valid. After the VOTES-th evaluation the
// majority bit (more than VOTES/2 ones) is shifted into the key register
// from the LSB side, so the first challenge ends up in key[KEY_BITS-1]; a
// one-cycle vote_done pulse follows on the next cycle. When KEY_BITS voted
// bits have been collected key_valid rises and stays high until `clear`.
// disagree_count counts (saturating) the challenges whose evaluations were
// not unanimous, a measure of how noisy the chip's responses are. The
// 128-bit key and bit-by-bit concatenation are the design's; majority
// voting as the "optional filtering" and VOTES = 3 are this block's choice
// (VOTES = 1 turns filtering off).
`timescale 1ns / 1ps
module response_stabilizer
  import puf_pkg::*;
#(
  parameter int unsigned VOTES    = 3,
  parameter int unsigned KEY_BITS = KEY_BITS_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                bit_valid,
  input  logic                bit_in,
  output logic                vote_done,
  output logic [KEY_BITS-1:0] key,
  output logic                key_valid,
  output logic [7:0]          disagree_count
);

  localparam int unsigned VW = $clog2(VOTES + 1);
  localparam int unsigned BW = $clog2(KEY_BITS + 1);

  logic [VW-1:0] n_eval, n_ones, ones_now;
  logic [BW-1:0] n_bits;
  logic          last_eval, voted;

  always_comb begin
    ones_now  = n_ones + VW'(bit_in);
    last_eval = (n_eval == VW'(VOTES - 1));
    voted     = (int'(ones_now) * 2 > int'(VOTES));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_eval         <= '0;
      n_ones         <= '0;
      n_bits         <= '0;
      key            <= '0;
      key_valid      <= 1'b0;
      vote_done      <= 1'b0;
      disagree_count <= '0;
    end else begin
      vote_done <= 1'b0;
      if (clear) begin
        n_eval         <= '0;
        n_ones         <= '0;
        n_bits         <= '0;
        key            <= '0;
        key_valid      <= 1'b0;
        disagree_count <= '0;
      end else if (bit_valid && !key_valid) begin
        if (last_eval) begin
          n_eval    <= '0;
          n_ones    <= '0;
          key       <= {key[KEY_BITS-2:0], voted};
          n_bits    <= n_bits + 1'b1;
          key_valid <= (n_bits == BW'(KEY_BITS - 1));
          vote_done <= 1'b1;
          if (ones_now != '0 && ones_now != VW'(VOTES) && disagree_count != 8'hff)
            disagree_count <= disagree_count + 8'd1;
        end else begin
          n_eval <= n_eval + 1'b1;
          n_ones <= ones_now;
        end
      end
    end
  end

endmodule
