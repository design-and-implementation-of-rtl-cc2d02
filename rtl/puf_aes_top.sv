// puf_aes_top: ring-oscillator PUF keyed AES-128 encryption.
//
// The chip derives a 128-bit secret from its own ring-oscillator frequency
// differences (ro_puf) whenever keygen_start is pulsed; the secret lives
// only in flip-flops. The user key aes_key_in is expanded into the eleven
// AES-128 round keys (aes_key_expansion, combinational), and the PUF key is
// XORed into every one of them (key_xor). aes128_core then encrypts pt with
// these chip-bound round keys: the same user key gives a different cipher
// on every chip. key_ready is high once the PUF key is formed; pt_valid is
// ignored before that and while the core is busy. ct_valid pulses with ct
// ten cycles after an accepted pt_valid. puf_disagree_count reports how many
// challenges of the last key generation gave non-unanimous evaluations, a
// health indicator of the oscillators' noise margin; it reveals no key bit.
//
// Interface: all signals synchronous to clk, rst_n asynchronous active low.
// The XOR of the PUF key into the round keys follows the published block
// diagram and results; the handshake is this design's choice. SEED selects
// the simulated chip (process variation of the behavioural oscillators).
`timescale 1ns / 1ps
module puf_aes_top
  import aes_pkg::*;
  import puf_pkg::*;
#(
  parameter int unsigned N_RO          = N_RO_DEF,
  parameter int unsigned CNT_W         = CNT_W_DEF,
  parameter int unsigned WINDOW_CYCLES = 32,
  parameter int unsigned VOTES         = 3,
  parameter int unsigned SEED          = 1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   keygen_start,
  output logic   key_ready,
  input  block_t aes_key_in,
  input  logic   pt_valid,
  input  block_t pt,
  output logic   aes_busy,
  output logic   ct_valid,
  output block_t ct,
  output logic [7:0] puf_disagree_count
);

  block_t                puf_key;
  logic                  puf_busy;
  logic [SCHED_BITS-1:0] sched, final_keys;

  ro_puf #(
    .N_RO(N_RO), .CNT_W(CNT_W), .KEY_BITS(BLOCK_BITS),
    .WINDOW_CYCLES(WINDOW_CYCLES), .VOTES(VOTES), .SEED(SEED)
  ) u_puf (
    .clk, .rst_n, .start(keygen_start), .busy(puf_busy),
    .key_valid(key_ready), .key(puf_key), .disagree_count(puf_disagree_count)
  );

  aes_key_expansion u_kexp (.key(aes_key_in), .round_keys(sched));

  key_xor u_kxor (.round_keys(sched), .puf_key, .final_keys);

  aes128_core u_aes (
    .clk, .rst_n, .start(pt_valid && key_ready && !puf_busy), .pt,
    .round_keys(final_keys), .busy(aes_busy), .done(ct_valid), .ct
  );

endmodule
