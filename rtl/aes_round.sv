// aes_round: one AES encryption round, combinational.
//
// SubBytes (16 computed S-boxes), ShiftRows, MixColumns and AddRoundKey, in
// that order. With final_round set MixColumns is skipped, as the tenth
// round of AES does. The state is column-major as in FIPS-197: byte
// (row r, column c) is state[127-8*(4*c+r) -: 8].
`timescale 1ns / 1ps
module aes_round
  import aes_pkg::*;
(
  input  block_t state_in,
  input  block_t round_key,
  input  logic   final_round,
  output block_t state_out
);

  byte_t sb [16];
  byte_t sr [16];
  byte_t mc [16];
  block_t mixed;

  always_comb begin
    // SubBytes
    for (int i = 0; i < 16; i++) sb[i] = sbox(state_in[127-8*i -: 8]);
    // ShiftRows: row r of column c comes from column (c + r) mod 4
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        sr[4*c+r] = sb[4*((c + r) % 4) + r];
    // MixColumns
    for (int c = 0; c < 4; c++) begin
      mc[4*c+0] = xtime(sr[4*c+0]) ^ (xtime(sr[4*c+1]) ^ sr[4*c+1]) ^ sr[4*c+2] ^ sr[4*c+3];
      mc[4*c+1] = sr[4*c+0] ^ xtime(sr[4*c+1]) ^ (xtime(sr[4*c+2]) ^ sr[4*c+2]) ^ sr[4*c+3];
      mc[4*c+2] = sr[4*c+0] ^ sr[4*c+1] ^ xtime(sr[4*c+2]) ^ (xtime(sr[4*c+3]) ^ sr[4*c+3]);
      mc[4*c+3] = (xtime(sr[4*c+0]) ^ sr[4*c+0]) ^ sr[4*c+1] ^ sr[4*c+2] ^ xtime(sr[4*c+3]);
    end
    for (int i = 0; i < 16; i++) mixed[127-8*i -: 8] = final_round ? sr[i] : mc[i];
    // AddRoundKey
    state_out = mixed ^ round_key;
  end

endmodule
