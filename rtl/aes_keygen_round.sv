// aes_keygen_round: one step ("Keygen") of the AES-128 key expansion.
//
// From round key i it forms round key i+1 as in FIPS-197:
//   t  = SubWord(RotWord(w3)) ^ {RCON, 24'h0}
//   w0' = w0 ^ t, w1' = w1 ^ w0', w2' = w2 ^ w1', w3' = w3 ^ w2'
// Ten of these, with RCON = 01, 02, 04, ..., 36, make the whole schedule.
// Purely combinational; the design names these blocks Keygen1..Keygen10 and
// the arithmetic inside is the standard's.
`timescale 1ns / 1ps
module aes_keygen_round
  import aes_pkg::*;
#(
  parameter byte_t RCON = 8'h01
) (
  input  block_t key_in,
  output block_t key_out
);

  word_t w0, w1, w2, w3, t;

  always_comb begin
    {w0, w1, w2, w3} = key_in;
    t = sub_word(rot_word(w3)) ^ {RCON, 24'h000000};
    w0 = w0 ^ t;
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    key_out = {w0, w1, w2, w3};
  end

endmodule
