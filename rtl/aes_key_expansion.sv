// aes_key_expansion: the full AES-128 key schedule as a combinational chain.
//
// Ten aes_keygen_round blocks (Keygen1..Keygen10) are chained; the 128-bit
// key is round key 0. The output packs all eleven round keys into 1408 bits
// with round key 10 in the top 128 bits and round key 0 in the bottom
// 128 bits, i.e. round_keys[128*r +: 128] is round key r. The whole schedule
// is available in the same cycle as the key (no clock).
`timescale 1ns / 1ps
module aes_key_expansion
  import aes_pkg::*;
(
  input  block_t                key,
  output logic [SCHED_BITS-1:0] round_keys
);

  block_t rk [NROUNDS+1];

  assign rk[0] = key;

  for (genvar r = 1; r <= NROUNDS; r++) begin : g_keygen
    aes_keygen_round #(.RCON(rcon(r))) u_keygen (
      .key_in (rk[r-1]),
      .key_out(rk[r])
    );
  end

  for (genvar r = 0; r <= NROUNDS; r++) begin : g_pack
    assign round_keys[BLOCK_BITS*r +: BLOCK_BITS] = rk[r];
  end

endmodule
