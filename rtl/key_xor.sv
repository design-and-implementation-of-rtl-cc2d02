// key_xor: binds the AES key schedule to the chip.
//
// The 128-bit PUF key is repeated eleven times and XORed into the 1408-bit
// key schedule, so every round key the AES core uses is
//   final_keys[128*r +: 128] = round_keys[128*r +: 128] ^ puf_key.
// The same user key therefore yields different round keys on different
// chips. Purely combinational.
`timescale 1ns / 1ps
module key_xor
  import aes_pkg::*;
(
  input  logic [SCHED_BITS-1:0] round_keys,
  input  block_t                puf_key,
  output logic [SCHED_BITS-1:0] final_keys
);

  assign final_keys = round_keys ^ {(NROUNDS + 1){puf_key}};

endmodule
