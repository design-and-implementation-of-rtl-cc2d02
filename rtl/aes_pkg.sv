// aes_pkg: shared AES-128 types and byte-level functions.
//
// The S-box is computed, not tabulated: SubBytes is the multiplicative
// inverse in GF(2^8) modulo x^8+x^4+x^3+x+1 (computed as a^254 with six
// multiplications, the squarings being free linear maps), followed by the
// FIPS-197 affine transform. All functions are pure combinational logic and
// synthesize as such. Byte 0 of a 128-bit block is bits [127:120], as in the
// standard's hexadecimal notation.
`timescale 1ns / 1ps
package aes_pkg;

  localparam int unsigned BLOCK_BITS = 128;
  localparam int unsigned NROUNDS    = 10;
  localparam int unsigned SCHED_BITS = (NROUNDS + 1) * BLOCK_BITS;  // 1408

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  // Multiply by x in GF(2^8).
  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t p, t;
    p = '0;
    t = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= t;
      t = xtime(t);
    end
    return p;
  endfunction

  // a^254 = a^-1 (0 maps to 0).
  function automatic byte_t gf_inv(input byte_t a);
    byte_t sq, r;
    sq = gf_mul(a, a);        // a^2
    r  = sq;
    for (int i = 0; i < 6; i++) begin
      sq = gf_mul(sq, sq);    // a^4 .. a^128
      r  = gf_mul(r, sq);
    end
    return r;                 // a^(2+4+...+128) = a^254
  endfunction

  function automatic byte_t sbox(input byte_t a);
    byte_t x, s;
    x = gf_inv(a);
    s = x ^ {x[6:0], x[7]} ^ {x[5:0], x[7:6]} ^ {x[4:0], x[7:5]} ^ {x[3:0], x[7:4]};
    return s ^ 8'h63;
  endfunction

  function automatic word_t sub_word(input word_t w);
    return {sbox(w[31:24]), sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0])};
  endfunction

  function automatic word_t rot_word(input word_t w);
    return {w[23:0], w[31:24]};
  endfunction

  // Round constant of key-expansion round r (1..10).
  function automatic byte_t rcon(input int unsigned r);
    byte_t c;
    c = 8'h01;
    for (int unsigned i = 1; i < r; i++) c = xtime(c);
    return c;
  endfunction

endpackage
