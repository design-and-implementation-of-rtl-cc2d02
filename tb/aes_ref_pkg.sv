// aes_ref_pkg: reference AES-128 model for the testbenches.
//
// Written independently of the RTL: the S-box is built from exponent and
// logarithm tables of the generator 0x03 of GF(2^8) (inverse of g^k is
// g^(255-k)), then the affine map; rounds operate on a 4x4 byte matrix.
// Round key r of a schedule is returned as a 128-bit block.
`timescale 1ns / 1ps
package aes_ref_pkg;

  typedef logic [127:0] blk_t;

  function automatic logic [7:0] ref_mul2(input logic [7:0] a);
    ref_mul2 = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] a);
    logic [7:0] e [256];
    logic [7:0] l [256];
    logic [7:0] g, inv, s;
    g = 8'h01;
    for (int k = 0; k < 255; k++) begin
      e[k] = g;
      l[g] = 8'(k);
      g = ref_mul2(g) ^ g;  // multiply by 3
    end
    inv = (a == 0) ? 8'h00 : e[(255 - int'(l[a])) % 255];
    s = 8'h63;
    for (int i = 0; i < 8; i++)
      s[i] = s[i] ^ inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return s;
  endfunction

  // Schedule packed like the RTL: round key r at [128*r +: 128].
  function automatic logic [1407:0] ref_expand(input blk_t key);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0] rc;
    logic [1407:0] out;
    rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0]), ref_sbox(t[31:24])};
        t[31:24] ^= rc;
        rc = ref_mul2(rc);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) out[128*r +: 128] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    return out;
  endfunction

  function automatic blk_t ref_round(input blk_t st, input blk_t rk, input bit last);
    logic [7:0] m [4][4];  // m[row][col]
    logic [7:0] n [4][4];
    logic [7:0] a0, a1, a2, a3;
    blk_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) m[r][c] = ref_sbox(st[127-8*(4*c+r) -: 8]);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) n[r][c] = m[r][(c+r)%4];
    if (!last)
      for (int c = 0; c < 4; c++) begin
        a0 = n[0][c]; a1 = n[1][c]; a2 = n[2][c]; a3 = n[3][c];
        n[0][c] = ref_mul2(a0 ^ a1) ^ a1 ^ a2 ^ a3;
        n[1][c] = ref_mul2(a1 ^ a2) ^ a2 ^ a3 ^ a0;
        n[2][c] = ref_mul2(a2 ^ a3) ^ a3 ^ a0 ^ a1;
        n[3][c] = ref_mul2(a3 ^ a0) ^ a0 ^ a1 ^ a2;
      end
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) o[127-8*(4*c+r) -: 8] = n[r][c];
    return o ^ rk;
  endfunction

  function automatic blk_t ref_encrypt(input blk_t pt, input logic [1407:0] rks);
    blk_t s;
    s = pt ^ rks[127:0];
    for (int r = 1; r <= 10; r++) s = ref_round(s, rks[128*r +: 128], r == 10);
    return s;
  endfunction

endpackage
