// puf_pkg: constants shared by the ring-oscillator PUF blocks, and the
// deterministic "process variation" used by the ring oscillator model.
//
// gate_offset_ps() is a small integer hash of (chip seed, oscillator, gate)
// that the behavioural ring oscillator adds to each gate's nominal delay.
// One seed stands for one manufactured chip: the same seed always gives the
// same delays, different seeds give unrelated ones. It is elaboration-time
// only and does not describe hardware.
`timescale 1ns / 1ps
package puf_pkg;

  localparam int unsigned CI_W       = 5;    // CI[4:0]: five DCU stages
  localparam int unsigned N_DCU      = 5;
  localparam int unsigned N_RO_DEF   = 4;    // en1..en4, RO_F1..RO_F4
  localparam int unsigned CNT_W_DEF  = 8;    // cnt1[7:0], cnt2[7:0]
  localparam int unsigned KEY_BITS_DEF = 128;

  // DCU kinds in ring order (first stage after the NAND first).
  typedef enum logic [2:0] {DCU1 = 3'd1, DCU2 = 3'd2, DCU3 = 3'd3, DCU4 = 3'd4} dcu_kind_e;

  function automatic int unsigned mix32(input int unsigned x);
    int unsigned h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Delay offset in ps, 0 .. spread-1, of one gate of one oscillator.
  function automatic int unsigned gate_offset_ps(input int unsigned seed,
                                                 input int unsigned ro,
                                                 input int unsigned gate,
                                                 input int unsigned spread);
    return mix32(seed * 32'h9e3779b9 ^ mix32(ro * 64 + gate + 1)) % spread;
  endfunction

endpackage
