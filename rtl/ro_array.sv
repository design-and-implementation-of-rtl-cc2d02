// ro_array: behavioural model of the configurable ring oscillator array.
//
// N_RO hybrid configurable ring oscillators (hc_ro), all sharing the delay
// configuration CI, each with its own enable. Oscillator k of chip SEED has
// its own fixed set of gate delays, so equal-looking oscillators run at
// slightly different frequencies: this difference is the PUF's entropy.
// An oscillator whose enable is low holds its output high.
`timescale 1ns / 1ps
module ro_array
  import puf_pkg::*;
#(
  parameter int unsigned N_RO        = N_RO_DEF,
  parameter int unsigned SEED        = 1,
  parameter int unsigned D_NOM_PS    = 120,
  parameter int unsigned D_SPREAD_PS = 20,
  parameter int unsigned JITTER_PS   = 2
) (
  input  logic [N_RO-1:0] ro_en,
  input  logic [CI_W-1:0] ci,
  output logic [N_RO-1:0] ro_f
);

  for (genvar k = 0; k < N_RO; k++) begin : g_ro
    hc_ro #(
      .SEED(SEED), .RO_IDX(k), .D_NOM_PS(D_NOM_PS),
      .D_SPREAD_PS(D_SPREAD_PS), .JITTER_PS(JITTER_PS)
    ) u_ro (
      .ro_en(ro_en[k]),
      .ci   (ci),
      .ro_f (ro_f[k])
    );
  end

endmodule
