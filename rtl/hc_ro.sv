// hc_ro: behavioural model of one hybrid configurable ring oscillator
// (HC-RO). Not synthesizable: it is a timed model of a gate-level loop.
//
// A leading NAND gate takes RO_EN and the fed-back RO_F; five DCUs follow,
// in the order DCU-3, DCU-2, DCU-1, DCU-4, DCU-2, configured by C1..C5 =
// CI[0]..CI[4]. The loop holds an odd number of inverting units (NAND,
// DCU-3, DCU-1), so it oscillates while RO_EN is high; with RO_EN low RO_F
// settles high and stays there. The 32 values of CI give up to 32 different
// frequencies. Stage order, NAND and the odd-inversion rule follow the
// published structure; the bit order of C1..C5 in CI is this model's choice.
//
// Gate delays are D_NOM_PS plus a per-chip offset from
// puf_pkg::gate_offset_ps(SEED, RO_IDX, gate) below D_SPREAD_PS, which
// stands for process variation; JITTER_PS adds random per-edge noise. The
// loop is a combinational loop on purpose.
`timescale 1ns / 1ps
module hc_ro
  import puf_pkg::*;
#(
  parameter int unsigned SEED        = 1,
  parameter int unsigned RO_IDX      = 0,
  parameter int unsigned D_NOM_PS    = 120,
  parameter int unsigned D_SPREAD_PS = 20,
  parameter int unsigned JITTER_PS   = 2
) (
  input  logic            ro_en,
  input  logic [CI_W-1:0] ci,
  output logic            ro_f
);

  localparam dcu_kind_e KINDS [N_DCU] = '{DCU3, DCU2, DCU1, DCU4, DCU2};

  logic            nand_out;
  logic [N_DCU:0]  stage;     // stage[0] = NAND output, stage[N_DCU] = RO_F

  always begin
    nand_out <= #(realtime'(D_NOM_PS + gate_offset_ps(SEED, RO_IDX, 0, D_SPREAD_PS)) / 1000.0)
                ~(ro_en & ro_f);
    @(ro_en or ro_f);
  end

  assign stage[0] = nand_out;

  for (genvar i = 0; i < N_DCU; i++) begin : g_dcu
    dcu #(
      .KIND     (KINDS[i]),
      .D1_PS    (D_NOM_PS + gate_offset_ps(SEED, RO_IDX, 2*i+1, D_SPREAD_PS)),
      .D2_PS    (D_NOM_PS + gate_offset_ps(SEED, RO_IDX, 2*i+2, D_SPREAD_PS)),
      .JITTER_PS(JITTER_PS)
    ) u_dcu (
      .ro_i(stage[i]),
      .ci  (ci[i]),
      .ro_f(stage[i+1])
    );
  end

  assign ro_f = stage[N_DCU];

endmodule
