// dcu: behavioural model of one delay configurable unit (DCU) of the hybrid
// configurable ring oscillator. Not synthesizable logic: a DCU's purpose is
// its delay, which only # delays can express.
//
// Each DCU has two gates. The first combines the stage input RO_I with the
// configuration bit CI, the second combines that result with RO_I again to
// give RO_F. Logically RO_F is RO_I (DCU-2, DCU-4) or its inverse (DCU-1,
// DCU-3); CI only decides whether the first gate lies on the path of one
// edge direction, and so changes the delay. DCU-2 follows the published
// description (AND_OUT = RO_I & CI, RO_F = AND_OUT | RO_I: with CI = 1 a
// falling RO_I must first pass the AND). The others are this model's
// choices: DCU-1 = AND then NOR, DCU-3 = OR then NAND, DCU-4 = OR then AND
// (OR_OUT = RO_I | ~CI, so with CI = 1 a rising RO_I passes the OR first).
//
// D1_PS/D2_PS are the two gates' delays in ps; each transition gets up to
// JITTER_PS of extra random delay (thermal noise). Transport delays.
`timescale 1ns / 1ps
module dcu
  import puf_pkg::*;
#(
  parameter dcu_kind_e   KIND      = DCU2,
  parameter int unsigned D1_PS     = 100,
  parameter int unsigned D2_PS     = 100,
  parameter int unsigned JITTER_PS = 0
) (
  input  logic ro_i,
  input  logic ci,
  output logic ro_f
);

  logic g1;

  function automatic realtime dly(input int unsigned base_ps);
    int unsigned j;
    j = (JITTER_PS == 0) ? 0 : $urandom_range(JITTER_PS);
    return realtime'(base_ps + j) / 1000.0;
  endfunction

  // Each gate evaluates once at time 0 and then on every input change.
  always begin
    case (KIND)
      DCU1, DCU2: g1 <= #(dly(D1_PS)) ro_i & ci;
      default:    g1 <= #(dly(D1_PS)) ro_i | ~ci;
    endcase
    @(ro_i or ci);
  end

  always begin
    case (KIND)
      DCU1:    ro_f <= #(dly(D2_PS)) ~(g1 | ro_i);
      DCU2:    ro_f <= #(dly(D2_PS)) g1 | ro_i;
      DCU3:    ro_f <= #(dly(D2_PS)) ~(g1 & ro_i);
      default: ro_f <= #(dly(D2_PS)) g1 & ro_i;
    endcase
    @(ro_i or g1);
  end

endmodule
