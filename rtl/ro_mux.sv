// ro_mux: the two oscillator multiplexers in front of the counters.
//
// ro_a = ro_f[sel_a] feeds Counter1, ro_b = ro_f[sel_b] feeds Counter2.
// Purely combinational. The outputs clock the counters, so in silicon these
// would be balanced, glitch-free clock multiplexers; the selects only change
// while all oscillators are stopped (outputs held high).
`timescale 1ns / 1ps
module ro_mux
  import puf_pkg::*;
#(
  parameter int unsigned N_RO  = N_RO_DEF,
  parameter int unsigned SEL_W = (N_RO > 1) ? $clog2(N_RO) : 1
) (
  input  logic [N_RO-1:0]  ro_f,
  input  logic [SEL_W-1:0] sel_a,
  input  logic [SEL_W-1:0] sel_b,
  output logic             ro_a,
  output logic             ro_b
);

  assign ro_a = ro_f[sel_a];
  assign ro_b = ro_f[sel_b];

endmodule
