// freq_phase_synth: dual output dynamic frequency/phase tuning synthesizer.
//
// Six smooth charge phase blenders take the six delay line phases o[1..6]
// (o[6] doubles as phase 0 of the next period) and produce twelve phases
// p[0..11], each one twelfth of the reference period apart:
//   p[2k] = buffered o[k] (o[0] taken as o[6]), p[2k+1] = blend(o[k], o[k+1]).
// Two independent edge combiners turn the twelve phases into clkout1 and
// clkout2 as programmed by s1 and s2 (factor 0.5x, 1x, 1.5x, 2x, 3x or 6x of
// REFCLK, one of 12/(2*factor) phases each). More outputs would only need
// more edge combiners on the same phase bus. Structure from the source
// design; the numbering of the phases is this design's choice.
module freq_phase_synth
  import dfs_pkg::*;
(
  input  logic                  rst_n,
  input  logic [N_DDL_PHASES:1] o,
  input  logic                  sel_t2,
  input  logic [N_PHASES-1:0]   s1,
  input  logic [N_PHASES-1:0]   s2,
  output logic [N_PHASES-1:0]   p,
  output logic                  clkout1,
  output logic                  clkout2
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N_DDL_PHASES:0] oo;
  assign oo = {o, o[N_DDL_PHASES]};   // oo[0] = o[6], oo[k] = o[k]

  for (genvar k = 0; k < N_DDL_PHASES; k++) begin : g_blend
    scpb u_scpb (.a(oo[k]), .b(oo[k+1]), .sel_t2(sel_t2), .oa(p[2*k]), .oab(p[2*k+1]));
  end

  edge_combiner u_ec1 (.rst_n(rst_n), .p(p), .s(s1), .clkout(clkout1));
  edge_combiner u_ec2 (.rst_n(rst_n), .p(p), .s(s2), .clkout(clkout2));
endmodule
