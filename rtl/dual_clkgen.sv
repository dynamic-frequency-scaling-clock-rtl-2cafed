// dual_clkgen: DLL-based dual output clock generator with dynamic
// frequency/phase tuning.
//
// A six-cell digital delay line delays REFCLK; the digital charge-detecting
// controller sets the coarse stage and fine code of all cells so that the
// line delay equals one REFCLK period, which takes ten REFCLK cycles after
// rst_n is released (locked then rises). The six phases go through the phase
// blenders (twelve phases) to two edge combiners whose program vectors s1 and
// s2 choose each output's multiplication factor (0.5x to 6x) and phase; a new
// vector acts at once, without relocking. The SCPB trigger tap follows the
// coarse code. Lock range of this model: about 270-500 MHz. Everything here
// is the source design's architecture; timing lives in the leaf models.
module dual_clkgen
  import dfs_pkg::*;
(
  input  logic                  refclk,
  input  logic                  rst_n,
  input  logic [N_PHASES-1:0]   s1,
  input  logic [N_PHASES-1:0]   s2,
  output logic                  clkout1,
  output logic                  clkout2,
  output logic                  locked,
  output coarse_stage_t         stage,
  output logic [N_FINE_CDL-1:0] fsel,
  output logic [N_PHASES-1:0]   phases
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N_DDL_PHASES:1] o;
  logic                  sel_t2, c1, c2;

  digital_delay_line u_ddl (.refclk(refclk), .stage(stage), .fsel(fsel), .o(o));

  dcd_controller u_dcd (
    .refclk(refclk), .rst_n(rst_n), .o6(o[N_DDL_PHASES]),
    .stage(stage), .fsel(fsel), .sel_t2(sel_t2), .locked(locked), .c1(c1), .c2(c2)
  );

  freq_phase_synth u_syn (
    .rst_n(rst_n), .o(o), .sel_t2(sel_t2), .s1(s1), .s2(s2),
    .p(phases), .clkout1(clkout1), .clkout2(clkout2)
  );
endmodule
