// digital_delay_line: behavioural model of the six-cell digital delay line of
// the DLL.
//
// Six lp_delay_cell instances in series, all with the same coarse and fine
// controls, give phases o[1]..o[6] of the reference clock. When the DLL is
// locked the line delay equals one reference period, so the six outputs are
// spaced by one sixth of the period and o[6] lines up with the next reference
// edge. The coarse stage is decoded once here and shared by all cells.
// Structure follows the source design; cell timing is in lp_delay_cell.
module digital_delay_line
  import dfs_pkg::*;
#(
  parameter int unsigned D_FIX_PS = 200,
  parameter int unsigned D_TG_PS  = 60
) (
  input  logic                    refclk,
  input  coarse_stage_t           stage,
  input  logic [N_FINE_CDL-1:0]   fsel,
  output logic [N_DDL_PHASES:1]   o
);
  timeunit 1ps;
  timeprecision 1ps;

  coarse_ctl_t ctl;
  logic [N_DDL_PHASES:0] node;

  coarse_ctrl_decoder u_dec (.stage(stage), .ctl(ctl));

  assign node[0] = refclk;

  for (genvar k = 1; k <= N_DDL_PHASES; k++) begin : g_cell
    lp_delay_cell #(.D_FIX_PS(D_FIX_PS), .D_TG_PS(D_TG_PS)) u_cell (
      .in(node[k-1]), .ctl(ctl), .fsel(fsel), .out(node[k])
    );
  end

  assign o = node[N_DDL_PHASES:1];
endmodule
