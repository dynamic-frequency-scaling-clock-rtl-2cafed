// lp_delay_cell: behavioural model of the low power delay cell (a transistor
// level circuit: transmission gates and MOS capacitors, no logic function).
//
// The cell is an input inverter, a coarse tune section of transmission gates,
// an inverter, a fine tune section of switched MOS capacitors and two output
// inverters. The coarse controls (see coarse_ctrl_decoder) pick how many
// transmission gates the signal crosses: two, three or four, so the three
// coarse stages differ by one gate delay each. The fine tune adds one 5 ps
// step per enabled unit capacitor, at most 43 steps. fsel[i] switches in a
// group of FINE_W[i] unit capacitors (the grouping follows the fine CDLs of
// the controller). Both edges are delayed alike.
//
// Timing: the cell reads its controls T_IN_PS after an input edge (when the
// edge leaves the input inverter) and moves the output D_FIX_PS +
// n_gates*D_TG_PS + steps*FINE_STEP_PS after the edge. D_FIX_PS and D_TG_PS
// are this design's choice: with them the three stages cover 320-535 ps,
// 380-595 ps and 440-655 ps per cell, which spans the 270-500 MHz lock range
// of a six-cell line and keeps the fine range wider than one coarse step, as
// the source design requires. With no conducting path the output holds.
module lp_delay_cell
  import dfs_pkg::*;
#(
  parameter int unsigned D_FIX_PS = 200,
  parameter int unsigned D_TG_PS  = 60,
  parameter int unsigned T_IN_PS  = 20
) (
  input  logic                  in,
  input  coarse_ctl_t           ctl,
  input  logic [N_FINE_CDL-1:0] fsel,
  output logic                  out
);
  timeunit 1ps;
  timeprecision 1ps;

  function automatic int unsigned n_gates(coarse_ctl_t c);
    // a gate conducts when its plain control is low and its complement high
    if (!c.d1 && c.d1n)                                        return 2;
    if (!c.t2 && c.t2n && !c.d2 && c.d2n)                      return 3;
    if (!c.t2 && c.t2n && !c.t3 && c.t3n && !c.d3 && c.d3n)    return 4;
    return 0;
  endfunction

  function automatic int unsigned fine_steps(logic [N_FINE_CDL-1:0] f);
    int unsigned s = 0;
    for (int i = 0; i < N_FINE_CDL; i++) if (f[i]) s += FINE_W[i];
    return (s > FINE_STEPS) ? FINE_STEPS : s;
  endfunction

  initial out = 1'b0;

  always @(posedge in or negedge in) begin
    automatic logic        v = in;
    fork
      begin
        automatic int unsigned g, d;
        #(T_IN_PS);
        g = n_gates(ctl);
        if (g != 0) begin
          d = D_FIX_PS + g * D_TG_PS + fine_steps(fsel) * FINE_STEP_PS;
          #(d - T_IN_PS) out = v;
        end
      end
    join_none
  end
endmodule
