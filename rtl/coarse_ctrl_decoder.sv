// coarse_ctrl_decoder: coarse stage number -> transmission-gate controls of
// the low power delay cell.
//
// The coarse tune section of the delay cell is a chain of transmission gates
// (t2, t3) with a tap gate (d1, d2, d3) from each chain node to the cell
// output; every gate has a true and a complement control. Stage 1 takes the
// output from the first node, stage 2 from the second and stage 3 from the
// third, so each stage adds one transmission-gate delay. The control values
// of the three stages are the ones tabulated by the source design; a gate
// conducts when its plain-named control is low. Purely combinational. The
// unused code STAGE_NONE is this design's own choice: it falls back to the
// stage 1 setting so that a cell is never left without a path.
module coarse_ctrl_decoder
  import dfs_pkg::*;
(
  input  coarse_stage_t stage,
  output coarse_ctl_t   ctl
);
  timeunit 1ps;
  timeprecision 1ps;

  always_comb begin
    unique case (stage)
      STAGE_2: ctl = '{t2: 1'b0, t2n: 1'b1, t3: 1'b1, t3n: 1'b0,
                       d1: 1'b1, d1n: 1'b0, d2: 1'b0, d2n: 1'b1, d3: 1'b1, d3n: 1'b0};
      STAGE_3: ctl = '{t2: 1'b0, t2n: 1'b1, t3: 1'b0, t3n: 1'b1,
                       d1: 1'b1, d1n: 1'b0, d2: 1'b1, d2n: 1'b0, d3: 1'b0, d3n: 1'b1};
      default: ctl = '{t2: 1'b1, t2n: 1'b0, t3: 1'b1, t3n: 1'b0,
                       d1: 1'b0, d1n: 1'b1, d2: 1'b1, d2n: 1'b0, d3: 1'b1, d3n: 1'b0};
    endcase
  end
endmodule
