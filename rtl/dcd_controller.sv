// dcd_controller: digital charge-detecting controller of the DLL.
//
// Coarse tune: two CDLs measure the REFCLK high time in the first lock cycle.
// The C1 line has the smaller capacitor (threshold TH_C1_PS) and the C2 line
// the larger one (TH_C2_PS); together they sort REFCLK into three ranges that
// map straight onto the three coarse stages of the delay cells.
// Fine tune: a type-IV detector turns the lead of o6 over REFCLK into a pulse,
// which eight CDLs measure one after another, largest first. CDL i has a
// threshold of N_DDL_PHASES*FINE_STEP_PS*FINE_W[i] ps: if the remaining lead
// is at least what its weight would add to the whole line, it stores 0 and
// switches in FINE_W[i] fine steps (fsel[i] = 1). Because each decision
// shortens the lead seen by the next CDL, this is a one-way binary-search
// style tracking and the lock ends after ten REFCLK cycles.
// Structure and the weights follow the source design. The two coarse
// thresholds and the fine thresholds are this design's choices that match
// the delay cell model: C1 switches at a REFCLK high time of 1163 ps (430 MHz);
// C2 at 1380 ps (362 MHz), so that stage 3 begins exactly where the blended
// phase gap reaches 460 ps and the phase blender must use its second tap. rst_n: active low,
// asynchronous; locked rises on the tenth REFCLK rising edge after reset.
module dcd_controller
  import dfs_pkg::*;
#(
  parameter int unsigned TH_C1_PS = 1163,
  parameter int unsigned TH_C2_PS = 1380
) (
  input  logic                  refclk,
  input  logic                  rst_n,
  input  logic                  o6,
  output coarse_stage_t         stage,
  output logic [N_FINE_CDL-1:0] fsel,
  output logic                  sel_t2,
  output logic                  locked,
  output logic                  c1,
  output logic                  c2
);
  timeunit 1ps;
  timeprecision 1ps;

  logic                  en_coarse, pd_en, lead, lag;
  logic [N_FINE_CDL-1:0] en_fine, fine_q;

  cdl #(.TH_PS(TH_C1_PS)) u_cdl_c1 (.rst_n(rst_n), .en(en_coarse), .sig(refclk), .q(c1));
  cdl #(.TH_PS(TH_C2_PS)) u_cdl_c2 (.rst_n(rst_n), .en(en_coarse), .sig(refclk), .q(c2));

  type4_pd u_pd (.en(pd_en), .ref_clk(refclk), .fb(o6), .lead(lead), .lag(lag));

  for (genvar i = 0; i < N_FINE_CDL; i++) begin : g_fine
    cdl #(.TH_PS(N_DDL_PHASES * FINE_STEP_PS * FINE_W[i])) u_cdl (
      .rst_n(rst_n), .en(en_fine[i]), .sig(lead), .q(fine_q[i])
    );
  end

  assign fsel = ~fine_q;

  dcd_sequencer u_seq (
    .clk(refclk), .rst_n(rst_n), .c1(c1), .c2(c2),
    .en_coarse(en_coarse), .en_fine(en_fine), .pd_en(pd_en),
    .stage(stage), .sel_t2(sel_t2), .locked(locked)
  );
endmodule
