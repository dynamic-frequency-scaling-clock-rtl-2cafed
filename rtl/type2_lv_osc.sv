// type2_lv_osc: behavioural model of the type II low voltage oscillator.
//
// The circuit is a ring of inverters with two transmission gates in the loop.
// Lowering vp (PMOS gate) and raising vn (NMOS gate) makes the gates conduct
// better, shortens their delay and raises the frequency. The model maps the
// gate drive vn - vp, which spans -DRIVE_SPAN_MV .. +DRIVE_SPAN_MV, linearly
// onto F_MIN_KHZ .. F_MAX_KHZ. Defaults: 33 MHz to 300 MHz, the clock range
// the source design gives for the power efficiency optimization unit; the
// linear law and the neglect of supply dependence are this design's
// simplifications. While en is low the output rests low. The frequency is
// re-evaluated every half period, so a new control word acts within one
// cycle.
module type2_lv_osc #(
  parameter int unsigned F_MIN_KHZ     = 33_000,
  parameter int unsigned F_MAX_KHZ     = 300_000,
  parameter int unsigned DRIVE_SPAN_MV = 436
) (
  input  logic        en,
  input  logic [11:0] vp_mv,
  input  logic [11:0] vn_mv,
  output logic        clk
);
  timeunit 1ps;
  timeprecision 1ps;

  function automatic longint half_period_ps(logic [11:0] p, logic [11:0] n);
    longint drive, f_khz;
    drive = longint'(n) - longint'(p);
    if (drive < -longint'(DRIVE_SPAN_MV)) drive = -longint'(DRIVE_SPAN_MV);
    if (drive >  longint'(DRIVE_SPAN_MV)) drive =  longint'(DRIVE_SPAN_MV);
    f_khz = longint'(F_MIN_KHZ) + ((longint'(F_MAX_KHZ) - longint'(F_MIN_KHZ)) * (drive + longint'(DRIVE_SPAN_MV)))
            / (2 * longint'(DRIVE_SPAN_MV));
    return 64'd500_000_000 / f_khz;   // 1e9 ps per ms / f_kHz / 2
  endfunction

  initial clk = 1'b0;

  // One half period per pass; while disabled the loop idles in 1 ns steps.
  always begin
    if (!en) begin
      clk = 1'b0;
      #1000;
    end else begin
      #(half_period_ps(vp_mv, vn_mv));
      clk = en ? ~clk : 1'b0;
    end
  end
endmodule
