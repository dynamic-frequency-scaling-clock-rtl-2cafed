// osc_voltage_detector: behavioural model of the oscillating voltage detector.
//
// A ring oscillator is powered from the 1V generator output vpump_mv, so its
// frequency follows that voltage. Its output drives a charge-detecting line
// (cdl) that is enabled by the regulator supply (en). A low vpump gives a
// slow oscillator and long high pulses that charge the CDL node: the flag
// captured at the falling edge is 0 (output below the detecting point).
// A high vpump gives short pulses and flag 1. The detecting point is set by
// the CDL capacitor, here TH_PS, derived from DETECT_MV (900 mV in the
// source design's efficiency runs). The oscillator law, period =
// P_1V_PS * 1000 / vpump_mv with vpump clamped to at least VMIN_MV so the
// model keeps running, is this design's choice. rst_n: active low, clears
// the flag to 1. The flag is updated once per oscillator period.
module osc_voltage_detector #(
  parameter int unsigned DETECT_MV = 900,
  parameter int unsigned P_1V_PS   = 2000,
  parameter int unsigned VMIN_MV   = 200
) (
  input  logic        rst_n,
  input  logic        en,
  input  logic [11:0] vpump_mv,
  output logic        flag
);
  timeunit 1ps;
  timeprecision 1ps;

  // One picosecond above the half period at DETECT_MV, so the point itself reads as reached.
  localparam int unsigned TH_PS = (P_1V_PS * 1000) / (2 * DETECT_MV) + 1;

  logic osc;

  function automatic int unsigned half_ps(logic [11:0] v);
    int unsigned vv = (int'(v) < int'(VMIN_MV)) ? VMIN_MV : int'(v);
    return (P_1V_PS * 1000) / (2 * vv);
  endfunction

  initial osc = 1'b0;

  always begin
    #(half_ps(vpump_mv));
    osc = ~osc;
  end

  cdl #(.TH_PS(TH_PS)) u_cdl (.rst_n(rst_n), .en(en), .sig(osc), .q(flag));
endmodule
