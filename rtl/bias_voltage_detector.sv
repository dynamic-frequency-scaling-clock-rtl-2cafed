// bias_voltage_detector: behavioural model of the bias voltage detector.
//
// The 1V generator output drives the gate of an NMOS in a bias branch, so it
// draws almost no current from that output. The branch voltage v_d rises when
// the output falls; a comparator checks v_d against v_ref from the reference
// generator and gives flag 1 while the output is above the detecting point,
// 0 below it. The model uses v_d = VD0_MV - vpump_mv / 2, a linear stand-in
// chosen here; with the default VD0_MV and vref_mv = 550 mV the detecting
// point is 900 mV. Changing vref_mv moves the point by 2 mV per mV.
// Continuous-time: the flag follows its inputs without a clock.
module bias_voltage_detector #(
  parameter int unsigned VD0_MV = 1000
) (
  input  logic [11:0] vpump_mv,
  input  logic [11:0] vref_mv,
  output logic        flag,
  output logic [11:0] vd_mv
);
  timeunit 1ps;
  timeprecision 1ps;

  always_comb begin
    vd_mv = 12'(VD0_MV - int'(vpump_mv) / 2);
    if (int'(vpump_mv) / 2 > int'(VD0_MV)) vd_mv = '0;
    flag  = (vd_mv < vref_mv);
  end
endmodule
