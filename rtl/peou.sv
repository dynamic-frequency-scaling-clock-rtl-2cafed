// peou: power efficiency optimization unit of the solar power management
// system. It sets the clock frequency of the 1V charge-pump generator from
// that generator's own output voltage.
//
// A one-bit voltage detector compares the 1V output vpump_mv with its
// detecting point: below it (heavy load) the flag is 0, above it (light load)
// 1. Two detectors are provided, as in the source design: the oscillating
// detector (det_sel = 0) and the lower-power bias detector (det_sel = 1).
// On every ctrl_clk edge the 5-bit counter counts up on flag 0 and down on
// flag 1; its word drives the double net-bias circuit whose voltages set the
// type II oscillator, which delivers clk_pump (about 33 to 300 MHz). The loop
// thus settles where the pump just holds its output at the detecting point,
// using the lowest clock that does so. Which clock steps the counter, and a
// run-time choice of detector, are this design's assumptions. rst_n: active
// low, asynchronous; after reset the word is 0 (slowest clock).
module peou #(
  parameter int unsigned CNT_W = 5
) (
  input  logic             rst_n,
  input  logic             ctrl_clk,
  input  logic             det_sel,
  input  logic [11:0]      vpump_mv,
  input  logic [11:0]      vref_mv,
  output logic             clk_pump,
  output logic             flag,
  output logic [CNT_W-1:0] word
);
  timeunit 1ps;
  timeprecision 1ps;

  logic        flag_osc, flag_bias;
  logic [11:0] vd_mv, vp_mv, vn_mv;

  osc_voltage_detector u_odet (.rst_n(rst_n), .en(1'b1), .vpump_mv(vpump_mv), .flag(flag_osc));
  bias_voltage_detector u_bdet (.vpump_mv(vpump_mv), .vref_mv(vref_mv), .flag(flag_bias), .vd_mv(vd_mv));

  assign flag = det_sel ? flag_bias : flag_osc;

  peou_counter #(.W(CNT_W)) u_cnt (.clk(ctrl_clk), .rst_n(rst_n), .flag(flag), .count(word));

  net_bias #(.BITS(CNT_W)) u_bias (.b(word), .vp_mv(vp_mv), .vn_mv(vn_mv));

  type2_lv_osc u_osc (.en(rst_n), .vp_mv(vp_mv), .vn_mv(vn_mv), .clk(clk_pump));
endmodule
