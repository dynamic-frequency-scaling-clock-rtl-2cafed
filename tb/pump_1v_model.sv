// pump_1v_model: behavioural stand-in for the 1V generator (charge pump) and
// its load, used only by the testbenches that close the power efficiency
// optimization loop.
//
// Every rising edge of the pump clock moves a fixed fraction (GAIN_PPM per
// million) of the gap between the output and the pump's open-circuit level
// VOPEN_MV onto the output capacitor. The load removes load_uv_per_ns
// microvolts every nanosecond. A faster pump clock therefore lifts the
// output, a heavier load pulls it down, and the output settles where the two
// rates meet. The source design gives the pump only as the block that turns
// the unit's clock into a 1 V rail; the charge law, its constants and the
// load model are this testbench's own choices. vout_mv is the output rounded
// to whole millivolts; it starts at v_init_mv when init pulses high.
module pump_1v_model #(
  parameter int unsigned VOPEN_MV = 1200,
  parameter int unsigned GAIN_PPM = 2000
) (
  input  logic        clk_pump,
  input  logic        init,
  input  int unsigned v_init_mv,
  input  int unsigned load_uv_per_ns,
  output logic [11:0] vout_mv
);
  timeunit 1ps;
  timeprecision 1ps;

  real v = 0.0;

  always @(posedge clk_pump)
    v = v + (real'(VOPEN_MV) - v) * real'(GAIN_PPM) / 1.0e6;

  always begin
    #1000;
    v = v - real'(load_uv_per_ns) / 1000.0;
    if (v < 0.0) v = 0.0;
  end

  always @(posedge init) v = real'(v_init_mv);

  assign vout_mv = 12'(int'(v));
endmodule
