// cdl: behavioural model of a charge-detecting line (CDL).
//
// An AND gate passes the measured signal while en is high; each high pulse
// charges a capacitor node, an inverter senses the node, and a D flip-flop
// clocked by the falling edge of the gated signal stores the inverter output.
// A pulse at least TH_PS long charges the node past the inverter threshold
// and stores 0; a shorter pulse stores 1. The node discharges while the gated
// signal is low. The capacitor size, i.e. TH_PS, sets which pulse width the
// line tells apart. Structure and polarity follow the source design.
//
// Modelling choices of this design: the flip-flop is clocked by the gated
// signal, so a closed line keeps its result; rst_n (active low,
// asynchronous) sets the stored bit to 1 (not charged).
module cdl #(
  parameter int unsigned TH_PS = 1000
) (
  input  logic rst_n,
  input  logic en,
  input  logic sig,
  output logic q
);
  timeunit 1ps;
  timeprecision 1ps;

  logic  gated;
  time   t_rise;

  assign gated = en & sig;

  initial begin
    t_rise = 0;
    q      = 1'b1;
  end

  always @(posedge gated) t_rise = $time;

  always @(negedge gated or negedge rst_n) begin
    if (!rst_n) q <= 1'b1;
    else        q <= (($time - t_rise) >= 64'(TH_PS)) ? 1'b0 : 1'b1;
  end
endmodule
