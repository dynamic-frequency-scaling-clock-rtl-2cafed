// net_bias: behavioural model of the double net-bias circuit that sets the
// control voltages of the type II low voltage oscillator.
//
// Each half is a row of binary-weighted PMOS devices pulling against a small
// diode-connected NMOS; the more strongly the row is switched, the lower the
// bias node. One half is driven by the word b and gives vp, which falls as b
// counts up; the other half is driven by the complement of b and gives vn,
// which rises as b counts up. The source design states a 490 mV to 54 mV span
// at a 550 mV supply and notes the circuit can be cut to 5 bits; here the
// span is divided linearly into 2^BITS-1 steps (about 14 mV at 5 bits).
// Purely combinational; voltages are whole millivolts.
module net_bias #(
  parameter int unsigned BITS    = 5,
  parameter int unsigned VMAX_MV = 490,
  parameter int unsigned VMIN_MV = 54
) (
  input  logic [BITS-1:0] b,
  output logic [11:0]     vp_mv,
  output logic [11:0]     vn_mv
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned FULL = (1 << BITS) - 1;

  function automatic logic [11:0] level(logic [BITS-1:0] w);
    return 12'(VMAX_MV - ((VMAX_MV - VMIN_MV) * int'(w) + FULL / 2) / FULL);
  endfunction

  always_comb begin
    vp_mv = level(b);
    vn_mv = level(~b);
  end
endmodule
