// dfs_solar_top: the two designs side by side.
//
// 1. Dual output clock generator (dual_clkgen): a DLL locks a six-cell delay
//    line to REFCLK in ten cycles; two edge combiners synthesize clkout1 and
//    clkout2 at 0.5x..6x REFCLK with a selectable phase, retuned at once when
//    s1/s2 change.
// 2. Solar cell power management control: the power efficiency optimization
//    unit (peou) that sets the 1V charge-pump clock from the pump output
//    voltage, and the control unit that chooses between PV cell and battery.
//    The analog parts of that system (PV cell, battery, regulator, charge-pump
//    voltage generators, battery charger) are outside this RTL; their node
//    voltages enter as millivolt ports and the control outputs leave as ports.
// The two halves share no signal. All resets are active low and asynchronous.
module dfs_solar_top
  import dfs_pkg::*;
(
  // clock generator
  input  logic                  refclk,
  input  logic                  clk_rst_n,
  input  logic [N_PHASES-1:0]   s1,
  input  logic [N_PHASES-1:0]   s2,
  output logic                  clkout1,
  output logic                  clkout2,
  output logic                  locked,
  output coarse_stage_t         stage,
  output logic [N_FINE_CDL-1:0] fsel,
  // power efficiency optimization unit
  input  logic                  pm_rst_n,
  input  logic                  ctrl_clk,
  input  logic                  det_sel,
  input  logic [11:0]           vpump_mv,
  input  logic [11:0]           vref_mv,
  output logic                  clk_pump,
  output logic                  det_flag,
  output logic [4:0]            bias_word,
  // control unit
  input  logic [11:0]           v_pv_mv,
  input  logic [11:0]           v_regin_mv,
  output logic                  pv_switch_gate,
  output logic                  charger_en
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N_PHASES-1:0] phases;
  logic                cu_op;

  dual_clkgen u_clkgen (
    .refclk(refclk), .rst_n(clk_rst_n), .s1(s1), .s2(s2),
    .clkout1(clkout1), .clkout2(clkout2), .locked(locked),
    .stage(stage), .fsel(fsel), .phases(phases)
  );

  peou #(.CNT_W(5)) u_peou (
    .rst_n(pm_rst_n), .ctrl_clk(ctrl_clk), .det_sel(det_sel),
    .vpump_mv(vpump_mv), .vref_mv(vref_mv),
    .clk_pump(clk_pump), .flag(det_flag), .word(bias_word)
  );

  control_unit u_cu (
    .v_node1_mv(v_pv_mv), .v_node2_mv(v_regin_mv),
    .op_out(cu_op), .pmos_gate(pv_switch_gate), .charger_en(charger_en)
  );
endmodule
