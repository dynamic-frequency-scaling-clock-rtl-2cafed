// control_unit: behavioural model of the supply control unit of the solar
// power management system.
//
// A PMOS switch joins the PV cell (node 1) to the regulator input (node 2).
// A comparator watches the two nodes: while node 1 is higher the PV cell is
// delivering current, the comparator outputs 1, an inverter drives the PMOS
// gate low so the switch conducts, and the battery charger is enabled. When
// the PV output drops so that node 2 (fed by the battery) is higher, the
// comparator outputs 0, the switch opens so no current flows back into the
// PV cell, and the charger is disabled. Behaviour as in the source design;
// the comparator is ideal here (no offset, no hysteresis) and continuous in
// time. Voltages are whole millivolts.
module control_unit (
  input  logic [11:0] v_node1_mv,
  input  logic [11:0] v_node2_mv,
  output logic        op_out,
  output logic        pmos_gate,
  output logic        charger_en
);
  timeunit 1ps;
  timeprecision 1ps;

  always_comb begin
    op_out     = (v_node1_mv > v_node2_mv);
    pmos_gate  = ~op_out;
    charger_en = op_out;
  end
endmodule
