// Testbench for control_unit: while the PV node is above the regulator node
// the PV switch is on (gate low) and the charger enabled; otherwise both off.
module tb_control_unit;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic [11:0] v1, v2;
  logic op, gate, chg;

  control_unit dut (.v_node1_mv(v1), .v_node2_mv(v2), .op_out(op), .pmos_gate(gate), .charger_en(chg));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      int a, b;
      bit day;
      a = 177 + $urandom % 700; b = 400 + $urandom % 250;
      v1 = 12'(a); v2 = 12'(b); #10;
      day = (a > b);
      check(op == day && gate == !day && chg == day, $sformatf("pv %0d reg %0d", a, b));
    end
    v1 = 840; v2 = 592; #10; check(!gate && chg, "daytime: PV supplies");
    v1 = 177; v2 = 482; #10; check(gate && !chg, "night: battery supplies");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
