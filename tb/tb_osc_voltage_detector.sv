// Testbench for osc_voltage_detector: above the 900 mV detecting point the
// flag must be 1, below it 0, and it must follow a slow ramp through the
// point in both directions.
module tb_osc_voltage_detector;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic rst_n, flag;
  logic [11:0] v;

  osc_voltage_detector dut (.rst_n(rst_n), .en(1'b1), .vpump_mv(v), .flag(flag));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pts [10] = '{1100, 1000, 950, 910, 902, 898, 890, 850, 700, 570};
    rst_n = 1; v = 1000; #1; rst_n = 0; #100;
    check(flag == 1'b1, "reset value");
    rst_n = 1;
    foreach (pts[i]) begin
      v = 12'(pts[i]);
      #20000;
      check(flag == (pts[i] >= 900), $sformatf("vpump %0d: flag %b", pts[i], flag));
    end
    for (int mv = 850; mv <= 950; mv += 10) begin
      v = 12'(mv); #20000;
      check(flag == (mv >= 900), $sformatf("rising ramp %0d: flag %b", mv, flag));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
