// Testbench for bias_voltage_detector: v_d = 1000 - vpump/2, flag 1 while
// v_d is below v_ref; with v_ref = 550 mV the point is 900 mV and moving
// v_ref by 10 mV moves the point by 20 mV.
module tb_bias_voltage_detector;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic [11:0] v, vref, vd;
  logic flag;

  bias_voltage_detector dut (.vpump_mv(v), .vref_mv(vref), .flag(flag), .vd_mv(vd));

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
    for (int r = 540; r <= 560; r += 10) begin
      int point;
      point = 2 * (1000 - r);
      vref = 12'(r);
      for (int mv = 500; mv <= 1200; mv += 2) begin
        v = 12'(mv); #10;
        check(flag == (mv > point), $sformatf("vref %0d vpump %0d flag %b", r, mv, flag));
        check(vd == 12'(1000 - mv / 2), "v_d law");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
