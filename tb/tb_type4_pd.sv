// Testbench for type4_pd: with fb ahead of ref the lead pulse must be as wide
// as the phase difference, with ref ahead the lag pulse, and nothing while the
// detector is disarmed.
module tb_type4_pd;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic en, ref_clk, fb, lead, lag;
  time  t_lead_r, w_lead, t_lag_r, w_lag;
  int   n_lead, n_lag;

  type4_pd dut (.en(en), .ref_clk(ref_clk), .fb(fb), .lead(lead), .lag(lag));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge lead) begin t_lead_r = $time; n_lead++; end
  always @(negedge lead) w_lead = $time - t_lead_r;
  always @(posedge lag)  begin t_lag_r = $time; n_lag++; end
  always @(negedge lag)  w_lag = $time - t_lag_r;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one period of 2000 ps: fb rises at t0+tf, ref at t0+tr
  task automatic period(int tf, int tr);
    fork
      begin #(tf) fb = 1; #500 fb = 0; end
      begin #(tr) ref_clk = 1; #500 ref_clk = 0; end
    join_none
    #2000;
  endtask

  initial begin
    en = 0; ref_clk = 0; fb = 0; n_lead = 0; n_lag = 0; w_lead = 0; w_lag = 0;
    #1000;
    period(100, 400);
    check(n_lead == 0 && n_lag == 0, "disarmed detector stays quiet");
    en = 1;
    period(100, 400);
    check(n_lead == 1 && w_lead == 300, $sformatf("lead pulse %0d ps exp 300", w_lead));
    period(200, 1100);
    check(n_lead == 2 && w_lead == 900, $sformatf("lead pulse %0d ps exp 900", w_lead));
    check(n_lag == 0 || w_lag == 0, "no lag pulse while fb leads");
    period(700, 300);
    check(w_lag == 400, $sformatf("lag pulse %0d ps exp 400", w_lag));
    check(!lead && !lag, "both clear after a period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
