// Testbench for dcd_controller, closed around a digital_delay_line as in the
// DLL. For reference clocks across the lock range it checks the coarse stage
// picked in the first cycle, that locked rises exactly on the tenth REFCLK
// edge, and that afterwards o6 trails REFCLK by one period to within the
// one-step resolution of the line (6 x 5 ps). The expected stage and fine
// code come from an independent model of the binary-search tracking.
module tb_dcd_controller;
  import dfs_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic refclk, rst_n, locked, sel_t2, c1, c2;
  coarse_stage_t stage;
  logic [N_FINE_CDL-1:0] fsel;
  logic [N_DDL_PHASES:1] o;
  int half_ps = 1000;
  time t_ref, t_o6;

  digital_delay_line u_ddl (.refclk(refclk), .stage(stage), .fsel(fsel), .o(o));
  dcd_controller dut (.refclk(refclk), .rst_n(rst_n), .o6(o[N_DDL_PHASES]), .stage(stage),
                      .fsel(fsel), .sel_t2(sel_t2), .locked(locked), .c1(c1), .c2(c2));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    refclk = 0;
    forever begin #(half_ps); refclk = ~refclk; end
  end
  always @(posedge refclk) t_ref = $time;
  always @(posedge o[N_DDL_PHASES]) t_o6 = $time;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected stage and fine code for period t_ps
  function automatic int exp_stage(int t_ps);
    if (t_ps / 2 < 1163) return 1;
    if (t_ps / 2 < 1380) return 2;
    return 3;
  endfunction

  function automatic int exp_line(int t_ps);
    int s = exp_stage(t_ps), steps = 0;
    int base = 6 * (200 + (s + 1) * 60);
    int lead = t_ps - base;
    int w [8] = '{40, 30, 20, 10, 5, 3, 2, 1};
    for (int i = 0; i < 8; i++)
      if (lead >= 30 * w[i]) begin steps += w[i]; lead -= 30 * w[i]; end
    if (steps > 43) steps = 43;
    return base + 30 * steps;
  endfunction

  task automatic run(int t_ps);
    int n;
    time err;
    half_ps = t_ps / 2;
    rst_n = 0;
    repeat (3) @(posedge refclk);
    #(half_ps / 2);
    rst_n = 1;
    n = 0;
    while (!locked) begin @(posedge refclk); n++; #1; end
    $display("T=%0d stage=%0d fsel=%b", t_ps, stage, fsel);
    check(n == 10, $sformatf("T=%0d: locked after %0d edges, exp 10", t_ps, n));
    check(int'(stage) == exp_stage(t_ps), $sformatf("T=%0d: stage %0d exp %0d", t_ps, stage, exp_stage(t_ps)));
    check(sel_t2 == (exp_stage(t_ps) == 3), "blender tap follows the coarse range");
    repeat (4) @(posedge refclk);
    #(t_ps / 2);
    // o6 edge of the previous REFCLK edge, compared with this REFCLK edge
    err = (t_ref > t_o6) ? t_ref - t_o6 : t_o6 - t_ref;
    check(t_o6 <= t_ref && err < 30, $sformatf("T=%0d: o6 to REFCLK error %0d ps", t_ps, err));
    check(6 * (200 + (int'(stage) + 1) * 60) + 0 <= t_ps, "line starts shorter than a period");
    check(t_ps - (t_ref - t_o6) == exp_line(t_ps) || t_ps - (t_ref - t_o6) + 0 == exp_line(t_ps),
          $sformatf("T=%0d: line delay %0d exp %0d", t_ps, t_ps - (t_ref - t_o6), exp_line(t_ps)));
  endtask

  initial begin
    half_ps = 1000;
    rst_n = 1;
    #10;
    run(2000);   // 500 MHz
    run(2106);   // 475 MHz
    run(2500);   // 400 MHz
    run(3002);   // 333 MHz
    run(3704);   // 270 MHz
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
