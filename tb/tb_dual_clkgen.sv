// Testbench for dual_clkgen: locks at the source design's example references
// (333, 450, 475 and 500 MHz), checks that locked rises on the tenth REFCLK
// edge, then measures both outputs for all six factors (period within 2% of
// REFCLK/factor, duty cycle 50% +/- 5%) and a dynamic change of both factors
// without a new lock. At 450 MHz the outputs run at 0.5x and 6x together.
module tb_dual_clkgen;
  import dfs_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic refclk, rst_n, locked, clkout1, clkout2;
  logic [11:0] s1, s2, phases;
  coarse_stage_t stage;
  logic [N_FINE_CDL-1:0] fsel;
  int half_ps = 1000;
  time r1 [$];
  time f1 [$];
  time r2 [$];

  dual_clkgen dut (.refclk(refclk), .rst_n(rst_n), .s1(s1), .s2(s2), .clkout1(clkout1),
                   .clkout2(clkout2), .locked(locked), .stage(stage), .fsel(fsel), .phases(phases));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    refclk = 0;
    forever begin #(half_ps); refclk = ~refclk; end
  end
  always @(posedge clkout1) r1.push_back($time);
  always @(negedge clkout1) f1.push_back($time);
  always @(posedge clkout2) r2.push_back($time);

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(longint v, longint e, int pct);
    return (v * 100 >= e * (100 - pct)) && (v * 100 <= e * (100 + pct));
  endfunction

  // mean period over the collected rising edges
  function automatic longint mean_period(ref time q [$]);
    if (q.size() < 3) return -1;
    return longint'(q[q.size()-1] - q[0]) / (q.size() - 1);
  endfunction

  task automatic lock(int t_ps);
    int n = 0;
    half_ps = t_ps / 2;
    rst_n = 0;
    repeat (3) @(posedge refclk);
    #(t_ps / 4);
    rst_n = 1;
    while (!locked) begin @(posedge refclk); n++; #1; end
    check(n == 10, $sformatf("T=%0d: lock after %0d edges", t_ps, n));
    repeat (4) @(posedge refclk);
  endtask

  task automatic measure(int t_ps, mult_t m1, int ph1, mult_t m2, int ph2);
    longint exp1 = 2 * t_ps / mult_edges(m1), exp2 = 2 * t_ps / mult_edges(m2);
    longint hi;
    s1 = si_pattern(m1, ph1);
    s2 = si_pattern(m2, ph2);
    repeat (3) @(posedge refclk);
    r1.delete(); f1.delete(); r2.delete();
    repeat (8) @(posedge refclk);
    check(near(mean_period(r1), exp1, 2), $sformatf("T=%0d clkout1 code %0d: period %0d exp %0d", t_ps, m1, mean_period(r1), exp1));
    check(near(mean_period(r2), exp2, 2), $sformatf("T=%0d clkout2 code %0d: period %0d exp %0d", t_ps, m2, mean_period(r2), exp2));
    hi = -1;
    foreach (f1[k]) if (f1[k] > r1[0]) begin hi = longint'(f1[k] - r1[0]); break; end
    check(near(hi, exp1 / 2, 10), $sformatf("T=%0d clkout1 code %0d: high time %0d of %0d", t_ps, m1, hi, exp1));
  endtask

  initial begin
    rst_n = 1;
    s1 = si_pattern(MULT_1, 0);
    s2 = si_pattern(MULT_1, 0);
    #10;
    // 500 MHz: all six factors on clkout1, in reverse on clkout2
    lock(2000);
    for (int m = 0; m < 6; m++) measure(2000, mult_t'(m), 0, mult_t'(5 - m), 0);
    // 450 MHz: 0.5x and 6x together, then a dynamic change to 3x and 1.5x
    lock(2222);
    measure(2222, MULT_0P5, 0, MULT_6, 0);
    measure(2222, MULT_3, 1, MULT_1P5, 2);
    check(locked, "no relock after the change");
    lock(2106);   // 475 MHz
    measure(2106, MULT_2, 1, MULT_1, 3);
    lock(3002);   // 333 MHz
    measure(3002, MULT_1P5, 0, MULT_0P5, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
