// End-to-end testbench for dfs_solar_top, with every parameter at its default.
//
// Clock generator: locks at 500 MHz (coarse stage 1), 400 MHz (stage 2) and
// 333 MHz (stage 3), each in ten REFCLK edges, and produces all six factors
// on both outputs with the period checked within 2%. It changes the factors
// of both outputs on the fly and checks that lock is kept, and it shifts
// clkout2 against clkout1 by two of the twelve phases and checks the offset
// of the edges.
// Power efficiency optimization unit: a behavioural 1V pump (pump_1v_model)
// closes the loop. With each voltage detector the rail is pulled from 700 mV
// to the 900 mV point (counter counts up), and from 1000 mV under a light
// load (counter counts down); it must stay within 900 mV +/- 40 mV.
// Control unit: sweeps the photovoltaic node over 177..840 mV against the
// regulator input and checks the PMOS switch gate and the charger enable for
// both the daytime (photovoltaic) and the night (battery) case.
// Every mechanism is counted; one that never happened is a failure.
module tb_dfs_solar_top;
  import dfs_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  // clock generator side
  logic refclk, clk_rst_n, clkout1, clkout2, locked;
  logic [N_PHASES-1:0] s1, s2;
  coarse_stage_t stage;
  logic [N_FINE_CDL-1:0] fsel;
  int half_ps = 1000;
  time r1 [$];
  time r2 [$];
  time e1 [$];
  time e2 [$];
  // power side
  logic pm_rst_n, ctrl_clk, det_sel, clk_pump, det_flag, init;
  logic [11:0] vpump, vref;
  logic [4:0] bias_word;
  int unsigned v0, load;
  logic [11:0] v_pv, v_reg;
  logic pv_gate, charger_en;

  // mechanism counters
  int n_lock, n_stage [1:3], n_factor [6], n_dynamic, n_shift;
  int n_up, n_down, n_det [2], n_regulated, n_pv_mode, n_batt_mode;

  dfs_solar_top dut (
    .refclk(refclk), .clk_rst_n(clk_rst_n), .s1(s1), .s2(s2), .clkout1(clkout1),
    .clkout2(clkout2), .locked(locked), .stage(stage), .fsel(fsel),
    .pm_rst_n(pm_rst_n), .ctrl_clk(ctrl_clk), .det_sel(det_sel), .vpump_mv(vpump),
    .vref_mv(vref), .clk_pump(clk_pump), .det_flag(det_flag), .bias_word(bias_word),
    .v_pv_mv(v_pv), .v_regin_mv(v_reg), .pv_switch_gate(pv_gate), .charger_en(charger_en)
  );
  pump_1v_model u_pump (.clk_pump(clk_pump), .init(init), .v_init_mv(v0),
                        .load_uv_per_ns(load), .vout_mv(vpump));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    refclk = 0;
    forever begin #(half_ps); refclk = ~refclk; end
  end
  initial begin
    ctrl_clk = 0;
    forever #50000 ctrl_clk = ~ctrl_clk;
  end
  always @(posedge clkout1) r1.push_back($time);
  always @(posedge clkout2) r2.push_back($time);
  always @(posedge clkout1 or negedge clkout1) e1.push_back($time);
  always @(posedge clkout2 or negedge clkout2) e2.push_back($time);

  initial begin
    #200_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit near(longint v, longint e, int pct);
    return (v * 100 >= e * (100 - pct)) && (v * 100 <= e * (100 + pct));
  endfunction

  function automatic longint mean_period(ref time q [$]);
    if (q.size() < 3) return -1;
    return longint'(q[q.size()-1] - q[0]) / (q.size() - 1);
  endfunction

  // ---------------------------------------------------------------- clocks
  task automatic lock(int t_ps, coarse_stage_t exp_stage);
    int n = 0;
    half_ps = t_ps / 2;
    clk_rst_n = 0;
    repeat (3) @(posedge refclk);
    #(t_ps / 4);
    clk_rst_n = 1;
    while (!locked && n < 40) begin @(posedge refclk); n++; #1; end
    check(n == 10, $sformatf("T=%0d: lock after %0d edges", t_ps, n));
    check(stage == exp_stage, $sformatf("T=%0d: coarse stage %0d, want %0d", t_ps, stage, exp_stage));
    if (n == 10) n_lock++;
    if (stage == exp_stage && stage != STAGE_NONE) n_stage[int'(stage)]++;
    repeat (4) @(posedge refclk);
  endtask

  task automatic run_factors(int t_ps, mult_t m1, mult_t m2);
    longint exp1 = 2 * t_ps / mult_edges(m1), exp2 = 2 * t_ps / mult_edges(m2);
    s1 = si_pattern(m1, 0);
    s2 = si_pattern(m2, 0);
    repeat (3) @(posedge refclk);
    r1.delete(); r2.delete();
    repeat (8) @(posedge refclk);
    check(near(mean_period(r1), exp1, 2), $sformatf("T=%0d clkout1 factor %0d: period %0d, want %0d",
                                                    t_ps, m1, mean_period(r1), exp1));
    check(near(mean_period(r2), exp2, 2), $sformatf("T=%0d clkout2 factor %0d: period %0d, want %0d",
                                                    t_ps, m2, mean_period(r2), exp2));
    if (near(mean_period(r1), exp1, 2)) n_factor[int'(m1)]++;
    if (near(mean_period(r2), exp2, 2)) n_factor[int'(m2)]++;
  endtask

  // Both outputs at 1X, clkout2 started from phase ph: each clkout2 edge must
  // trail the clkout1 edge before it by ph twelfths of the REFCLK period.
  task automatic phase_shift(int t_ps, int ph);
    int bad = 0, n = 0;
    longint want = longint'(t_ps) * ph / 12;
    s1 = si_pattern(MULT_1, 0);
    s2 = si_pattern(MULT_1, ph);
    repeat (3) @(posedge refclk);
    e1.delete(); e2.delete();
    repeat (6) @(posedge refclk);
    foreach (e2[k]) begin
      time prev = 0;
      foreach (e1[j]) if (e1[j] <= e2[k]) prev = e1[j];
      if (prev != 0) begin
        n++;
        if (longint'(e2[k] - prev) < want - 40 || longint'(e2[k] - prev) > want + 40) bad++;
      end
    end
    check(n >= 8 && bad == 0, $sformatf("T=%0d shift %0d/12: %0d of %0d edges off", t_ps, ph, bad, n));
    if (n >= 8 && bad == 0) n_shift++;
  endtask

  // ---------------------------------------------------------------- power
  task automatic pm_start(bit sel, int unsigned vstart, int unsigned ld);
    det_sel = sel; v0 = vstart; load = ld;
    pm_rst_n = 1; #1; pm_rst_n = 0;
    init = 0; #1000; init = 1; #1000; init = 0;
    #10000 pm_rst_n = 1;
  endtask

  // Runs the loop for 30 us, counting counter steps, then checks the rail.
  task automatic pm_run(bit sel, int unsigned vstart, int unsigned ld, string name);
    int vmin = 4095, vmax = 0, ups = 0, downs = 0;
    logic [4:0] prev;
    pm_start(sel, vstart, ld);
    prev = bias_word;
    repeat (200) begin
      @(posedge ctrl_clk); #1;
      if (bias_word > prev) ups++;
      if (bias_word < prev) downs++;
      prev = bias_word;
    end
    repeat (100) begin
      @(posedge ctrl_clk); #1;
      if (bias_word > prev) ups++;
      if (bias_word < prev) downs++;
      prev = bias_word;
      if (int'(vpump) < vmin) vmin = int'(vpump);
      if (int'(vpump) > vmax) vmax = int'(vpump);
    end
    n_up += (ups > 0);
    n_down += (downs > 0);
    check(vmin >= 860 && vmax <= 940, $sformatf("%s: rail %0d..%0d mV", name, vmin, vmax));
    if (vmin >= 860 && vmax <= 940) begin n_regulated++; n_det[sel]++; end
  endtask

  // ---------------------------------------------------------------- test
  initial begin
    int mech [string];
    clk_rst_n = 1; pm_rst_n = 1; det_sel = 0; init = 0; v0 = 0; load = 0;
    vref = 12'd550;
    v_pv = 12'd500; v_reg = 12'd600;
    s1 = si_pattern(MULT_1, 0);
    s2 = si_pattern(MULT_1, 0);
    #10;

    // clock generator
    lock(2000, STAGE_1);                                   // 500 MHz
    for (int m = 0; m < 6; m++) run_factors(2000, mult_t'(m), mult_t'(5 - m));
    phase_shift(2000, 2);
    lock(2500, STAGE_2);                                   // 400 MHz
    run_factors(2500, MULT_0P5, MULT_6);
    run_factors(2500, MULT_3, MULT_1P5);                   // on the fly
    check(locked, "lock kept through the factor change");
    if (locked) n_dynamic++;
    lock(3002, STAGE_3);                                   // 333 MHz
    run_factors(3002, MULT_2, MULT_1);

    // power efficiency optimization unit
    pm_run(1'b0, 700, 140, "oscillating detector, from 700 mV");
    pm_run(1'b1, 1000, 40, "bias detector, from 1000 mV");
    pm_run(1'b1, 700, 140, "bias detector, from 700 mV");

    // control unit
    for (int pv = 177; pv <= 840; pv += 13) begin
      v_pv = 12'(pv); v_reg = 12'd600; #100;
      if (pv > 600) begin
        check(pv_gate == 1'b0 && charger_en == 1'b1, $sformatf("pv %0d: photovoltaic mode", pv));
        if (pv_gate == 1'b0 && charger_en) n_pv_mode++;
      end else if (pv < 600) begin
        check(pv_gate == 1'b1 && charger_en == 1'b0, $sformatf("pv %0d: battery mode", pv));
        if (pv_gate && !charger_en) n_batt_mode++;
      end
    end

    mech["lock in 10 cycles"]        = n_lock;
    mech["coarse stage 1"]           = n_stage[1];
    mech["coarse stage 2"]           = n_stage[2];
    mech["coarse stage 3"]           = n_stage[3];
    mech["factor 0.5X"]              = n_factor[0];
    mech["factor 1X"]                = n_factor[1];
    mech["factor 1.5X"]              = n_factor[2];
    mech["factor 2X"]                = n_factor[3];
    mech["factor 3X"]                = n_factor[4];
    mech["factor 6X"]                = n_factor[5];
    mech["factor change on the fly"] = n_dynamic;
    mech["phase shift"]              = n_shift;
    mech["counter up"]               = n_up;
    mech["counter down"]             = n_down;
    mech["oscillating detector"]     = n_det[0];
    mech["bias detector"]            = n_det[1];
    mech["rail regulated"]           = n_regulated;
    mech["photovoltaic mode"]        = n_pv_mode;
    mech["battery mode"]             = n_batt_mode;
    foreach (mech[k]) begin
      $display("mechanism %-26s %0d", k, mech[k]);
      check(mech[k] > 0, $sformatf("mechanism never happened: %s", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
