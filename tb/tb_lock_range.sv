// Workload testbench: sweeps REFCLK across the whole 270-500 MHz locking
// range of the clock generator in 10 MHz steps, with every parameter at its
// default. At each frequency it checks that lock is reached on the tenth
// REFCLK edge, that the coarse stage matches the REFCLK range (above about
// 430 MHz stage 1, 362-430 MHz stage 2, below 362 MHz stage 3), and that the
// locked line is accurate: with clkout1 at 6X the twelve phases are toggled
// in turn, so every half period must be T/12 within 20 ps, and the mean
// period T/6 within 1%. Finally, locked at 500 MHz, it steps clkout2 (1X)
// through the phase shifts 1..11 against clkout1 (1X, shift 0) and checks
// that each clkout2 edge trails the clkout1 edge before it by (k mod 6)/12
// of the period within 25 ps (shifts 0 and 6 coincide with clkout1 edges and
// are skipped).
module tb_lock_range;
  import dfs_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic refclk, rst_n, locked, clkout1, clkout2;
  logic [11:0] s1, s2, phases;
  coarse_stage_t stage;
  logic [N_FINE_CDL-1:0] fsel;
  int half_ps = 1000;
  time e1 [$];
  time e2 [$];

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
  always @(posedge clkout1 or negedge clkout1) e1.push_back($time);
  always @(posedge clkout2 or negedge clkout2) e2.push_back($time);

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic coarse_stage_t want_stage(int t_ps);
    if (t_ps / 2 < 1163) return STAGE_1;
    if (t_ps / 2 < 1380) return STAGE_2;
    return STAGE_3;
  endfunction

  initial begin
    int n_stage [4];
    rst_n = 1;
    s1 = si_pattern(MULT_6, 0);
    s2 = si_pattern(MULT_0P5, 0);
    #10;
    n_stage = '{0, 0, 0, 0};
    for (int f = 270; f <= 500; f += 10) begin
      int t_ps, n, worst;
      longint mean;
      t_ps = 2 * (500_000 / f);            // even period in ps
      half_ps = t_ps / 2;
      rst_n = 0;
      repeat (3) @(posedge refclk);
      #(t_ps / 4);
      rst_n = 1;
      n = 0;
      while (!locked && n < 40) begin @(posedge refclk); n++; #1; end
      check(n == 10, $sformatf("%0d MHz: lock after %0d edges", f, n));
      check(stage == want_stage(t_ps), $sformatf("%0d MHz: stage %0d", f, stage));
      n_stage[int'(stage)]++;
      repeat (3) @(posedge refclk);
      e1.delete();
      repeat (6) @(posedge refclk);
      worst = 0;
      for (int k = 1; k < e1.size(); k++) begin
        int d;
        d = int'(e1[k] - e1[k-1]) - t_ps / 12;
        if (d < 0) d = -d;
        if (d > worst) worst = d;
      end
      mean = (e1.size() < 3) ? -1 : longint'(e1[e1.size()-1] - e1[0]) / (e1.size() - 1);
      check(e1.size() > 40 && worst <= 20, $sformatf("%0d MHz: worst phase step error %0d ps", f, worst));
      check(mean * 1200 >= longint'(t_ps) * 99 && mean * 1200 <= longint'(t_ps) * 101,
            $sformatf("%0d MHz: mean half period %0d, want %0d", f, mean, t_ps / 12));
    end
    check(n_stage[1] > 0 && n_stage[2] > 0 && n_stage[3] > 0, "all three coarse stages used");
    // phase shifts at 500 MHz
    half_ps = 1000;
    rst_n = 0;
    repeat (3) @(posedge refclk);
    #500 rst_n = 1;
    wait (locked);
    s1 = si_pattern(MULT_1, 0);
    for (int k = 1; k < 12; k++) begin
      int bad, cnt;
      longint want;
      if (k == 6) continue;
      want = longint'(2000) * (k % 6) / 12;
      s2 = si_pattern(MULT_1, k);
      repeat (3) @(posedge refclk);
      e1.delete(); e2.delete();
      repeat (6) @(posedge refclk);
      bad = 0; cnt = 0;
      foreach (e2[i]) begin
        time prev;
        prev = 0;
        foreach (e1[j]) if (e1[j] <= e2[i]) prev = e1[j];
        if (prev != 0) begin
          cnt++;
          if (longint'(e2[i] - prev) < want - 25 || longint'(e2[i] - prev) > want + 25) bad++;
        end
      end
      check(cnt >= 8 && bad == 0, $sformatf("shift %0d/12: %0d of %0d edges off", k, bad, cnt));
    end
    $display("stages used: 1:%0d 2:%0d 3:%0d", n_stage[1], n_stage[2], n_stage[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
