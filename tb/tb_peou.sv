// Testbench for peou: closes the power efficiency optimization loop through
// a behavioural 1V charge pump and load (pump_1v_model). For each voltage
// detector (oscillating and bias) and for a light and a heavy load it starts
// the rail at 700 mV and checks that the counter counts up, that the rail
// then stays within 900 mV +/- 40 mV, and that the heavy load settles at a
// higher bias word (faster pump clock) than the light one. An overload must
// drive the word to its top (31) and an idle rail at 1100 mV to its bottom
// (0). The pump clock is measured at both ends of the word range against
// 33 MHz and 300 MHz within 3%. The counter is clocked at 10 MHz.
module tb_peou;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic rst_n, ctrl_clk, det_sel, clk_pump, flag, init;
  logic [11:0] vref, vpump;
  logic [4:0] word;
  int unsigned v0, load;
  time rises [$];

  peou dut (.rst_n(rst_n), .ctrl_clk(ctrl_clk), .det_sel(det_sel), .vpump_mv(vpump),
            .vref_mv(vref), .clk_pump(clk_pump), .flag(flag), .word(word));
  pump_1v_model u_pump (.clk_pump(clk_pump), .init(init), .v_init_mv(v0),
                        .load_uv_per_ns(load), .vout_mv(vpump));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    ctrl_clk = 0;
    forever #50000 ctrl_clk = ~ctrl_clk;
  end
  always @(posedge clk_pump) rises.push_back($time);

  initial begin
    #400_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic start(bit sel, int unsigned vstart, int unsigned ld);
    det_sel = sel; v0 = vstart; load = ld;
    rst_n = 1; #1; rst_n = 0;
    init = 0; #1000; init = 1; #1000; init = 0;
    #10000 rst_n = 1;
  endtask

  // Mean pump clock period over a 2 us window, in ps.
  task automatic pump_period(output longint p);
    rises.delete();
    #2_000_000;
    p = (rises.size() < 3) ? -1 : longint'(rises[rises.size()-1] - rises[0]) / (rises.size() - 1);
  endtask

  // Runs the loop for 40 us and returns the mean word of the last 10 us.
  task automatic regulate(bit sel, int unsigned ld, string name, output int mean_word);
    int vmin, vmax, sum, n, wmax;
    start(sel, 700, ld);
    wmax = 0;
    repeat (150) begin
      @(posedge ctrl_clk);
      if (int'(word) > wmax) wmax = int'(word);
    end
    check(wmax >= 3, $sformatf("%s: counter counted up (max word %0d)", name, wmax));
    repeat (150) @(posedge ctrl_clk);
    vmin = 4095; vmax = 0; sum = 0; n = 0;
    repeat (100) begin
      @(posedge ctrl_clk);
      if (int'(vpump) < vmin) vmin = int'(vpump);
      if (int'(vpump) > vmax) vmax = int'(vpump);
      sum += int'(word); n++;
    end
    mean_word = sum / n;
    check(vmin >= 860 && vmax <= 940,
          $sformatf("%s: rail %0d..%0d mV, want 900 +/- 40", name, vmin, vmax));
  endtask

  initial begin
    int w_light, w_heavy;
    longint p;
    vref = 12'd550;                       // bias detector point at 900 mV
    for (int sel = 0; sel < 2; sel++) begin
      regulate(sel[0], 40, $sformatf("det %0d light", sel), w_light);
      regulate(sel[0], 140, $sformatf("det %0d heavy", sel), w_heavy);
      check(w_heavy > w_light, $sformatf("det %0d: heavy word %0d > light word %0d",
                                         sel, w_heavy, w_light));
    end
    // overload: the word climbs to the top and stays
    start(1'b0, 700, 400);
    repeat (60) @(posedge ctrl_clk);
    check(word == 5'd31, $sformatf("overload: word %0d", word));
    check(flag == 1'b0, "overload: rail reported below the point");
    pump_period(p);
    check(p >= 3233 && p <= 3433, $sformatf("word 31: pump period %0d ps, want 3333", p));
    // idle rail above the point: the word stays at the bottom
    start(1'b1, 1100, 0);
    repeat (20) @(posedge ctrl_clk);
    check(word == 5'd0, $sformatf("idle: word %0d", word));
    check(flag == 1'b1, "idle: rail reported above the point");
    pump_period(p);
    check(p >= 29400 && p <= 31200, $sformatf("word 0: pump period %0d ps, want 30303", p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
