// Testbench for type2_lv_osc: with the bias at its extremes the frequency
// must be 33 MHz and 300 MHz (within 1%), it must rise with the drive
// vn - vp, and the oscillator must rest low while disabled.
module tb_type2_lv_osc;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic en, clk;
  logic [11:0] vp, vn;
  time r [$];

  type2_lv_osc dut (.en(en), .vp_mv(vp), .vn_mv(vn), .clk(clk));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) r.push_back($time);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint freq_khz();
    if (r.size() < 3) return 0;
    return 64'd1_000_000_000 * (r.size() - 2) / longint'(r[r.size()-1] - r[1]);
  endfunction

  task automatic run(int p, int n, longint exp_khz);
    vp = 12'(p); vn = 12'(n);
    #200000;
    r.delete();
    #1000000;
    check(freq_khz() * 100 >= exp_khz * 99 && freq_khz() * 100 <= exp_khz * 101,
          $sformatf("vp %0d vn %0d: %0d kHz exp %0d", p, n, freq_khz(), exp_khz));
  endtask

  initial begin
    longint lo, mid;
    en = 0; vp = 490; vn = 54;
    #100000;
    check(clk == 1'b0 && r.size() == 0, "disabled oscillator rests low");
    en = 1;
    run(490, 54, 33_000);  lo = freq_khz();
    run(272, 272, 166_500); mid = freq_khz();
    run(54, 490, 300_000);
    check(lo < mid && mid < freq_khz(), "frequency rises with the drive");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
