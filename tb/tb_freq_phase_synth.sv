// Testbench for freq_phase_synth: six ideal delay line phases of a 2400 ps
// reference are generated here. The twelve blended phases must be evenly
// spaced by 200 ps, and the two outputs must run independently at the
// programmed factors, including a change of s2 while s1 stays put.
module tb_freq_phase_synth;
  import dfs_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int T_PS = 2400;

  int checks = 0, failures = 0;
  logic rst_n, sel_t2;
  logic [6:1] o;
  logic [11:0] s1, s2, p;
  logic clkout1, clkout2;
  time t_p [12];
  time r1 [$];
  time r2 [$];

  freq_phase_synth dut (.rst_n(rst_n), .o(o), .sel_t2(sel_t2), .s1(s1), .s2(s2),
                        .p(p), .clkout1(clkout1), .clkout2(clkout2));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  for (genvar k = 1; k <= 6; k++) begin : g_o
    initial begin
      o[k] = 1'b0;
      #(1000 + k * T_PS / 6);
      forever begin o[k] = 1'b1; #(T_PS / 2); o[k] = 1'b0; #(T_PS / 2); end
    end
  end
  for (genvar i = 0; i < 12; i++) begin : g_p
    always @(posedge p[i]) t_p[i] = $time;
  end
  always @(posedge clkout1) r1.push_back($time);
  always @(posedge clkout2) r2.push_back($time);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int period_of(ref time q [$]);
    if (q.size() < 3) return -1;
    return int'(q[q.size()-1] - q[q.size()-2]);
  endfunction

  initial begin
    rst_n = 1; #1; rst_n = 0;
    sel_t2 = 0;                      // 400 ps phase steps: tap T1
    s1 = si_pattern(MULT_2, 0);
    s2 = si_pattern(MULT_0P5, 3);
    #100; rst_n = 1;
    #(10 * T_PS);
    // phase k (k = 1..11) is k*200 ps after phase 0, modulo the period
    for (int i = 1; i < 12; i++)
      check(((t_p[i] - t_p[0] + T_PS) % T_PS) == i * T_PS / 12,
            $sformatf("phase %0d offset %0d exp %0d", i, (t_p[i] - t_p[0] + T_PS) % T_PS, i * T_PS / 12));
    r1.delete(); r2.delete();
    #(6 * T_PS);
    check(period_of(r1) == T_PS / 2, $sformatf("clkout1 2x period %0d", period_of(r1)));
    check(period_of(r2) == 2 * T_PS, $sformatf("clkout2 0.5x period %0d", period_of(r2)));
    s2 = si_pattern(MULT_6, 0);
    #(3 * T_PS);
    r1.delete(); r2.delete();
    #(4 * T_PS);
    check(period_of(r1) == T_PS / 2, $sformatf("clkout1 unchanged %0d", period_of(r1)));
    check(period_of(r2) == T_PS / 6, $sformatf("clkout2 6x period %0d", period_of(r2)));
    s1 = si_pattern(MULT_1P5, 1);
    #(3 * T_PS);
    r1.delete();
    #(4 * T_PS);
    check(period_of(r1) == 2 * T_PS / 3, $sformatf("clkout1 1.5x period %0d", period_of(r1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
