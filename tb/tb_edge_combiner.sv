// Testbench for edge_combiner: twelve ideal phases of a 2400 ps reference are
// generated here. For every multiplication factor and every phase of it the
// output period must be 2400/factor ps, the duty cycle 50%, and the first
// rising edge must sit on the selected phase. A switch between factors must
// take effect without any pause longer than one reference period.
module tb_edge_combiner;
  import dfs_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int T_PS = 2400;
  localparam int STEP = T_PS / 12;

  int checks = 0, failures = 0;
  logic rst_n;
  logic [11:0] p, s;
  logic clkout;
  time t_r [$];
  time t_f [$];

  edge_combiner dut (.rst_n(rst_n), .p(p), .s(s), .clkout(clkout));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  for (genvar i = 0; i < 12; i++) begin : g_ph
    initial begin
      p[i] = 1'b0;
      #(1000 + i * STEP);
      forever begin p[i] = 1'b1; #(T_PS / 2); p[i] = 1'b0; #(T_PS / 2); end
    end
  end

  always @(posedge clkout) t_r.push_back($time);
  always @(negedge clkout) t_f.push_back($time);

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 2*factor numerators: 1,2,3,4,6,12 edges per reference period
  task automatic measure(mult_t m, int ph);
    int n = mult_edges(m);
    int out_period = 2 * T_PS / n;
    s = si_pattern(m, ph);
    #(3 * T_PS);
    t_r.delete(); t_f.delete();
    #(4 * T_PS);
    check(t_r.size() >= 2, $sformatf("factor code %0d: output runs", m));
    if (t_r.size() >= 2) begin
      for (int k = 1; k < t_r.size(); k++)
        check(t_r[k] - t_r[k-1] == out_period,
              $sformatf("factor code %0d phase %0d: period %0d exp %0d", m, ph, t_r[k] - t_r[k-1], out_period));
      for (int k = 0; k < t_f.size(); k++)
        if (t_f[k] > t_r[0]) begin
          check(t_f[k] - t_r[0] == out_period / 2, $sformatf("factor code %0d: high time %0d", m, t_f[k] - t_r[0]));
          break;
        end
      // the rising edge lies on a selected phase (phase k rises at 1000+k*STEP mod T)
      check(s[((t_r[0] - 1000) % T_PS) / STEP] && ((t_r[0] - 1000) % STEP == 0) ||
            ((t_f.size() > 0) && s[((t_f[0] - 1000) % T_PS) / STEP]),
            $sformatf("factor code %0d phase %0d: edges on selected phases", m, ph));
    end
  endtask

  initial begin
    s = '0; rst_n = 1; #1; rst_n = 0; #100; rst_n = 1;
    for (int m = 0; m < 6; m++)
      for (int ph = 0; ph < 12 / mult_edges(mult_t'(m)); ph++)
        measure(mult_t'(m), ph);
    // table rows given explicitly
    check(si_pattern(MULT_1, 0)   == 12'b0000_0100_0001, "1x program vector");
    check(si_pattern(MULT_1P5, 0) == 12'b0001_0001_0001, "1.5x program vector");
    check(si_pattern(MULT_2, 0)   == 12'b0010_0100_1001, "2x program vector");
    check(si_pattern(MULT_3, 1)   == 12'b1010_1010_1010, "3x program vector, second phase");
    check(si_pattern(MULT_6, 0)   == 12'hFFF, "6x program vector");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
