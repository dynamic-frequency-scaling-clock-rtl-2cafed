// Testbench for digital_delay_line: each output must trail the previous one
// by one cell delay, for both edges, at several control settings.
module tb_digital_delay_line;
  import dfs_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic refclk;
  coarse_stage_t stage;
  logic [N_FINE_CDL-1:0] fsel;
  logic [N_DDL_PHASES:1] o;
  time t_edge [N_DDL_PHASES+1];

  digital_delay_line dut (.refclk(refclk), .stage(stage), .fsel(fsel), .o(o));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge refclk or negedge refclk) t_edge[0] = $time;
  for (genvar k = 1; k <= N_DDL_PHASES; k++) begin : g_mon
    always @(posedge o[k] or negedge o[k]) t_edge[k] = $time;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(coarse_stage_t s, logic [7:0] f, int cell_ps);
    stage = s; fsel = f;
    #5000;
    for (int e = 0; e < 2; e++) begin
      refclk = ~refclk;
      #5000;
      for (int k = 1; k <= N_DDL_PHASES; k++)
        check(t_edge[k] - t_edge[k-1] == cell_ps,
              $sformatf("stage %0d fsel %b o%0d step %0d exp %0d", s, f, k, t_edge[k] - t_edge[k-1], cell_ps));
      check(o == {N_DDL_PHASES{refclk}}, "outputs follow the input level");
    end
  endtask

  initial begin
    refclk = 0; stage = STAGE_1; fsel = '0;
    #5000;
    run(STAGE_1, 8'h00, 320);
    run(STAGE_2, 8'b0001_0010, 380 + 5 * 35);
    run(STAGE_3, 8'b1000_0100, 440 + 5 * 21);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
