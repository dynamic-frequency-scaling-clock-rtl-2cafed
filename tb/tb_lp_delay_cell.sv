// Testbench for lp_delay_cell: measures the rising and falling edge delay for
// each coarse stage and several fine codes, against 200 ps + 60 ps per
// transmission gate + 5 ps per fine step (at most 43 steps).
module tb_lp_delay_cell;
  import dfs_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic in;
  coarse_stage_t stage;
  coarse_ctl_t ctl;
  logic [N_FINE_CDL-1:0] fsel;
  logic out;
  time t_in, t_out;

  coarse_ctrl_decoder u_dec (.stage(stage), .ctl(ctl));
  lp_delay_cell dut (.in(in), .ctl(ctl), .fsel(fsel), .out(out));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge out or negedge out) t_out = $time;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(coarse_stage_t s, logic [7:0] f, int exp_ps);
    stage = s; fsel = f;
    #2000;
    for (int e = 0; e < 2; e++) begin
      in = ~in; t_in = $time;
      #2000;
      check(t_out - t_in == exp_ps,
            $sformatf("stage %0d fsel %b edge %0d: delay %0d exp %0d", s, f, e, t_out - t_in, exp_ps));
    end
  endtask

  initial begin
    in = 0; stage = STAGE_1; fsel = '0;
    #5000;
    measure(STAGE_1, 8'h00, 320);
    measure(STAGE_2, 8'h00, 380);
    measure(STAGE_3, 8'h00, 440);
    measure(STAGE_1, 8'b1000_0000, 325);        // weight 1
    measure(STAGE_2, 8'b0000_1000, 380 + 50);   // weight 10 (bit 3)
    measure(STAGE_3, 8'b0000_0100, 440 + 100);  // weight 20
    measure(STAGE_1, 8'b0000_0011, 320 + 215);  // 70 steps, capped at 43
    measure(STAGE_2, 8'b1110_1000, 380 + 80);   // 1+2+3+10 steps
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
