// Testbench for dcd_sequencer: checks the cycle-by-cycle schedule (coarse
// window on cycle 1, fine CDLs 0..7 on cycles 2..9, lock on the tenth edge),
// the C1,C2 to coarse stage map and the blender tap select.
module tb_dcd_sequencer;
  import dfs_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic clk, rst_n, c1, c2;
  logic en_coarse, pd_en, sel_t2, locked;
  logic [N_FINE_CDL-1:0] en_fine;
  coarse_stage_t stage;

  dcd_sequencer dut (.clk(clk), .rst_n(rst_n), .c1(c1), .c2(c2), .en_coarse(en_coarse),
                     .en_fine(en_fine), .pd_en(pd_en), .stage(stage), .sel_t2(sel_t2), .locked(locked));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial clk = 0;
  always #1000 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic a, logic b, coarse_stage_t exp_stage);
    rst_n = 1; #1; rst_n = 0; c1 = a; c2 = b;
    @(negedge clk); @(negedge clk);
    check(!en_coarse && en_fine == 0 && !locked && stage == STAGE_1, "reset state");
    rst_n = 1;
    for (int e = 1; e <= 12; e++) begin
      @(posedge clk); #1;
      check(en_coarse == (e == 1), $sformatf("edge %0d en_coarse %b", e, en_coarse));
      check(en_fine == ((e >= 2 && e <= 9) ? 8'(1 << (e - 2)) : 8'h00),
            $sformatf("edge %0d en_fine %b", e, en_fine));
      check(pd_en == (e >= 2 && e <= 9), $sformatf("edge %0d pd_en %b", e, pd_en));
      check(locked == (e >= 10), $sformatf("edge %0d locked %b", e, locked));
      if (e >= 2) begin
        check(stage == exp_stage, $sformatf("c1c2=%b%b stage %0d exp %0d", a, b, stage, exp_stage));
        check(sel_t2 == (exp_stage == STAGE_3 && !(a || b)), "tap select");
      end
      if (e == 3) begin c1 = ~a; c2 = ~b; end   // later changes must not matter
    end
  endtask

  initial begin
    run(1'b1, 1'b1, STAGE_1);
    run(1'b0, 1'b1, STAGE_2);
    run(1'b0, 1'b0, STAGE_3);
    run(1'b1, 1'b0, STAGE_2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
