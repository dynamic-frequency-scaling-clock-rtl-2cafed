// Testbench for coarse_ctrl_decoder: compares every stage code with the
// control table (t2,t2n,t3,t3n,d1,d1n,d2,d2n,d3,d3n), checks that every
// control pair is complementary and that the stages cross two, three and
// four transmission gates (a gate conducts when its plain control is low).
module tb_coarse_ctrl_decoder;
  import dfs_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  coarse_stage_t stage;
  coarse_ctl_t   ctl;

  coarse_ctrl_decoder dut (.stage(stage), .ctl(ctl));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  //                                  t2 t2n t3 t3n d1 d1n d2 d2n d3 d3n
  localparam logic [9:0] EXP1 = 10'b1___0___1__0___0__1___1__0___1__0;
  localparam logic [9:0] EXP2 = 10'b0___1___1__0___1__0___0__1___1__0;
  localparam logic [9:0] EXP3 = 10'b0___1___0__1___1__0___1__0___0__1;

  function automatic int gates(logic [9:0] c);
    // bit order t2 t2n t3 t3n d1 d1n d2 d2n d3 d3n = 9..0
    if (!c[5]) return 2;
    if (!c[9] && !c[3]) return 3;
    if (!c[9] && !c[7] && !c[1]) return 4;
    return 0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] exp_tab [4];
    exp_tab[0] = EXP1; exp_tab[1] = EXP1; exp_tab[2] = EXP2; exp_tab[3] = EXP3;
    for (int s = 0; s < 4; s++) begin
      stage = coarse_stage_t'(s);
      #10;
      check(ctl == exp_tab[s], $sformatf("stage %0d ctl %b exp %b", s, ctl, exp_tab[s]));
      for (int k = 0; k < 5; k++)
        check(ctl[2*k+1] != ctl[2*k], $sformatf("stage %0d pair %0d not complementary", s, k));
      check(gates(ctl) == ((s == 0) ? 2 : s + 1), $sformatf("stage %0d crosses %0d gates", s, gates(ctl)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
