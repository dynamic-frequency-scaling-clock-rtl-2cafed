// Testbench for scpb: for phase differences on both sides of the 460 ps tap
// boundary and both tap settings, the blended edge must sit halfway between
// the input edges (plus the buffer delay) when the tap suits the difference
// and 40 ps later when it does not; the buffered output must trail a by the
// buffer delay.
module tb_scpb;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic a, b, sel_t2, oa, oab;
  time t_oa, t_oab;

  scpb dut (.a(a), .b(b), .sel_t2(sel_t2), .oa(oa), .oab(oab));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge oa or negedge oa)   t_oa  = $time;
  always @(posedge oab or negedge oab) t_oab = $time;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic blend(int diff, logic tap);
    time t0;
    int  err;
    sel_t2 = tap;
    #3000;
    for (int e = 0; e < 2; e++) begin
      t0 = $time;
      a = ~a;
      #(diff) b = ~b;
      #2000;
      err = (tap != (diff >= 460)) ? 40 : 0;
      check(t_oa - t0 == 400, $sformatf("buffer delay %0d", t_oa - t0));
      check(t_oab - t0 == 400 + diff / 2 + err,
            $sformatf("diff %0d tap %b: blended at %0d exp %0d", diff, tap, t_oab - t0, 400 + diff / 2 + err));
      check(oab == b && oa == a, "outputs settle to the input levels");
    end
  endtask

  initial begin
    a = 0; b = 0; sel_t2 = 0;
    #1000;
    blend(300, 1'b0);
    blend(400, 1'b0);
    blend(500, 1'b1);
    blend(600, 1'b1);
    blend(500, 1'b0);
    blend(350, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
