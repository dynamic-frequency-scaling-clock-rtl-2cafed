// Testbench for net_bias: the end points are 490 mV and 54 mV, vp falls and
// vn rises by one step (within 1 mV of 436/31 mV) per count, and vp + vn
// stays constant.
module tb_net_bias;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic [4:0]  b;
  logic [11:0] vp, vn;

  net_bias dut (.b(b), .vp_mv(vp), .vn_mv(vn));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int prev_p, prev_n;
    b = 0; #10;
    check(vp == 490 && vn == 54, $sformatf("word 0: vp %0d vn %0d", vp, vn));
    prev_p = vp; prev_n = vn;
    for (int w = 1; w < 32; w++) begin
      real expv;
      expv = 490.0 - 436.0 * w / 31.0;
      b = 5'(w); #10;
      check(vp < prev_p && vn > prev_n, $sformatf("word %0d monotonic", w));
      check(vp >= int'(expv) - 1 && vp <= int'(expv) + 1, $sformatf("word %0d: vp %0d exp %f", w, vp, expv));
      check(vp + vn == 544, $sformatf("word %0d: vp+vn %0d", w, vp + vn));
      prev_p = vp; prev_n = vn;
    end
    check(vp == 54 && vn == 490, "word 31 end points");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
