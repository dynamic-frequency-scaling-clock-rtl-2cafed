// Testbench for peou_counter: a reference counter kept here must match on
// every clock for a random flag sequence, including both saturation ends.
module tb_peou_counter;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic clk, rst_n, flag;
  logic [4:0] count;
  int ref_cnt, n_top, n_bot;

  peou_counter dut (.clk(clk), .rst_n(rst_n), .flag(flag), .count(count));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial clk = 0;
  always #5000 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flag = 0; rst_n = 1; #1; rst_n = 0; ref_cnt = 0; n_top = 0; n_bot = 0;
    #20000;
    check(count == 0, "reset value");
    @(negedge clk); rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      // long runs of one value reach both ends
      if (i % 50 == 0) flag = (i / 50) % 2;
      else if ($urandom % 8 == 0) flag = ~flag;
      @(posedge clk); #1;
      if (!flag && ref_cnt < 31) ref_cnt++;
      else if (flag && ref_cnt > 0) ref_cnt--;
      if (ref_cnt == 31) n_top++;
      if (ref_cnt == 0)  n_bot++;
      check(count == 5'(ref_cnt), $sformatf("cycle %0d: count %0d exp %0d", i, count, ref_cnt));
      @(negedge clk);
    end
    check(n_top > 0 && n_bot > 0, "both ends reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
