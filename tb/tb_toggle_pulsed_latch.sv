// Testbench for toggle_pulsed_latch: every trigger pulse flips the output
// once, nothing else does, and reset clears it.
module tb_toggle_pulsed_latch;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic rst_n, trigger, q, exp_q;

  toggle_pulsed_latch dut (.rst_n(rst_n), .trigger(trigger), .q(q));

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
    trigger = 0; rst_n = 1; #1; rst_n = 0; #100;
    check(q == 1'b0, "reset clears");
    rst_n = 1; #100;
    exp_q = 1'b0;
    for (int i = 0; i < 20; i++) begin
      int w = 20 + ($urandom % 40);
      trigger = 1; #(w); trigger = 0;
      exp_q = ~exp_q;
      #(100 + $urandom % 300);
      check(q == exp_q, $sformatf("pulse %0d: q %b exp %b", i, q, exp_q));
    end
    rst_n = 0; #10;
    check(q == 1'b0, "reset clears again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
