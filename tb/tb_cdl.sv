// Testbench for cdl: pulses shorter than the threshold store 1, pulses at or
// above it store 0; a closed line ignores its input and keeps its result;
// reset stores 1.
module tb_cdl;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic rst_n, en, sig, q;

  cdl #(.TH_PS(500)) dut (.rst_n(rst_n), .en(en), .sig(sig), .q(q));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic pulse(int w);
    sig = 1; #(w); sig = 0; #1000;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; en = 0; sig = 0;
    #100;
    check(q == 1'b1, "reset value");
    rst_n = 1; #100;
    en = 1;
    pulse(300);  check(q == 1'b1, "300 ps pulse: not charged");
    pulse(499);  check(q == 1'b1, "499 ps pulse: not charged");
    pulse(500);  check(q == 1'b0, "500 ps pulse: charged");
    pulse(200);  check(q == 1'b1, "short pulse again: 1");
    pulse(900);  check(q == 1'b0, "900 ps pulse: charged");
    en = 0;
    pulse(100);  check(q == 1'b0, "closed line keeps 0");
    pulse(2000); check(q == 1'b0, "closed line keeps 0 after long pulse");
    en = 1;
    pulse(100);  check(q == 1'b1, "reopened line stores 1");
    en = 0;
    pulse(1000); check(q == 1'b1, "closed line keeps 1");
    rst_n = 0; #10; rst_n = 1; #10;
    check(q == 1'b1, "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
