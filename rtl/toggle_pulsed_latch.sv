// toggle_pulsed_latch: behavioural model of the toggle pulsed latch (TPL) that
// ends each edge combiner (a transistor-level latch with a feedback inverter
// chain).
//
// Every trigger pulse flips the output once: while trigger is high the latch
// node is driven from the inverted output, and the loop through the output
// inverters is long enough that a short pulse causes exactly one flip. The
// model flips q on each rising edge of trigger. rst_n (active low,
// asynchronous, this design's addition) clears q so the output phase is
// known after reset.
module toggle_pulsed_latch (
  input  logic rst_n,
  input  logic trigger,
  output logic q
);
  timeunit 1ps;
  timeprecision 1ps;

  always @(posedge trigger or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= ~q;
  end
endmodule
