// edge_combiner: behavioural model of one edge combiner of the frequency/phase
// tuning synthesizer.
//
// Twelve pulse generators, one per phase p[i], each make a short active-low
// pulse (PULSE_PS wide) at the rising edge of their phase when the program
// bit s[i] enables them. An AND tree merges the pulses and a toggle pulsed
// latch flips the output at the start of every merged pulse. The output thus
// toggles on the rising edge of every selected phase: with 2m selected phases
// spaced evenly over one reference period the output runs at m times the
// reference frequency with a 50% duty cycle that does not depend on the
// reference duty cycle. Changing s takes effect at the next selected edge,
// with no relock. The structure follows the source design; the pulse width is
// this design's choice and must stay below the phase spacing.
module edge_combiner
  import dfs_pkg::*;
#(
  parameter int unsigned PULSE_PS = 40
) (
  input  logic                rst_n,
  input  logic [N_PHASES-1:0] p,
  input  logic [N_PHASES-1:0] s,
  output logic                clkout
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N_PHASES-1:0] pulse_n;
  logic                all_n;

  initial pulse_n = '1;

  for (genvar i = 0; i < N_PHASES; i++) begin : g_pg
    always @(posedge p[i]) begin
      if (s[i]) begin
        pulse_n[i] = 1'b0;
        fork
          #(PULSE_PS) pulse_n[i] = 1'b1;
        join_none
      end
    end
  end

  assign all_n = &pulse_n;

  toggle_pulsed_latch u_tpl (.rst_n(rst_n), .trigger(~all_n), .q(clkout));
endmodule
