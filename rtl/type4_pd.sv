// type4_pd: type-IV (phase-frequency) detector used to measure how far the
// last delay line output o6 leads the reference clock.
//
// Two set-only flip-flops: one is set by a rising edge of fb (o6), the other
// by a rising edge of ref (REFCLK); when both are set they clear each other.
// The lead output is therefore high from an o6 edge to the next REFCLK edge,
// a pulse whose width is the phase error, and lag is high when REFCLK comes
// first. The detector type is named by the source design; this circuit is the
// usual one for it. en (active high) is this design's addition: while it is
// low both flip-flops are held clear, so the controller can arm the detector
// right after a REFCLK edge and the first edge it sees is from o6.
// Asynchronous: no clock; the clear path is combinational (zero width in
// simulation, a few gate delays in silicon).
module type4_pd (
  input  logic en,
  input  logic ref_clk,
  input  logic fb,
  output logic lead,
  output logic lag
);
  timeunit 1ps;
  timeprecision 1ps;

  logic clr_n;

  assign clr_n = en & ~(lead & lag);

  always_ff @(posedge fb or negedge clr_n) begin
    if (!clr_n) lead <= 1'b0;
    else        lead <= 1'b1;
  end

  always_ff @(posedge ref_clk or negedge clr_n) begin
    if (!clr_n) lag <= 1'b0;
    else        lag <= 1'b1;
  end
endmodule
