// peou_counter: up/down counter of the power efficiency optimization unit.
// Synthesizable.
//
// Each rising edge of clk it counts up while the detecting flag is 0 (the 1V
// generator output has fallen below the detecting point: heavy load, more
// pump clock needed) and down while the flag is 1 (light load, less clock is
// more efficient). The count goes to the net-bias circuit of the oscillator,
// where a higher word means a higher frequency. The 5-bit width is the source
// design's; saturation at both ends and the reset value 0 (lowest frequency)
// are this design's choices. rst_n: active low, asynchronous.
module peou_counter #(
  parameter int unsigned W = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         flag,
  output logic [W-1:0] count
);
  timeunit 1ps;
  timeprecision 1ps;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      count <= '0;
    else if (!flag && count != '1)   count <= count + 1'b1;
    else if ( flag && count != '0)   count <= count - 1'b1;
  end
endmodule
