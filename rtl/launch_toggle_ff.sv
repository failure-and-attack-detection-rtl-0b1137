// Launch flip-flop of the digital timing sensor.
//
// A single flip-flop whose output a0 is inverted and fed back to its own input, so a0
// changes value on every rising clock edge (0 -> 1 -> 0 ...). Every cycle therefore
// launches one edge, alternately rising and falling, into the delay chain.
// Interface: clk, active-low asynchronous reset rst_n (clears a0 to 0), output a0.
// Timing: a0 toggles one clock-to-Q after each rising edge of clk while rst_n is high.
// The self-feedback and the reset input follow the published sensor; the reset value 0
// and the reset polarity are this design's choice.
module launch_toggle_ff (
  input  logic clk,
  input  logic rst_n,
  output logic a0
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) a0 <= 1'b0;
    else        a0 <= ~a0;
  end
endmodule
