// Sampling flip-flops of the digital timing sensor.
//
// One flip-flop per tapped buffer of the delay chain, all on the same clock. Each cycle
// the bank takes a snapshot of how far the last launched edge has travelled along the
// chain; this snapshot is the raw sensor output.
// Interface: taps[k-1] from the chain, q[k-1] the registered value of flip-flop k.
// Timing: q is updated at every rising edge of clk; active-low asynchronous reset to 0.
// The flip-flop count (43) and the common clock follow the published sensor; the
// reset is this design's choice.
module sample_bank #(
  parameter int unsigned NUM_TAPS = ds_pkg::NUM_TAPS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NUM_TAPS-1:0] taps,
  output logic [NUM_TAPS-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= taps;
  end
endmodule
