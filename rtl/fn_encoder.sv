// Phase-change encoder: turns the sampled chain snapshot into FN.
//
// Flip-flop 1 defines phase A of the cycle. FN is the 1-based index of the first
// flip-flop whose value differs from flip-flop 1, i.e. where the complementary phase
// starts; flip-flops 1 .. FN-1 share phase A. If all flip-flops agree, FN is
// NUM_TAPS+1. Only the first change counts; a second change further along the chain
// (an edge launched two cycles earlier) is ignored.
// Interface: q (snapshot, bit k-1 is flip-flop k), fn. Purely combinational.
// The definition of FN follows the published sensor; taking flip-flop 1 as the phase
// reference and the value for "no change" are this design's choices.
module fn_encoder #(
  parameter int unsigned NUM_TAPS = ds_pkg::NUM_TAPS,
  parameter int unsigned FN_W     = ds_pkg::FN_W
) (
  input  logic [NUM_TAPS-1:0] q,
  output logic [FN_W-1:0]     fn
);
  always_comb begin
    fn = FN_W'(NUM_TAPS + 1);
    for (int k = NUM_TAPS - 1; k >= 1; k--) begin
      if (q[k] != q[0]) fn = FN_W'(k + 1);
    end
  end

  // FN always names a flip-flop after the reference, or the "no change" value
  always_comb assert (fn >= FN_W'(2) && fn <= FN_W'(NUM_TAPS + 1))
    else $error("fn_encoder: FN %0d out of range", fn);
endmodule
