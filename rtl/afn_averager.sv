// AFN averager: the mean of FN over a window of clock cycles.
//
// FN jitters by one between cycles near a flip-flop's setup limit (metastability), so
// the sensor characterises the operating condition by the average of FN (AFN) rather
// than by one snapshot. This block sums FN over 2**AVG_LOG2 consecutive cycles; the
// sum is AFN in unsigned fixed point with AVG_LOG2 fraction bits (sum / 2**AVG_LOG2),
// so an FN alternating between 15 and 16 gives AFN = 15.5 exactly.
// After reset the first SKIP_CYCLES values of fn are discarded: the launch flip-flop
// and the sampling flip-flops need two edges before a snapshot shows a launched edge.
// Interface: fn in; afn (Q FN_W.AVG_LOG2) and a one-cycle afn_valid pulse out.
// Timing: afn and afn_valid update at the rising edge that takes the last FN of a
// window; afn holds until the next window closes. Windows follow back to back.
// Averaging FN follows the published sensor; the window length, the fixed-point output
// and the warm-up are this design's choices.
module afn_averager #(
  parameter int unsigned FN_W        = ds_pkg::FN_W,
  parameter int unsigned AVG_LOG2    = 4,
  parameter int unsigned SKIP_CYCLES = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [FN_W-1:0]          fn,
  output logic [FN_W+AVG_LOG2-1:0] afn,
  output logic                     afn_valid
);
  localparam int unsigned SUM_W  = FN_W + AVG_LOG2;
  localparam int unsigned SKIP_W = $clog2(SKIP_CYCLES + 1);

  logic [SUM_W-1:0]    acc;
  logic [AVG_LOG2-1:0] cnt;
  logic [SKIP_W-1:0]   skip;
  logic [SUM_W-1:0]    acc_next;

  assign acc_next = acc + SUM_W'(fn);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      cnt       <= '0;
      skip      <= SKIP_W'(SKIP_CYCLES);
      afn       <= '0;
      afn_valid <= 1'b0;
    end else begin
      afn_valid <= 1'b0;
      if (skip != '0) begin
        skip <= skip - 1'b1;
      end else if (cnt == '1) begin
        afn       <= acc_next;
        afn_valid <= 1'b1;
        acc       <= '0;
        cnt       <= '0;
      end else begin
        acc <= acc_next;
        cnt <= cnt + 1'b1;
      end
    end
  end

  // one AFN per window: afn_valid never lasts two cycles
  assert property (@(posedge clk) disable iff (!rst_n) afn_valid |=> !afn_valid)
    else $error("afn_averager: afn_valid longer than one cycle");
endmodule
