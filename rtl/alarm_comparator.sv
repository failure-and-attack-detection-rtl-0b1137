// Alarm comparator: flags an operating condition slower than the worst case.
//
// A slower delay chain (low voltage, high temperature) gives a lower AFN. Whenever a
// new AFN arrives it is compared with the calibrated worst-case threshold; AFN below
// the threshold predicts a timing failure of the protected circuit and sets alarm.
// Interface: afn (Q FN_W.AVG_LOG2) with afn_valid, threshold (integer FN units, from
// the one-time programmable memory), alarm out.
// Timing: alarm is registered; it changes one cycle after afn_valid and holds until the
// next AFN. A threshold of 0 (memory not yet programmed) never raises the alarm.
// "AFN below AFN_wc raises an alarm" follows the published sensor; re-evaluating the
// alarm every window (rather than latching it) is this design's choice.
module alarm_comparator #(
  parameter int unsigned FN_W     = ds_pkg::FN_W,
  parameter int unsigned AVG_LOG2 = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [FN_W+AVG_LOG2-1:0] afn,
  input  logic                     afn_valid,
  input  logic [FN_W-1:0]          threshold,
  output logic                     alarm
);
  logic [FN_W+AVG_LOG2-1:0] thr_fixed;

  assign thr_fixed = {threshold, {AVG_LOG2{1'b0}}};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         alarm <= 1'b0;
    else if (afn_valid) alarm <= (afn < thr_fixed);
  end
endmodule
