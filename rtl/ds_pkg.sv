// Shared constants of the digital timing sensor.
//
// The sensor launches a toggling edge into a chain of NUM_BUFS buffers. The first
// NUM_LEAD_BUFS buffers only add delay; each of the last NUM_TAPS buffers feeds one
// sampling flip-flop. FN is the 1-based index of the first sampling flip-flop whose
// phase differs from flip-flop 1; AFN is FN averaged over a window of cycles, and an
// alarm is raised when AFN drops below the worst-case value AFN_WC.
// The chain sizes (52 buffers, 9 leading, 43 sampled) and AFN_WC = 17 follow the
// published sensor; the fixed-point format of AFN and the widths are this design's.
package ds_pkg;
  parameter int unsigned NUM_BUFS      = 52;                    // whole delay chain
  parameter int unsigned NUM_LEAD_BUFS = 9;                     // unsampled leading buffers
  parameter int unsigned NUM_TAPS      = NUM_BUFS - NUM_LEAD_BUFS;  // 43 sampled buffers
  parameter int unsigned FN_W          = 6;                     // holds 1 .. NUM_TAPS+1
  parameter int unsigned AFN_WC        = 17;                    // worst-case AFN (1.0 V, 85 C)
endpackage
