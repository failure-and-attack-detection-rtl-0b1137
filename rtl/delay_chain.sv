// Behavioural model of the sensor's buffer delay chain (not synthesizable logic).
//
// The real chain is NUM_BUFS standard-cell buffers whose propagation delay depends on
// supply voltage, temperature and process; that dependence is what the sensor measures.
// This model gives every buffer the same transport delay, buf_delay_ps picoseconds,
// read when an edge enters the buffer, so a test can emulate an operating condition (a
// slower corner means a larger delay) and change it at run time.
// Interface: a0 enters buffer 1; taps[k-1] is the output of buffer NUM_LEAD_BUFS+k,
// k = 1 .. NUM_TAPS, i.e. the last NUM_TAPS buffers feed the sampling flip-flops.
// Timing: an edge on a0 reaches taps[k-1] after (NUM_LEAD_BUFS+k) * buf_delay_ps.
// The 52/9/43 split follows the published sensor; equal buffer delays and the delay
// input are this model's abstraction of the analog behaviour.
module delay_chain #(
  parameter int unsigned NUM_BUFS      = ds_pkg::NUM_BUFS,
  parameter int unsigned NUM_LEAD_BUFS = ds_pkg::NUM_LEAD_BUFS
) (
  input  logic                              a0,
  input  int unsigned                       buf_delay_ps,
  output logic [NUM_BUFS-NUM_LEAD_BUFS-1:0] taps
);
  // node[0] is the chain input, node[i] the output of buffer i.
  logic [NUM_BUFS:0] node;

  initial node[NUM_BUFS:1] = '0;

  assign node[0] = a0;

  for (genvar i = 0; i < NUM_BUFS; i++) begin : g_buf
    always @(node[i]) node[i+1] <= #(buf_delay_ps * 1ps) node[i];
  end

  assign taps = node[NUM_BUFS:NUM_LEAD_BUFS+1];
endmodule
