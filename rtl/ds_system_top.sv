// Sensor-integrated system: a digital timing sensor placed beside the circuit it guards.
//
// Sensor: a launch flip-flop toggles every cycle and sends its edge down a chain of 52
// buffers; the last 43 buffers each feed a sampling flip-flop on the common clock. The
// index FN where the sampled phase first flips tells how far the edge travelled in
// one clock period, hence how fast the silicon runs at the present voltage and
// temperature. FN is averaged into AFN and compared with the worst-case value read
// from a one-time programmable memory; AFN below it raises alarm.
// Target: a 4-bit PRESENT S-box between an input and an output register.
// The clock and the supply are outside: clk comes in as a port, and the effect of the
// supply and temperature on the buffers is the buf_delay_ps input of the delay chain
// model (picoseconds per buffer).
// Interface: clk, rst_n; sbox_din/sbox_dout; otp_prog_en/otp_prog_data/otp_programmed
// for the post-fabrication calibration; sensor_q (raw flip-flop snapshot), fn, afn
// (fixed point, AVG_LOG2 fraction bits), afn_valid, alarm.
// Timing: fn describes the snapshot taken at the previous edge; afn_valid pulses once
// per 2**AVG_LOG2 cycles; alarm follows one cycle later.
// The chain sizes, the sampling scheme, FN, AFN, the OTP threshold and the S-box
// target between two registers follow the published sensor system; the buffer-delay
// input, the averaging window, the port list and the resets are this design's.
module ds_system_top #(
  parameter int unsigned NUM_BUFS      = ds_pkg::NUM_BUFS,
  parameter int unsigned NUM_LEAD_BUFS = ds_pkg::NUM_LEAD_BUFS,
  parameter int unsigned FN_W          = ds_pkg::FN_W,
  parameter int unsigned AVG_LOG2      = 4
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  int unsigned                       buf_delay_ps,
  // protected target
  input  logic [3:0]                        sbox_din,
  output logic [3:0]                        sbox_dout,
  // threshold calibration
  input  logic                              otp_prog_en,
  input  logic [FN_W-1:0]                   otp_prog_data,
  output logic                              otp_programmed,
  // sensor outputs
  output logic [NUM_BUFS-NUM_LEAD_BUFS-1:0] sensor_q,
  output logic [FN_W-1:0]                   fn,
  output logic [FN_W+AVG_LOG2-1:0]          afn,
  output logic                              afn_valid,
  output logic                              alarm
);
  localparam int unsigned NUM_TAPS = NUM_BUFS - NUM_LEAD_BUFS;

  logic                a0;
  logic [NUM_TAPS-1:0] taps;
  logic [FN_W-1:0]     threshold;

  sbox_target u_target (
    .clk  (clk),
    .rst_n(rst_n),
    .din  (sbox_din),
    .dout (sbox_dout)
  );

  launch_toggle_ff u_launch (
    .clk  (clk),
    .rst_n(rst_n),
    .a0   (a0)
  );

  delay_chain #(
    .NUM_BUFS     (NUM_BUFS),
    .NUM_LEAD_BUFS(NUM_LEAD_BUFS)
  ) u_chain (
    .a0          (a0),
    .buf_delay_ps(buf_delay_ps),
    .taps        (taps)
  );

  sample_bank #(.NUM_TAPS(NUM_TAPS)) u_bank (
    .clk  (clk),
    .rst_n(rst_n),
    .taps (taps),
    .q    (sensor_q)
  );

  fn_encoder #(.NUM_TAPS(NUM_TAPS), .FN_W(FN_W)) u_fn (
    .q (sensor_q),
    .fn(fn)
  );

  afn_averager #(.FN_W(FN_W), .AVG_LOG2(AVG_LOG2)) u_avg (
    .clk      (clk),
    .rst_n    (rst_n),
    .fn       (fn),
    .afn      (afn),
    .afn_valid(afn_valid)
  );

  otp_threshold #(.WIDTH(FN_W)) u_otp (
    .clk       (clk),
    .prog_en   (otp_prog_en),
    .prog_data (otp_prog_data),
    .data      (threshold),
    .programmed(otp_programmed)
  );

  alarm_comparator #(.FN_W(FN_W), .AVG_LOG2(AVG_LOG2)) u_cmp (
    .clk      (clk),
    .rst_n    (rst_n),
    .afn      (afn),
    .afn_valid(afn_valid),
    .threshold(threshold),
    .alarm    (alarm)
  );
endmodule
