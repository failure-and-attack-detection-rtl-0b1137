// Behavioural model of the one-time programmable (OTP) memory holding AFN_wc.
//
// Process variation shifts every AFN, so the worst-case threshold is measured after
// fabrication and written once into an OTP word that the alarm comparator reads for
// the chip's lifetime. This model is not synthesizable logic: a real OTP is a
// process-specific fuse or antifuse macro. Unprogrammed fuses read as 0. The first
// write stores the word and sets programmed; every later write is ignored. Reset does
// not touch the content, as in a non-volatile memory.
// Interface: prog_en / prog_data write port, data read port, programmed flag.
// Timing: a write takes effect at the rising clock edge; data is read continuously.
// Storing the calibrated threshold in OTP follows the published sensor; the word
// width and the write-once port are this model's choices.
module otp_threshold #(
  parameter int unsigned WIDTH = ds_pkg::FN_W
) (
  input  logic             clk,
  input  logic             prog_en,
  input  logic [WIDTH-1:0] prog_data,
  output logic [WIDTH-1:0] data,
  output logic             programmed
);
  logic [WIDTH-1:0] fuses;
  logic             blown;

  initial begin
    fuses = '0;
    blown = 1'b0;
  end

  always @(posedge clk) begin
    if (prog_en && !blown) begin
      fuses <= prog_data;
      blown <= 1'b1;
    end
  end

  assign data       = fuses;
  assign programmed = blown;
endmodule
