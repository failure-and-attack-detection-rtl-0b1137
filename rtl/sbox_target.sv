// Protected target circuit: input register, PRESENT S-box, output register.
//
// The register-to-register path through the S-box is the timing path whose failure the
// sensor predicts; it shares the sensor's clock and supply.
// Interface: din (4 bits) in, dout (4 bits) out, active-low asynchronous reset to 0.
// Timing: dout = S(din) two rising edges after din is applied (one edge into the input
// register, one into the output register); one new value per cycle.
// The register / S-box / register structure and the 4-bit widths follow the published
// sensor system; the reset is this design's choice.
module sbox_target (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] din,
  output logic [3:0] dout
);
  logic [3:0] in_q;
  logic [3:0] sbox_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_q <= '0;
      dout <= '0;
    end else begin
      in_q <= din;
      dout <= sbox_y;
    end
  end

  present_sbox u_sbox (.x(in_q), .y(sbox_y));
endmodule
