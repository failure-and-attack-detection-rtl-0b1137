// Operating-condition sweep of ds_system_top: the AFN characteristic.
//
// The sensor is characterised by the AFN it reports over a grid of supply voltages and
// temperatures; the published contour plot spans AFN 2 (slowest corner) to 40 (best
// case, 1.4 V and -10 C), with the worst case at 17. Here each condition is one
// per-buffer delay d of the chain model, held for three 16-cycle windows after the OTP
// is calibrated to 17. The delay is swept from slow to fast so that every integer AFN
// from 2 to 44 occurs; for each, the last window's AFN must equal 16 * FN(d), with
// FN(d) = min { k : (9 + k) * d > T } for T = 10 ns, and alarm must be set exactly
// when that AFN is below 17. The test fails if any AFN level from 2 to 40 is missed.
module tb_afn_sweep;
  localparam int unsigned T_PS = 10000;
  localparam int unsigned NL   = ds_pkg::NUM_LEAD_BUFS;
  localparam int unsigned NT   = ds_pkg::NUM_TAPS;
  localparam int unsigned FW   = ds_pkg::FN_W;
  localparam int unsigned W    = 4;
  localparam int unsigned WIN  = 1 << W;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  int unsigned     d = 990;
  logic [3:0]      sbox_dout;
  logic            otp_prog_en = 1'b0;
  logic [FW-1:0]   otp_prog_data = FW'(ds_pkg::AFN_WC);
  logic            otp_programmed;
  logic [NT-1:0]   sensor_q;
  logic [FW-1:0]   fn;
  logic [FW+W-1:0] afn;
  logic            afn_valid;
  logic            alarm;

  int checks = 0;
  int failures = 0;

  ds_system_top dut (
    .clk(clk), .rst_n(rst_n), .buf_delay_ps(d),
    .sbox_din(4'h0), .sbox_dout(sbox_dout),
    .otp_prog_en(otp_prog_en), .otp_prog_data(otp_prog_data), .otp_programmed(otp_programmed),
    .sensor_q(sensor_q), .fn(fn), .afn(afn), .afn_valid(afn_valid), .alarm(alarm)
  );

  always #(T_PS / 2 * 1ps) clk = ~clk;

  function automatic int unsigned model_fn(input int unsigned dd);
    for (int unsigned k = 1; k <= NT; k++) if ((NL + k) * dd > T_PS) return k;
    return NT + 1;
  endfunction

  function automatic bit tie(input int unsigned dd);
    for (int unsigned k = 1; k <= NL + NT; k++) if (k * dd == T_PS) return 1'b1;
    return 1'b0;
  endfunction

  bit seen[int unsigned];

  initial begin
    int unsigned e;
    repeat (4) @(posedge clk);
    #1ns rst_n = 1'b1;
    otp_prog_en = 1'b1;
    @(negedge clk);
    @(negedge clk);
    otp_prog_en = 1'b0;
    checks++;
    if (!otp_programmed) begin failures++; $display("FAIL OTP not programmed"); end
    for (int unsigned dd = 990; dd >= 150; dd -= 3) begin
      if (tie(dd)) continue;
      @(posedge clk);
      d = dd;
      e = model_fn(dd);
      // the third window after the change holds only this condition
      repeat (3) @(posedge clk iff afn_valid);
      @(negedge clk);
      checks++;
      if (int'(afn) != int'(e * WIN)) begin
        failures++;
        $display("FAIL d=%0d ps AFN=%0d/16 expected %0d", dd, afn, e);
      end
      checks++;
      if (alarm !== (e < ds_pkg::AFN_WC)) begin
        failures++;
        $display("FAIL d=%0d ps AFN=%0d alarm=%0b", dd, e, alarm);
      end
      seen[e] = 1'b1;
    end
    for (int unsigned a = 2; a <= 40; a++) begin
      checks++;
      if (!seen.exists(a)) begin failures++; $display("FAIL AFN %0d never produced", a); end
    end
    $display("AFN levels produced: %0d", seen.num());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
