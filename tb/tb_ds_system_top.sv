// End-to-end testbench of ds_system_top at its default size (52 buffers, 43 sampling
// flip-flops, 16-cycle AFN window).
//
// The clock period is 10 ns. The operating condition is emulated by the per-buffer
// delay d of the chain model, changed only in the active region of a rising edge so the
// edge launched at that clock edge travels with it. The expected FN is computed here
// from the chain geometry alone: the first sampling flip-flop k whose buffer
// (9 + k) has a delay (9 + k) * d longer than the period misses the edge, so
// FN = min { k : (9 + k) * d > T }, or 44 when even buffer 52 is reached in time.
// Every cycle fn is checked against that value, every AFN against the sum of the
// expected FNs of its window, every alarm against AFN < 16 * threshold.
// Scenario: unprogrammed OTP (alarm disabled), calibration to 17, the worst case
// (AFN 17, no alarm), slow corner (alarm), room-temperature-like corner (AFN 31, alarm
// clears), FN jitter between 15 and 16 (AFN 15.5, alarm), fast corners (AFN 40 and
// the saturated 44), an ignored second OTP write, then a random delay every cycle.
// Each of these mechanisms is counted and must occur. The PRESENT target is checked
// alongside.
module tb_ds_system_top;
  localparam int unsigned T_PS = 10000;
  localparam int unsigned NL   = ds_pkg::NUM_LEAD_BUFS;
  localparam int unsigned NT   = ds_pkg::NUM_TAPS;
  localparam int unsigned FW   = ds_pkg::FN_W;
  localparam int unsigned W    = 4;
  localparam int unsigned WIN  = 1 << W;
  localparam logic [63:0] SBOX = 64'h2174_8FE3_DA09_B65C;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  int unsigned     d = 390;
  logic [3:0]      sbox_din = '0;
  logic [3:0]      sbox_dout;
  logic            otp_prog_en = 1'b0;
  logic [FW-1:0]   otp_prog_data = '0;
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
    .sbox_din(sbox_din), .sbox_dout(sbox_dout),
    .otp_prog_en(otp_prog_en), .otp_prog_data(otp_prog_data), .otp_programmed(otp_programmed),
    .sensor_q(sensor_q), .fn(fn), .afn(afn), .afn_valid(afn_valid), .alarm(alarm)
  );

  always #(T_PS / 2 * 1ps) clk = ~clk;

  function automatic int unsigned model_fn(input int unsigned dd);
    for (int unsigned k = 1; k <= NT; k++) if ((NL + k) * dd > T_PS) return k;
    return NT + 1;
  endfunction

  // a delay that puts no buffer output exactly on a clock edge
  function automatic bit tie(input int unsigned dd);
    for (int unsigned k = 1; k <= NL + NT; k++) if (k * dd == T_PS) return 1'b1;
    return 1'b0;
  endfunction

  // mechanism counters
  int n_alarm_raised = 0, n_alarm_cleared = 0, n_disabled = 0, n_jitter = 0;
  int n_saturated = 0, n_otp_locked = 0, n_phase_flip = 0, n_no_alarm = 0;

  int unsigned dl[$];        // dl[e-1]: delay set at rising edge e after reset
  int unsigned edges = 0;
  int unsigned win_sum = 0;
  int unsigned win_cnt = 0;
  int unsigned exp_afn = 0;
  bit          exp_afn_ok = 1'b0;
  logic        prev_q0 = 1'b0;
  logic        prev_alarm = 1'b0;
  logic [3:0]  din_hist[$];

  // stimulus: delay and OTP at the rising edges, target input at the falling ones
  initial begin
    repeat (4) @(posedge clk);
    #1ns rst_n = 1'b1;
    for (int unsigned c = 1; c <= 640; c++) begin
      int unsigned nd;
      if      (c <= 48)  nd = 510;                      // slow, OTP still blank
      else if (c <= 96)  nd = 390;                      // worst case, FN 17
      else if (c <= 144) nd = 510;                      // slower than worst case
      else if (c <= 192) nd = 253;                      // FN 31
      else if (c <= 240) nd = (c % 2 != 0) ? 425 : 408;      // FN 15 / 16
      else if (c <= 288) nd = 206;                      // FN 40
      else if (c <= 336) nd = 150;                      // no phase change
      else if (c <= 384) nd = 425;                      // FN 15
      else begin
        do nd = $urandom_range(150, 990); while (tie(nd));
      end
      @(posedge clk);
      d = nd;
      dl.push_back(nd);
      edges = c;
      otp_prog_en   <= (c == 50) || (c == 340);
      otp_prog_data <= (c == 50) ? FW'(ds_pkg::AFN_WC) : FW'(5);
    end
    @(negedge clk);
    // every mechanism must have happened
    checks++; if (n_alarm_raised == 0)  begin failures++; $display("FAIL no alarm raised"); end
    checks++; if (n_alarm_cleared == 0) begin failures++; $display("FAIL alarm never cleared"); end
    checks++; if (n_no_alarm == 0)      begin failures++; $display("FAIL no quiet window"); end
    checks++; if (n_disabled == 0)      begin failures++; $display("FAIL blank OTP not seen"); end
    checks++; if (n_jitter == 0)        begin failures++; $display("FAIL no fractional AFN"); end
    checks++; if (n_saturated == 0)     begin failures++; $display("FAIL FN never saturated"); end
    checks++; if (n_otp_locked == 0)    begin failures++; $display("FAIL OTP rewrite not seen"); end
    checks++; if (n_phase_flip < 600)   begin failures++; $display("FAIL phase A not alternating"); end
    $display("mechanisms: alarm_raised=%0d alarm_cleared=%0d quiet=%0d blank_otp=%0d jitter=%0d saturated=%0d otp_locked=%0d phase_flips=%0d",
             n_alarm_raised, n_alarm_cleared, n_no_alarm, n_disabled, n_jitter, n_saturated, n_otp_locked, n_phase_flip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checks after each rising edge e (edges counts them from reset release)
  always @(negedge clk) if (rst_n && edges >= 1) begin
    sbox_din = 4'($urandom);
    din_hist.push_back(sbox_din);
    if (din_hist.size() == 3) begin
      checks++;
      if (sbox_dout !== SBOX[4*din_hist[0] +: 4]) begin
        failures++;
        $display("FAIL target dout=%h expected %h", sbox_dout, SBOX[4*din_hist[0] +: 4]);
      end
      void'(din_hist.pop_front());
    end
    if (edges >= 2) begin
      int unsigned e;
      e = model_fn(dl[edges - 2]);
      checks++;
      if (int'(fn) != int'(e)) begin
        failures++;
        $display("FAIL edge %0d d=%0d fn=%0d expected %0d q=%h", edges, dl[edges - 2], fn, e, sensor_q);
      end
      if (sensor_q[0] != prev_q0) n_phase_flip++;
      prev_q0 = sensor_q[0];
      if (fn == FW'(NT + 1)) n_saturated++;
    end
    // the averager takes fn at edges 3, 4, ...: accumulate the model's window
    if (edges >= 2 && edges + 1 >= 3) begin
      win_sum += model_fn(dl[edges - 2]);
      win_cnt++;
      if (win_cnt == WIN) begin
        exp_afn    = win_sum;
        exp_afn_ok = 1'b1;
        win_sum    = 0;
        win_cnt    = 0;
      end
    end
    if (afn_valid) begin
      checks++;
      if (!exp_afn_ok || int'(afn) != int'(exp_afn)) begin
        failures++;
        $display("FAIL edge %0d afn=%0d expected %0d", edges, afn, exp_afn);
      end
      if (afn[W-1:0] != '0) n_jitter++;
    end
    if (edges == 60 || edges == 350) begin
      checks++;
      if (!otp_programmed) begin failures++; $display("FAIL OTP not programmed"); end
    end
  end

  // the alarm follows each AFN by one cycle
  always @(posedge clk) if (rst_n && afn_valid) begin
    logic [FW+W-1:0] a;
    logic            prog;
    int unsigned     thr;
    a    = afn;
    prog = otp_programmed;
    @(negedge clk);
    thr  = (edges >= 52) ? ds_pkg::AFN_WC : 0;   // calibration written at edge 51
    checks++;
    if (alarm !== (int'(a) < int'(thr * WIN))) begin
      failures++;
      $display("FAIL alarm=%0b afn=%0d thr=%0d", alarm, a, thr);
    end
    if (prog) begin
      checks++;
      if (thr != ds_pkg::AFN_WC) begin failures++; $display("FAIL threshold %0d", thr); end
      if (edges > 345) n_otp_locked++;
    end
    if (!prog && int'(a) < int'(ds_pkg::AFN_WC * WIN) && !alarm) n_disabled++;
    if (alarm && !prev_alarm) n_alarm_raised++;
    if (!alarm && prev_alarm) n_alarm_cleared++;
    if (prog && !alarm) n_no_alarm++;
    prev_alarm = alarm;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
