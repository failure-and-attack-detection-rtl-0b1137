// Testbench for afn_averager: feeds FN sequences (constant 17, the alternating 15/16
// of Fig. 2(b), random) and checks each AFN against a sum computed here, the 2-cycle
// warm-up after reset and that afn_valid pulses exactly every 16 cycles.
module tb_afn_averager;
  localparam int unsigned FW = ds_pkg::FN_W;
  localparam int unsigned W  = 4;
  localparam int unsigned WIN = 1 << W;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [FW-1:0]   fn = '0;
  logic [FW+W-1:0] afn;
  logic            afn_valid;
  int   checks = 0;
  int   failures = 0;

  afn_averager #(.AVG_LOG2(W)) dut (.clk(clk), .rst_n(rst_n), .fn(fn), .afn(afn), .afn_valid(afn_valid));

  always #5ns clk = ~clk;

  // reference: fn values presented at each rising edge after reset
  int unsigned hist[$];
  int unsigned cyc = 0;
  int unsigned last_valid_cyc = 0;
  int unsigned nvalid = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    hist.push_back(int'(fn));
  end

  // check outputs just after each edge
  always @(negedge clk) if (rst_n && cyc > 0) begin
    if (afn_valid) begin
      int unsigned s;
      int unsigned first;
      nvalid++;
      // window n covers edges 2+(n-1)*WIN+1 .. 2+n*WIN
      checks++;
      if (cyc != 2 + nvalid * WIN) begin
        failures++;
        $display("FAIL afn_valid at cycle %0d, expected %0d", cyc, 2 + nvalid * WIN);
      end
      first = 2 + (nvalid - 1) * WIN;
      s = 0;
      for (int unsigned i = first; i < first + WIN && i < hist.size(); i++) s += hist[i];
      checks++;
      if (int'(afn) != int'(s)) begin
        failures++;
        $display("FAIL window %0d afn=%0d expected %0d (AFN %0.4f)", nvalid, afn, s, real'(s) / WIN);
      end
      last_valid_cyc = cyc;
      // fixed-point values of the two named windows: exactly 17.0 and 15.5
      if (nvalid == 1) begin
        checks++;
        if (afn != (FW+W)'(17 * WIN)) begin failures++; $display("FAIL AFN not 17.0"); end
      end
      if (nvalid == 2) begin
        checks++;
        if (afn != (FW+W)'(31 * WIN / 2)) begin failures++; $display("FAIL AFN not 15.5"); end
      end
    end
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    fn = 6'd40;            // dropped by the warm-up
    @(negedge clk);
    @(negedge clk);
    for (int i = 0; i < int'(WIN); i++) begin fn = 6'd17; @(negedge clk); end
    for (int i = 0; i < int'(WIN); i++) begin fn = (i % 2 != 0) ? 6'd16 : 6'd15; @(negedge clk); end
    for (int i = 0; i < int'(8 * WIN); i++) begin fn = FW'(1 + $urandom_range(0, 43)); @(negedge clk); end
    @(negedge clk);
    checks++;
    if (nvalid != 10) begin failures++; $display("FAIL %0d windows, expected 10", nvalid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
