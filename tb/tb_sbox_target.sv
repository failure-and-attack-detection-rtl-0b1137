// Testbench for sbox_target: random inputs every cycle; dout must equal the PRESENT
// S-box of the input applied two edges earlier.
module tb_sbox_target;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [3:0] din = '0;
  logic [3:0] dout;
  int   checks = 0;
  int   failures = 0;
  localparam logic [63:0] TABLE = 64'h2174_8FE3_DA09_B65C;

  sbox_target dut (.clk(clk), .rst_n(rst_n), .din(din), .dout(dout));

  always #5ns clk = ~clk;

  initial begin
    logic [3:0] hist[$];
    repeat (2) @(negedge clk);
    checks++;
    if (dout !== 4'h0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    for (int i = 0; i < 100; i++) begin
      din = 4'($urandom);
      hist.push_back(din);
      @(negedge clk);
      if (hist.size() == 2) begin
        checks++;
        if (dout !== TABLE[4*hist[0] +: 4]) begin
          failures++;
          $display("FAIL dout=%h expected S(%h)=%h", dout, hist[0], TABLE[4*hist[0] +: 4]);
        end
        void'(hist.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
