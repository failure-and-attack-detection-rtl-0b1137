// Testbench for sample_bank: random tap patterns must appear on q one edge later;
// reset clears q.
module tb_sample_bank;
  localparam int unsigned NT = ds_pkg::NUM_TAPS;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [NT-1:0] taps = '0;
  logic [NT-1:0] q;
  logic [NT-1:0] expq;
  int   checks = 0;
  int   failures = 0;

  sample_bank dut (.clk(clk), .rst_n(rst_n), .taps(taps), .q(q));

  always #5ns clk = ~clk;

  initial begin
    taps = '1;
    repeat (2) @(negedge clk);
    checks++;
    if (q !== '0) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      expq = taps;
      @(negedge clk);
      checks++;
      if (q !== expq) begin failures++; $display("FAIL q=%h expected %h", q, expq); end
      taps = {$urandom, $urandom};
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
