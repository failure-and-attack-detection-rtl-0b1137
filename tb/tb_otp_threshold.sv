// Testbench for the otp_threshold model: reads 0 before programming, keeps the first
// written value, ignores later writes.
module tb_otp_threshold;
  localparam int unsigned FW = ds_pkg::FN_W;
  logic clk = 1'b0;
  logic prog_en = 1'b0;
  logic [FW-1:0] prog_data = '0;
  logic [FW-1:0] data;
  logic programmed;
  int   checks = 0;
  int   failures = 0;

  otp_threshold dut (.clk(clk), .prog_en(prog_en), .prog_data(prog_data), .data(data), .programmed(programmed));

  always #5ns clk = ~clk;

  task automatic check(input logic [FW-1:0] expd, input logic expp, input string what);
    checks++;
    if (data !== expd || programmed !== expp) begin
      failures++;
      $display("FAIL %s: data=%0d programmed=%0b expected %0d/%0b", what, data, programmed, expd, expp);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check('0, 1'b0, "blank");
    prog_data = 6'd17;
    @(negedge clk);
    check('0, 1'b0, "data without prog_en");
    prog_en = 1'b1;
    @(negedge clk);
    prog_en = 1'b0;
    check(6'd17, 1'b1, "programmed");
    prog_data = 6'd5;
    prog_en = 1'b1;
    repeat (3) @(negedge clk);
    prog_en = 1'b0;
    check(6'd17, 1'b1, "second write ignored");
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
