// Testbench for launch_toggle_ff: after reset a0 is 0 and must invert at every rising
// edge; an asynchronous reset in mid-run must clear it at once.
module tb_launch_toggle_ff;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic a0;
  int   checks = 0;
  int   failures = 0;

  launch_toggle_ff dut (.clk(clk), .rst_n(rst_n), .a0(a0));

  always #5ns clk = ~clk;

  task automatic check(input logic exp, input string what);
    checks++;
    if (a0 !== exp) begin
      failures++;
      $display("FAIL %s: a0=%0b expected %0b", what, a0, exp);
    end
  endtask

  initial begin
    logic expv;
    repeat (2) @(negedge clk);
    check(1'b0, "in reset");
    rst_n = 1'b1;
    expv = 1'b0;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      expv = ~expv;
      check(expv, "toggle");
    end
    #2ns rst_n = 1'b0;
    #1ns check(1'b0, "async reset");
    @(negedge clk) rst_n = 1'b1;
    @(negedge clk) check(1'b1, "first edge after reset");
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
