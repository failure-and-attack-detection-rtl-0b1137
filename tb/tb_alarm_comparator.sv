// Testbench for alarm_comparator: AFN values around the threshold (17.0, 16.9375,
// 17.0625, 15.5, 40) with threshold 17, alarm only updated on afn_valid, and no alarm
// with an unprogrammed (zero) threshold.
module tb_alarm_comparator;
  localparam int unsigned FW = ds_pkg::FN_W;
  localparam int unsigned W  = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [FW+W-1:0] afn = '0;
  logic            afn_valid = 1'b0;
  logic [FW-1:0]   thr = FW'(ds_pkg::AFN_WC);
  logic            alarm;
  int   checks = 0;
  int   failures = 0;

  alarm_comparator #(.AVG_LOG2(W)) dut (.clk(clk), .rst_n(rst_n), .afn(afn), .afn_valid(afn_valid),
                                        .threshold(thr), .alarm(alarm));

  always #5ns clk = ~clk;

  task automatic present(input int unsigned v, input logic valid, input logic exp);
    afn = (FW+W)'(v);
    afn_valid = valid;
    @(negedge clk);
    afn_valid = 1'b0;
    checks++;
    if (alarm !== exp) begin
      failures++;
      $display("FAIL afn=%0d/16 thr=%0d valid=%0b alarm=%0b expected %0b", v, thr, valid, alarm, exp);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (alarm !== 1'b0) begin failures++; $display("FAIL alarm in reset"); end
    rst_n = 1'b1;
    present(17 * 16, 1, 0);
    present(17 * 16 - 1, 1, 1);
    present(17 * 16 + 1, 0, 1);   // not valid: alarm holds
    present(17 * 16 + 1, 1, 0);
    present(31 * 8, 1, 1);        // 15.5
    present(40 * 16, 0, 1);
    present(40 * 16, 1, 0);
    for (int i = 0; i < 200; i++) begin
      int unsigned v;
      logic e;
      v = $urandom_range(0, 44 * 16);
      thr = FW'($urandom_range(0, 44));
      e = (v < 16 * int'(thr));
      present(v, 1, e);
    end
    thr = '0;
    present(0, 1, 0);
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
