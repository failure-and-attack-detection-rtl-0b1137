// Testbench for present_sbox: all 16 inputs against the PRESENT table, and the check
// that the mapping is a permutation.
module tb_present_sbox;
  logic [3:0] x;
  logic [3:0] y;
  int   checks = 0;
  int   failures = 0;
  // PRESENT S-box, input 0 in the least significant nibble
  localparam logic [63:0] TABLE = 64'h2174_8FE3_DA09_B65C;

  present_sbox dut (.x(x), .y(y));

  initial begin
    logic [15:0] seen;
    seen = '0;
    for (int i = 0; i < 16; i++) begin
      x = 4'(i);
      #1ns;
      checks++;
      if (y !== TABLE[4*i +: 4]) begin
        failures++;
        $display("FAIL S(%h)=%h expected %h", x, y, TABLE[4*i +: 4]);
      end
      seen[y] = 1'b1;
    end
    checks++;
    if (seen !== 16'hFFFF) begin failures++; $display("FAIL not a permutation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
