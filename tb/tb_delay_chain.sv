// Testbench for the delay_chain model: an edge on a0 must reach tap k after exactly
// (9+k) buffer delays, checked just before and just after that time for every tap
// and for several buffer delays and both edge directions.
module tb_delay_chain;
  localparam int unsigned NB = ds_pkg::NUM_BUFS;
  localparam int unsigned NL = ds_pkg::NUM_LEAD_BUFS;
  localparam int unsigned NT = NB - NL;

  logic          a0 = 1'b0;
  int unsigned   d  = 100;
  logic [NT-1:0] taps;
  int   checks = 0;
  int   failures = 0;

  delay_chain dut (.a0(a0), .buf_delay_ps(d), .taps(taps));

  initial begin
    int unsigned delays[3] = '{100, 250, 37};
    logic v;
    v = 1'b0;
    #(NB * 300ps);
    foreach (delays[j]) begin
      d = delays[j];
      v = ~v;
      a0 = v;
      // walk along in 1 ps steps and compare every tap with the expected arrival
      for (int t = 1; t <= int'((NB + 1) * d); t++) begin
        #1ps;
        for (int k = 1; k <= int'(NT); k++) begin
          if (t == int'((NL + k) * d) - 1 || t == int'((NL + k) * d) + 1) begin
            checks++;
            if (taps[k-1] !== ((t > int'((NL + k) * d)) ? v : ~v)) begin
              failures++;
              $display("FAIL d=%0d tap %0d at %0d ps: %0b", d, k, t, taps[k-1]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1us;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
