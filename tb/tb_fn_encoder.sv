// Testbench for fn_encoder: builds snapshots with a known first phase change (any
// index, either phase, random junk after the change) and checks FN; all-equal
// snapshots give NUM_TAPS+1.
module tb_fn_encoder;
  localparam int unsigned NT = ds_pkg::NUM_TAPS;
  localparam int unsigned FW = ds_pkg::FN_W;
  logic [NT-1:0] q;
  logic [FW-1:0] fn;
  int   checks = 0;
  int   failures = 0;

  fn_encoder dut (.q(q), .fn(fn));

  task automatic try(input logic [NT-1:0] pattern, input int unsigned expfn);
    q = pattern;
    #1ns;
    checks++;
    if (int'(fn) != int'(expfn)) begin
      failures++;
      $display("FAIL q=%h fn=%0d expected %0d", q, fn, expfn);
    end
  endtask

  initial begin
    logic [NT-1:0] p;
    logic a;
    try('0, NT + 1);
    try('1, NT + 1);
    // the worst-case snapshot of Fig. 2(a): flip-flops 1..16 in phase A, 17.. flipped
    try({{(NT-16){1'b1}}, 16'h0}, 17);
    for (int n = 2; n <= int'(NT); n++) begin
      for (int r = 0; r < 20; r++) begin
        a = 1'($urandom);
        p = {$urandom, $urandom};
        for (int k = 1; k < n; k++) p[k-1] = a;
        p[n-1] = ~a;
        try(p, n);
      end
    end
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
