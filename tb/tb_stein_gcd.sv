// Self-checking testbench for stein_gcd.
//
// Drives the worked examples (gcd(0,22)=22, gcd(33,0)=33, gcd(21,22)=1,
// gcd(21,41)=1, gcd(48,180)=12), every pair with both operands below 64,
// and 3000 random 8-bit pairs. Results are compared with a reference GCD
// computed by the modulo form of Euclid's algorithm; the latency from
// start to done is compared with the number of binary-GCD rule
// applications counted by a reference loop (steps + 1 clocks).
module tb_stein_gcd;
  localparam int W = 8;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [W-1:0] a = '0, b = '0, result;
  logic done;
  int checks = 0, failures = 0;

  stein_gcd #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  function automatic int ref_gcd(int x, int y);
    while (y != 0) begin int t = x % y; x = y; y = t; end
    return x;
  endfunction

  function automatic int ref_steps(int u, int v);
    int n = 0;
    while (u != 0 && v != 0) begin
      if (u % 2 == 0 && v % 2 == 0) begin u /= 2; v /= 2; end
      else if (u % 2 == 0) u /= 2;
      else if (v % 2 == 0) v /= 2;
      else if (u >= v) u = (u - v) / 2;
      else begin int t = (v - u) / 2; v = u; u = t; end
      n++;
    end
    return n;
  endfunction

  task automatic run(int x, int y);
    int cyc = 0;
    @(negedge clk); a = W'(x); b = W'(y); start = 1'b1;
    @(negedge clk); start = 1'b0;
    checks++;
    if (done) begin failures++; $display("FAIL done not cleared by start (%0d,%0d)", x, y); end
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (int'(result) != ref_gcd(x, y)) begin
      failures++; $display("FAIL gcd(%0d,%0d) = %0d, expected %0d", x, y, result, ref_gcd(x, y));
    end
    checks++;
    if (cyc != ref_steps(x, y) + 1) begin
      failures++; $display("FAIL latency gcd(%0d,%0d) = %0d, expected %0d", x, y, cyc, ref_steps(x, y) + 1);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    checks++; if (done || result != 0) begin failures++; $display("FAIL reset state"); end
    rst = 1'b0;
    run(0, 22); run(33, 0); run(21, 22); run(21, 41); run(48, 180); run(10, 2);
    run(0, 0); run(128, 128); run(255, 1); run(192, 128); run(254, 255);
    for (int x = 0; x < 64; x++) for (int y = 0; y < 64; y++) run(x, y);
    repeat (3000) run($urandom_range(0, 255), $urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
