// Self-checking testbench for euclid_gcd.
//
// Drives the worked examples (gcd(48,180)=12, gcd(20,0)=20, gcd(20,10)=10,
// gcd(10,2)=2), corner cases with zero operands and equal operands, and
// 3000 random 8-bit pairs. Each result is compared with a reference GCD
// computed here by the modulo form of Euclid's algorithm, and the latency
// from start to done with the number of subtraction steps counted by a
// separate reference loop (steps + 1 clocks).
module tb_euclid_gcd;
  localparam int W = 8;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic [W-1:0] a = '0, b = '0, result;
  logic done;
  int checks = 0, failures = 0;

  euclid_gcd #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  function automatic int ref_gcd(int x, int y);
    while (y != 0) begin int t = x % y; x = y; y = t; end
    return x;
  endfunction

  function automatic int ref_steps(int x, int y);
    int n = 0;
    while (!(y == 0 || x == y || x == 0)) begin
      if (y < x) x -= y; else y -= x;
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
    run(48, 180); run(180, 48); run(20, 0); run(0, 20); run(20, 10); run(10, 2);
    run(0, 0); run(7, 7); run(255, 1); run(1, 255); run(255, 255); run(128, 64);
    repeat (3000) run($urandom_range(0, 255), $urandom_range(0, 255));
    // result holds while idle
    @(negedge clk); @(negedge clk);
    checks++; if (!done) begin failures++; $display("FAIL done did not hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
