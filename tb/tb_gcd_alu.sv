// Self-checking testbench for gcd_alu (the ALU without BIST).
//
// First replays the reference scenario: reset, load A=10 and B=2, then
// opcode 00, 01, 10, 11 in turn without a new load, expecting Y=2, Y1=2,
// Y2=12 and Y2=8. Then loads 500 random operand pairs and steps through
// all four opcodes for each, comparing Y, Y1 and Y2 with reference values
// computed here and checking done: it must be low right after a load,
// rise for 00/01 exactly when the engine's reference step count says, and
// for 10/11 one clock after the operation is selected.
module tb_gcd_alu;
  import gcd_alu_pkg::*;
  localparam int W = 8;
  logic clk = 1'b0, rst = 1'b1, load = 1'b0;
  logic [W-1:0] A = '0, B = '0, Y, Y1, Y2;
  logic [1:0] opcode = 2'b00;
  logic done;
  int checks = 0, failures = 0;

  gcd_alu #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  function automatic int ref_gcd(int x, int y);
    while (y != 0) begin int t = x % y; x = y; y = t; end
    return x;
  endfunction

  function automatic int eu_steps(int x, int y);
    int n = 0;
    while (!(y == 0 || x == y || x == 0)) begin
      if (y < x) x -= y; else y -= x;
      n++;
    end
    return n;
  endfunction

  function automatic int st_steps(int u, int v);
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

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s = %0d, expected %0d", what, got, exp); end
  endtask

  // Load operands, then walk through the four opcodes.
  task automatic run(int x, int y);
    int cyc;
    @(negedge clk); A = W'(x); B = W'(y); load = 1'b1; opcode = 2'b00;
    @(negedge clk); load = 1'b0;
    A = W'($urandom); B = W'($urandom);       // inputs are ignored after load
    expect_eq("done after load", int'(done), 0);
    // Euclid
    cyc = 0;
    while (!done && cyc < 1000) begin @(negedge clk); cyc++; end
    expect_eq("euclid latency", cyc, eu_steps(x, y) + 1);
    expect_eq("Y", int'(Y), ref_gcd(x, y));
    // Stein (started by the same load, so it may already be done)
    opcode = 2'b01; #1;
    if (st_steps(x, y) + 1 > cyc) begin
      expect_eq("stein not yet done", int'(done), 0);
      while (!done) begin @(negedge clk); cyc++; end
      expect_eq("stein latency", cyc, st_steps(x, y) + 1);
    end else begin
      expect_eq("stein done", int'(done), 1);
    end
    expect_eq("Y1", int'(Y1), ref_gcd(x, y));
    // Add
    @(negedge clk); opcode = 2'b10; #1;
    expect_eq("add done before result", int'(done), 0);
    @(negedge clk);
    expect_eq("add done", int'(done), 1);
    expect_eq("Y2 add", int'(Y2), (x + y) % 256);
    // Subtract
    opcode = 2'b11; #1;
    expect_eq("sub done before result", int'(done), 0);
    @(negedge clk);
    expect_eq("sub done", int'(done), 1);
    expect_eq("Y2 sub", int'(Y2), (x - y + 256) % 256);
    // Back to a gcd opcode: Y2 holds, Y and Y1 still valid
    opcode = 2'b00;
    @(negedge clk);
    expect_eq("Y2 hold", int'(Y2), (x - y + 256) % 256);
    expect_eq("Y hold", int'(Y), ref_gcd(x, y));
    expect_eq("done hold", int'(done), 1);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    expect_eq("reset Y", int'(Y), 0);
    expect_eq("reset done", int'(done), 0);
    rst = 1'b0;
    run(10, 2);
    run(48, 180); run(20, 0); run(0, 22); run(21, 41); run(43, 245); run(255, 1); run(0, 0);
    repeat (500) run($urandom_range(0, 255), $urandom_range(0, 255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
