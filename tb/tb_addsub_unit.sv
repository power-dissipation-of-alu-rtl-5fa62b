// Self-checking testbench for addsub_unit.
//
// Applies every pair of 8-bit operands with both operations and compares
// the output with (a+b) mod 256 and (a-b) mod 256 computed in integer
// arithmetic. Includes the worked values 10+2=12, 10-2=8 and the
// wrap-around 43+245=32.
module tb_addsub_unit;
  localparam int W = 8;
  logic [W-1:0] a, b, y;
  logic sub;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  addsub_unit #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(int x, int z, bit s, int expect_y);
    a = W'(x); b = W'(z); sub = s;
    #1;
    checks++;
    if (int'(y) != expect_y) begin
      failures++;
      $display("FAIL %0d %s %0d = %0d, expected %0d", x, s ? "-" : "+", z, y, expect_y);
    end
  endtask

  initial begin
    check(10, 2, 1'b0, 12);
    check(10, 2, 1'b1, 8);
    check(43, 245, 1'b0, 32);
    check(40, 243, 1'b0, 27);
    check(2, 10, 1'b1, 248);
    for (int x = 0; x < 256; x++)
      for (int z = 0; z < 256; z++) begin
        check(x, z, 1'b0, (x + z) % 256);
        check(x, z, 1'b1, (x - z + 256) % 256);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
