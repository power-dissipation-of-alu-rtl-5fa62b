// Self-checking testbench for bist_ora.
//
// Feeds matching result pairs, then a mismatch, then matches again, and
// checks that last_match follows each comparison, that pass stays low once
// a mismatch has been seen, that nothing changes without valid, and that
// count equals the number of valid pulses.
module tb_bist_ora;
  localparam int W = 8;
  logic clk = 1'b0, rst = 1'b1, valid = 1'b0;
  logic [W-1:0] res_a = '0, res_b = '0;
  logic pass, last_match;
  logic [15:0] count;
  int checks = 0, failures = 0;
  int n = 0;
  bit exp_pass = 1'b1;

  bist_ora #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic cmp(int x, int y, bit v);
    @(negedge clk); res_a = W'(x); res_b = W'(y); valid = v;
    @(negedge clk); valid = 1'b0;
    if (v) begin n++; exp_pass &= (x == y); end
    checks += 2;
    if (v && last_match != (x == y)) begin failures++; $display("FAIL last_match for %0d,%0d", x, y); end
    if (pass != exp_pass) begin failures++; $display("FAIL pass = %0b, expected %0b", pass, exp_pass); end
    checks++;
    if (int'(count) != n) begin failures++; $display("FAIL count = %0d, expected %0d", count, n); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    checks++; if (!pass || count != 0) begin failures++; $display("FAIL reset state"); end
    for (int i = 0; i < 20; i++) begin int r = $urandom_range(0, 255); cmp(r, r, 1'b1); end
    cmp(3, 4, 1'b0);           // mismatch without valid: ignored
    cmp(12, 13, 1'b1);         // real mismatch
    cmp(5, 5, 1'b1);
    checks++; if (!last_match) begin failures++; $display("FAIL last_match after match"); end
    rst = 1'b1; @(negedge clk); rst = 1'b0; n = 0; exp_pass = 1'b1;
    cmp(9, 9, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
