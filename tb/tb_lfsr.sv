// Self-checking testbench for lfsr.
//
// Checks both tap settings used by the BIST ALU against the pattern
// sequences of the reference simulation (first input 0, 1, 3, 6, 12, 25,
// 51, 103, 207; second input 0, 1, 3, 7, 14, 29, 59, 118, 236), checks
// that the register holds while en is low, and measures the period of
// each setting (24 and 254) by running until the reset state returns.
// Also checks the 3-bit plain-XOR register with seed 1 (taps on the
// second and third flip-flops), which must visit all 7 non-zero states:
// 1, 2, 5, 3, 7, 6, 4.
module tb_lfsr;
  localparam int W = 8;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0;
  logic [W-1:0] q1, q2;
  int checks = 0, failures = 0;

  lfsr #(.WIDTH(W), .TAPS(8'hA2)) dut1 (.clk, .rst, .en, .q(q1));
  lfsr #(.WIDTH(W), .TAPS(8'h8C)) dut2 (.clk, .rst, .en, .q(q2));
  logic [2:0] q3;
  lfsr #(.WIDTH(3), .TAPS(3'b110), .INVERT(1'b0), .SEED(3'b001)) dut3 (.clk, .rst, .en, .q(q3));
  int seq3[7] = '{1, 2, 5, 3, 7, 6, 4};

  always #5 clk = ~clk;

  int seq1[9] = '{0, 1, 3, 6, 12, 25, 51, 103, 207};
  int seq2[9] = '{0, 1, 3, 7, 14, 29, 59, 118, 236};

  initial begin
    int p1, p2;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 9; i++) begin
      checks++;
      if (int'(q3) != seq3[i % 7]) begin failures++; $display("FAIL q3[%0d] = %0d, expected %0d", i, q3, seq3[i % 7]); end
      checks += 2;
      if (int'(q1) != seq1[i]) begin failures++; $display("FAIL q1[%0d] = %0d, expected %0d", i, q1, seq1[i]); end
      if (int'(q2) != seq2[i]) begin failures++; $display("FAIL q2[%0d] = %0d, expected %0d", i, q2, seq2[i]); end
      en = 1'b1; @(negedge clk); en = 1'b0;
      // hold while en is low
      @(negedge clk);
    end
    // period measurement
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    en = 1'b1;
    p1 = 0; p2 = 0;
    for (int i = 1; i <= 300; i++) begin
      @(negedge clk);
      if (p1 == 0 && q1 == 0) p1 = i;
      if (p2 == 0 && q2 == 0) p2 = i;
    end
    checks += 2;
    if (p1 != 24)  begin failures++; $display("FAIL period 1 = %0d, expected 24", p1); end
    if (p2 != 254) begin failures++; $display("FAIL period 2 = %0d, expected 254", p2); end
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
