// Self-checking testbench for gcd_alu_bist (the ALU with BIST).
//
// A reference model of the two LFSRs (shift towards the MSB, new LSB =
// XNOR of the tapped bits) predicts every pattern pair. For each of 400
// patterns the testbench checks the pair on datao1/datao2, the GCD on gcd
// and gcd1 against a reference GCD, the number of clocks the pattern took
// (3 plus the slower engine's step count), pattern_count and bist_out.
// The first nine GCDs must be 0, 1, 3, 1, 2, 1, 1, 1, 1 as in the
// reference simulation. Meanwhile data11, data22 and sel are driven at
// random and data_out is checked one clock later: sum or difference mod
// 256 for sel 10/11, unchanged for 00/01.
module tb_gcd_alu_bist;
  localparam int W = 8;
  localparam int NPAT = 400;
  logic clk = 1'b0, reset = 1'b1;
  logic [W-1:0] data11 = '0, data22 = '0;
  logic [1:0] sel = 2'b00;
  logic [W-1:0] datao1, datao2, data_out, gcd, gcd1;
  logic bist_out, bist_match;
  logic [15:0] pattern_count;
  int checks = 0, failures = 0;
  bit stop_arith = 1'b0;

  gcd_alu_bist #(.WIDTH(W)) dut (.*);

  always #5 clk = ~clk;

  function automatic int ref_gcd(int x, int y);
    while (y != 0) begin int t = x % y; x = y; y = t; end
    return x;
  endfunction

  function automatic int lfsr_next(int s, int taps);
    int fb = 1;
    for (int i = 0; i < 8; i++) if (((taps >> i) & 1) != 0) fb ^= (s >> i) & 1;
    return ((s << 1) | fb) & 255;
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

  int fig_gcd[9] = '{0, 1, 3, 1, 2, 1, 1, 1, 1};

  // Pattern-by-pattern check of the BIST loop
  initial begin
    static int p1 = 0, p2 = 0;
    int cyc, n0;
    repeat (2) @(negedge clk);
    reset = 1'b0;
    for (int i = 0; i < NPAT; i++) begin
      expect_eq("datao1", int'(datao1), p1);
      expect_eq("datao2", int'(datao2), p2);
      n0 = int'(pattern_count);
      cyc = 0;
      while (int'(pattern_count) == n0 && cyc < 1000) begin @(negedge clk); cyc++; end
      expect_eq("pattern clocks", cyc, 3 + ((eu_steps(p1, p2) > st_steps(p1, p2)) ?
                                            eu_steps(p1, p2) : st_steps(p1, p2)));
      expect_eq("pattern_count", int'(pattern_count), i + 1);
      expect_eq("gcd", int'(gcd), ref_gcd(p1, p2));
      expect_eq("gcd1", int'(gcd1), ref_gcd(p1, p2));
      if (i < 9) expect_eq("gcd as in reference run", int'(gcd), fig_gcd[i]);
      expect_eq("bist_out", int'(bist_out), 1);
      p1 = lfsr_next(p1, 'hA2);
      p2 = lfsr_next(p2, 'h8C);
    end
    stop_arith = 1'b1;
    @(negedge clk); @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Arithmetic path, checked concurrently
  initial begin
    int x, y, s, prev;
    repeat (2) @(negedge clk);
    expect_eq("data_out after reset", int'(data_out), 0);
    while (!stop_arith) begin
      prev = int'(data_out);
      x = $urandom_range(0, 255); y = $urandom_range(0, 255); s = $urandom_range(0, 3);
      data11 = W'(x); data22 = W'(y); sel = 2'(s);
      @(negedge clk);
      case (s)
        2: expect_eq("data_out add", int'(data_out), (x + y) % 256);
        3: expect_eq("data_out sub", int'(data_out), (x - y + 256) % 256);
        default: expect_eq("data_out hold", int'(data_out), prev);
      endcase
    end
  end

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
