// End-to-end testbench for gcd_alu_top at its default parameters.
//
// Runs both ALU variants at once. The ALU without BIST loads the worked
// examples and 300 random operand pairs and is taken through all four
// opcodes for each, with every output checked against reference values.
// The ALU with BIST runs its self test over 600 LFSR pattern pairs (the
// whole 254-pattern cycle of the second generator and more); every GCD
// pair, bist_out and bist_match are checked, and its add/subtract path is
// driven at random and checked one clock later.
//
// It also counts how often each mechanism of the design happened: every
// opcode completing, loads, additions that wrap, subtractions that borrow,
// zero operands, both Euclid subtraction directions, all five Stein rules,
// LFSR steps (seen on pattern_count) and ORA comparisons. A mechanism that never happened counts
// as a failure.
module tb_gcd_alu_top;
  localparam int W = 8;
  logic clk = 1'b0;
  logic nb_rst = 1'b1, nb_load = 1'b0;
  logic [W-1:0] nb_A = '0, nb_B = '0, nb_Y, nb_Y1, nb_Y2;
  logic [1:0] nb_opcode = 2'b00;
  logic nb_done;
  logic bi_reset = 1'b1;
  logic [W-1:0] bi_data11 = '0, bi_data22 = '0;
  logic [1:0] bi_sel = 2'b00;
  logic [W-1:0] bi_datao1, bi_datao2, bi_data_out, bi_gcd, bi_gcd1;
  logic bi_bist_out, bi_bist_match;
  logic [15:0] bi_pattern_count;
  int checks = 0, failures = 0;
  bit nb_finished = 1'b0, bi_finished = 1'b0;

  gcd_alu_top dut (.*);

  always #5 clk = ~clk;

  // ---- reference helpers ----
  function automatic int ref_gcd(int x, int y);
    while (y != 0) begin int t = x % y; x = y; y = t; end
    return x;
  endfunction

  function automatic int lfsr_next(int s, int taps);
    int fb = 1;
    for (int i = 0; i < 8; i++) if (((taps >> i) & 1) != 0) fb ^= (s >> i) & 1;
    return ((s << 1) | fb) & 255;
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s = %0d, expected %0d", what, got, exp); end
  endtask

  // ---- mechanism counters ----
  int n_load = 0, n_done_eu = 0, n_done_st = 0, n_done_add = 0, n_done_sub = 0;
  int n_add_wrap = 0, n_sub_borrow = 0, n_zero_operand = 0;
  int n_eu_sub_a = 0, n_eu_sub_b = 0;
  int n_st_both_even = 0, n_st_u_even = 0, n_st_v_even = 0, n_st_u_ge = 0, n_st_u_lt = 0;
  int n_lfsr_step = 0, n_ora_compare = 0, n_bi_add = 0, n_bi_sub = 0, n_bi_hold = 0;

  // Count which Euclid and Stein rules the loaded operands take the
  // engines through (the engines' own step counts and results are checked
  // in their unit testbenches).
  task automatic count_rules(int x, int y);
    int u = x, v = y;
    while (!(y == 0 || x == y || x == 0)) begin
      if (y < x) begin x -= y; n_eu_sub_a++; end else begin y -= x; n_eu_sub_b++; end
    end
    while (u != 0 && v != 0) begin
      if (u % 2 == 0 && v % 2 == 0) begin u /= 2; v /= 2; n_st_both_even++; end
      else if (u % 2 == 0) begin u /= 2; n_st_u_even++; end
      else if (v % 2 == 0) begin v /= 2; n_st_v_even++; end
      else if (u >= v) begin u = (u - v) / 2; n_st_u_ge++; end
      else begin int t = (v - u) / 2; v = u; u = t; n_st_u_lt++; end
    end
  endtask

  // ---- ALU without BIST ----
  task automatic nb_wait_done(string what);
    int cyc = 0;
    while (!nb_done && cyc < 600) begin @(negedge clk); cyc++; end
    expect_eq({what, " done"}, int'(nb_done), 1);
  endtask

  task automatic nb_run(int x, int y);
    @(negedge clk); nb_A = W'(x); nb_B = W'(y); nb_load = 1'b1; nb_opcode = 2'b00;
    @(negedge clk); nb_load = 1'b0; n_load++;
    if (x == 0 || y == 0) n_zero_operand++;
    count_rules(x, y);
    nb_wait_done("euclid"); n_done_eu++;
    expect_eq("Y", int'(nb_Y), ref_gcd(x, y));
    nb_opcode = 2'b01; #1;
    nb_wait_done("stein"); n_done_st++;
    expect_eq("Y1", int'(nb_Y1), ref_gcd(x, y));
    @(negedge clk); nb_opcode = 2'b10; @(negedge clk);
    nb_wait_done("add"); n_done_add++;
    expect_eq("Y2 add", int'(nb_Y2), (x + y) % 256);
    if (x + y > 255) n_add_wrap++;
    nb_opcode = 2'b11; @(negedge clk);
    nb_wait_done("sub"); n_done_sub++;
    expect_eq("Y2 sub", int'(nb_Y2), (x - y + 256) % 256);
    if (x < y) n_sub_borrow++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    nb_rst = 1'b0;
    nb_run(10, 2);           // the reference waveform: Y=2, Y1=2, Y2=12 then 8
    expect_eq("reference Y2 after sub", int'(nb_Y2), 8);
    nb_run(48, 180); nb_run(20, 0); nb_run(20, 10); nb_run(0, 22); nb_run(33, 0);
    nb_run(21, 22); nb_run(21, 41); nb_run(43, 245); nb_run(0, 0); nb_run(255, 1);
    repeat (300) nb_run($urandom_range(0, 255), $urandom_range(0, 255));
    nb_finished = 1'b1;
  end

  // ---- ALU with BIST: self test ----
  initial begin
    static int p1 = 0, p2 = 0;
    int n0, cyc;
    repeat (3) @(negedge clk);
    bi_reset = 1'b0;
    for (int i = 0; i < 600; i++) begin
      expect_eq("datao1", int'(bi_datao1), p1);
      expect_eq("datao2", int'(bi_datao2), p2);
      n0 = int'(bi_pattern_count);
      cyc = 0;
      while (int'(bi_pattern_count) == n0 && cyc < 600) begin @(negedge clk); cyc++; end
      n_lfsr_step += int'(bi_pattern_count) - n0;
      n_ora_compare += (int'(bi_pattern_count) - n0) * int'(bi_bist_match);
      expect_eq("gcd", int'(bi_gcd), ref_gcd(p1, p2));
      expect_eq("gcd1", int'(bi_gcd1), ref_gcd(p1, p2));
      expect_eq("bist_match", int'(bi_bist_match), 1);
      expect_eq("bist_out", int'(bi_bist_out), 1);
      p1 = lfsr_next(p1, 'hA2);
      p2 = lfsr_next(p2, 'h8C);
    end
    expect_eq("pattern_count", int'(bi_pattern_count), 600);
    bi_finished = 1'b1;
  end

  // ---- ALU with BIST: arithmetic path ----
  initial begin
    int x, y, s, prev;
    repeat (4) @(negedge clk);
    while (!bi_finished) begin
      prev = int'(bi_data_out);
      x = $urandom_range(0, 255); y = $urandom_range(0, 255); s = $urandom_range(0, 3);
      bi_data11 = W'(x); bi_data22 = W'(y); bi_sel = 2'(s);
      @(negedge clk);
      case (s)
        2: begin expect_eq("data_out add", int'(bi_data_out), (x + y) % 256); n_bi_add++; end
        3: begin expect_eq("data_out sub", int'(bi_data_out), (x - y + 256) % 256); n_bi_sub++; end
        default: begin expect_eq("data_out hold", int'(bi_data_out), prev); n_bi_hold++; end
      endcase
    end
  end

  task automatic mech(string name, int n);
    $display("mechanism %-28s happened %0d times", name, n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism %s never happened", name); end
  endtask

  initial begin
    wait (nb_finished && bi_finished);
    @(negedge clk);
    mech("load", n_load);
    mech("opcode 00 euclid done", n_done_eu);
    mech("opcode 01 stein done", n_done_st);
    mech("opcode 10 add done", n_done_add);
    mech("opcode 11 sub done", n_done_sub);
    mech("add wraps past 255", n_add_wrap);
    mech("sub borrows", n_sub_borrow);
    mech("zero operand", n_zero_operand);
    mech("euclid a-b step", n_eu_sub_a);
    mech("euclid b-a step", n_eu_sub_b);
    mech("stein both even", n_st_both_even);
    mech("stein u even", n_st_u_even);
    mech("stein v even", n_st_v_even);
    mech("stein odd u>=v", n_st_u_ge);
    mech("stein odd u<v", n_st_u_lt);
    mech("lfsr step", n_lfsr_step);
    mech("ora compare", n_ora_compare);
    mech("bist data_out add", n_bi_add);
    mech("bist data_out sub", n_bi_sub);
    mech("bist data_out hold", n_bi_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
