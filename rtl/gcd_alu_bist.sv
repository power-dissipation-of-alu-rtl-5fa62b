// ALU of the GCD processor with built-in self test.
//
// The same Euclid and Stein GCD engines and adder/subtractor as the plain
// ALU, with an off-line BIST around the GCD datapath: two LFSRs (the test
// pattern generator) produce pseudo-random operand pairs datao1/datao2,
// both engines (the circuit under test) compute their GCD, and the output
// response analyzer compares the two results. Since the two algorithms are
// unrelated, a mismatch reveals a fault; bist_out stays 1 while every
// pattern has matched and bist_match gives the latest comparison. gcd and gcd1 show the latest Euclid and Stein
// results. The add/subtract path works on the external inputs data11 and
// data22: data_out is registered from data11+data22 (sel = 10) or
// data11-data22 (sel = 11) and holds for sel = 00/01. Port names follow
// the reference design; the pattern sequencing, the comparison of the two
// engines, bist_match, pattern_count and the data_out behaviour are this design's.
//
// Sequencing: a small controller starts both engines on the current
// pattern pair (START), waits until both are done (WAIT), then in the same
// clock hands the results to the analyzer and steps both LFSRs, and starts
// over. With the default taps the pattern pairs are (0,0), (1,1), (3,3),
// (6,7), (12,14), (25,29), (51,59), (103,118), (207,236), ... and repeat
// after lcm(24, 254) = 3048 pairs.
//
// Timing: one pattern takes 2 clocks plus the slower engine's latency.
// reset is synchronous and active high.
module gcd_alu_bist
  import gcd_alu_pkg::*;
#(
  parameter int unsigned      WIDTH = DATA_WIDTH,
  parameter logic [WIDTH-1:0] TAPS1 = 8'hA2,
  parameter logic [WIDTH-1:0] TAPS2 = 8'h8C
) (
  input  logic             clk,
  input  logic             reset,
  input  logic [WIDTH-1:0] data11,
  input  logic [WIDTH-1:0] data22,
  input  logic [1:0]       sel,
  output logic [WIDTH-1:0] datao1,
  output logic [WIDTH-1:0] datao2,
  output logic [WIDTH-1:0] data_out,
  output logic [WIDTH-1:0] gcd,
  output logic [WIDTH-1:0] gcd1,
  output logic             bist_out,
  output logic             bist_match,
  output logic [15:0]      pattern_count
);

  typedef enum logic [0:0] {
    S_START = 1'b0,
    S_WAIT  = 1'b1
  } bist_state_e;

  bist_state_e      state;
  logic             start, step;
  logic             eu_done, st_done;
  logic [WIDTH-1:0] arith;
  alu_op_e          op;

  assign op = alu_op_e'(sel);

  // Test pattern generator
  lfsr #(.WIDTH(WIDTH), .TAPS(TAPS1)) u_tpg1 (
    .clk, .rst(reset), .en(step), .q(datao1)
  );
  lfsr #(.WIDTH(WIDTH), .TAPS(TAPS2)) u_tpg2 (
    .clk, .rst(reset), .en(step), .q(datao2)
  );

  // Circuit under test
  euclid_gcd #(.WIDTH(WIDTH)) u_euclid (
    .clk, .rst(reset), .start, .a(datao1), .b(datao2), .result(gcd), .done(eu_done)
  );
  stein_gcd #(.WIDTH(WIDTH)) u_stein (
    .clk, .rst(reset), .start, .a(datao1), .b(datao2), .result(gcd1), .done(st_done)
  );

  // Output response analyzer
  bist_ora #(.WIDTH(WIDTH)) u_ora (
    .clk, .rst(reset), .valid(step), .res_a(gcd), .res_b(gcd1),
    .pass(bist_out), .last_match(bist_match), .count(pattern_count)
  );

  always_comb begin
    start = (state == S_START);
    step  = (state == S_WAIT) && eu_done && st_done;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= S_START;
    end else begin
      unique case (state)
        S_START: state <= S_WAIT;
        S_WAIT:  if (step) state <= S_START;
        default: state <= S_START;
      endcase
    end
  end

  // Arithmetic path on the external operands
  addsub_unit #(.WIDTH(WIDTH)) u_addsub (
    .a(data11), .b(data22), .sub(sel[0]), .y(arith)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      data_out <= '0;
    end else if (op == OP_ADD || op == OP_SUB) begin
      data_out <= arith;
    end
  end

  // The analyzer is only ever given finished results.
  a_compare_finished: assert property (@(posedge clk) disable iff (reset)
    step |-> (eu_done && st_done));

  // The engines are never restarted while the analyzer takes a result.
  a_no_overlap: assert property (@(posedge clk) disable iff (reset)
    !(start && step));

endmodule
