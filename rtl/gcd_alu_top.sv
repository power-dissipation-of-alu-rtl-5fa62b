// Top level: the GCD-processor ALU without and with built-in self test.
//
// The two variants are separate designs placed side by side; they share
// only the clock. Ports prefixed nb_ belong to the ALU without BIST
// (gcd_alu: load A and B, select an operation with opcode, read Y, Y1, Y2
// and done). Ports prefixed bi_ belong to the ALU with BIST (gcd_alu_bist:
// free-running LFSR patterns through both GCD engines, compared into
// bi_bist_out, plus the add/subtract path on bi_data11/bi_data22).
// Each variant has its own synchronous active-high reset. See the two
// modules for their timing.
module gcd_alu_top
  import gcd_alu_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_WIDTH
) (
  input  logic             clk,
  // ALU without BIST
  input  logic             nb_rst,
  input  logic             nb_load,
  input  logic [WIDTH-1:0] nb_A,
  input  logic [WIDTH-1:0] nb_B,
  input  logic [1:0]       nb_opcode,
  output logic [WIDTH-1:0] nb_Y,
  output logic [WIDTH-1:0] nb_Y1,
  output logic [WIDTH-1:0] nb_Y2,
  output logic             nb_done,
  // ALU with BIST
  input  logic             bi_reset,
  input  logic [WIDTH-1:0] bi_data11,
  input  logic [WIDTH-1:0] bi_data22,
  input  logic [1:0]       bi_sel,
  output logic [WIDTH-1:0] bi_datao1,
  output logic [WIDTH-1:0] bi_datao2,
  output logic [WIDTH-1:0] bi_data_out,
  output logic [WIDTH-1:0] bi_gcd,
  output logic [WIDTH-1:0] bi_gcd1,
  output logic             bi_bist_out,
  output logic             bi_bist_match,
  output logic [15:0]      bi_pattern_count
);

  gcd_alu #(.WIDTH(WIDTH)) u_alu (
    .clk, .rst(nb_rst), .load(nb_load), .A(nb_A), .B(nb_B), .opcode(nb_opcode),
    .Y(nb_Y), .Y1(nb_Y1), .Y2(nb_Y2), .done(nb_done)
  );

  gcd_alu_bist #(.WIDTH(WIDTH)) u_alu_bist (
    .clk, .reset(bi_reset), .data11(bi_data11), .data22(bi_data22), .sel(bi_sel),
    .datao1(bi_datao1), .datao2(bi_datao2), .data_out(bi_data_out),
    .gcd(bi_gcd), .gcd1(bi_gcd1), .bist_out(bi_bist_out), .bist_match(bi_bist_match),
    .pattern_count(bi_pattern_count)
  );

endmodule
