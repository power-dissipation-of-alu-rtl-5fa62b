// ALU of the GCD processor, without built-in self test.
//
// Four operations on two WIDTH-bit operands A and B, selected by opcode:
// 00 gcd by Euclid's subtraction algorithm (output Y), 01 gcd by Stein's
// binary algorithm (output Y1), 10 A+B and 11 A-B (output Y2, wrapped to
// WIDTH bits). The port names and the opcode table are those of the
// reference design; how the operations are sequenced is this design's.
//
// How it works: while load is 1, A and B are captured and both GCD
// engines are (re)started on them. The engines run in parallel, so after
// one load both Y and Y1 become valid and stay valid. The adder/subtractor
// works on the captured operands; its result is registered into Y2 on each
// clock while opcode is 10 or 11 and held otherwise. done reports the
// operation that opcode currently selects: the Euclid engine's done for
// 00, the Stein engine's for 01, and for 10/11 that Y2 holds the result of
// that very operation on the loaded operands.
//
// Timing: Y2 is valid one clock after load falls (or after opcode changes
// between 10 and 11). Y and Y1 take data-dependent time: Euclid one clock
// per subtraction, Stein one clock per shift/subtract step, plus one.
// rst is synchronous and active high; it clears Y, Y1, Y2 and done.
module gcd_alu
  import gcd_alu_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_WIDTH
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] A,
  input  logic [WIDTH-1:0] B,
  input  logic [1:0]       opcode,
  output logic [WIDTH-1:0] Y,
  output logic [WIDTH-1:0] Y1,
  output logic [WIDTH-1:0] Y2,
  output logic             done
);

  alu_op_e          op;
  logic [WIDTH-1:0] a_q, b_q;
  logic             loaded;
  logic [WIDTH-1:0] arith;
  logic             y2_valid;
  logic             y2_sub;
  logic             eu_done, st_done;

  assign op = alu_op_e'(opcode);

  euclid_gcd #(.WIDTH(WIDTH)) u_euclid (
    .clk, .rst, .start(load), .a(A), .b(B), .result(Y), .done(eu_done)
  );

  stein_gcd #(.WIDTH(WIDTH)) u_stein (
    .clk, .rst, .start(load), .a(A), .b(B), .result(Y1), .done(st_done)
  );

  addsub_unit #(.WIDTH(WIDTH)) u_addsub (
    .a(a_q), .b(b_q), .sub(opcode[0]), .y(arith)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      a_q      <= '0;
      b_q      <= '0;
      loaded   <= 1'b0;
      Y2       <= '0;
      y2_valid <= 1'b0;
      y2_sub   <= 1'b0;
    end else if (load) begin
      a_q      <= A;
      b_q      <= B;
      loaded   <= 1'b1;
      y2_valid <= 1'b0;
    end else if (loaded && (op == OP_ADD || op == OP_SUB)) begin
      Y2       <= arith;
      y2_sub   <= opcode[0];
      y2_valid <= 1'b1;
    end
  end

  always_comb begin
    unique case (op)
      OP_GCD_EUCLID: done = eu_done;
      OP_GCD_STEIN:  done = st_done;
      default:       done = y2_valid && (y2_sub == opcode[0]);
    endcase
  end

endmodule
