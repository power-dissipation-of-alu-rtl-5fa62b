// Adder/subtractor of the ALU.
//
// y = a + b when sub is 0 and y = a - b when sub is 1, both wrapped to
// WIDTH bits with no carry or borrow output, as the 8-bit result port of
// the reference design implies (43 + 245 gives 32). Purely combinational:
// the ALU that instantiates it registers the result. The subtraction is
// a + ~b + 1 so that one adder serves both operations; that structure is
// this design's choice.
module addsub_unit #(
  parameter int unsigned WIDTH = gcd_alu_pkg::DATA_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sub,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    y = a + (sub ? ~b : b) + WIDTH'(sub);
  end

endmodule
