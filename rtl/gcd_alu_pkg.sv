// Shared definitions for the GCD-processor ALU.
//
// The ALU has four operations selected by a 2-bit code: GCD by Euclid's
// subtraction algorithm, GCD by Stein's binary algorithm, addition and
// subtraction. The code values follow the published opcode table; the
// enum and its names are this design's own.
package gcd_alu_pkg;

  typedef enum logic [1:0] {
    OP_GCD_EUCLID = 2'b00,
    OP_GCD_STEIN  = 2'b01,
    OP_ADD        = 2'b10,
    OP_SUB        = 2'b11
  } alu_op_e;

  // Operand width of the reference design (8-bit A and B).
  localparam int unsigned DATA_WIDTH = 8;

endpackage
