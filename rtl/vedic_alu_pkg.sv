// Shared definitions of the Vedic ALU.
//
// ALU_WIDTH is the operand and result width of the ALU (16 bits, as in the
// reference design). alu_op_e is the 2-bit control code of the ALU; the
// code assignment (00 add, 01 subtract, 10 multiply, 11 divide) follows the
// reference design's control table.
package vedic_alu_pkg;

  parameter int unsigned ALU_WIDTH = 16;

  typedef enum logic [1:0] {
    OP_ADD = 2'b00,  // data1 + data2
    OP_SUB = 2'b01,  // data1 - data2 (two's complement)
    OP_MUL = 2'b10,  // low ALU_WIDTH bits of data1 * data2
    OP_DIV = 2'b11   // data1 / data2, remainder on a separate output
  } alu_op_e;

endpackage
