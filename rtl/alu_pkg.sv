// alu_pkg: operation codes shared by the ALU and its sub-blocks.
//
// The 4-bit ALUOp is split in two. ALUOp[3:2] picks one of four operation
// classes, each computed by its own sub-block in parallel; ALUOp[1:0] picks the
// operation inside the class. The class split, the logical, comparison and
// shift codes follow the design this ALU was written from. Where ADDU and SUB
// sit inside the arithmetic class is inferred from its overflow table (signed
// operations use 00 and 10, and bit 1 means "subtract"), so that placement is
// this design's reading rather than a printed assignment.
package alu_pkg;

  typedef enum logic [1:0] {
    CLS_LOGICAL = 2'b00,
    CLS_ARITH   = 2'b01,
    CLS_COMPARE = 2'b10,
    CLS_SHIFT   = 2'b11
  } op_class_e;

  // The 13 operations of the ALU.
  typedef enum logic [3:0] {
    OP_AND  = 4'b0000,
    OP_OR   = 4'b0001,
    OP_XOR  = 4'b0010,
    OP_NOR  = 4'b0011,
    OP_ADD  = 4'b0100,
    OP_ADDU = 4'b0101,
    OP_SUB  = 4'b0110,
    OP_SUBU = 4'b0111,
    OP_SLT  = 4'b1010,
    OP_SLTU = 4'b1011,
    OP_SLL  = 4'b1100,
    OP_SRL  = 4'b1110,
    OP_SRA  = 4'b1111
  } alu_op_e;

  // Low-order codes inside each class.
  localparam logic [1:0] LOG_AND = 2'b00, LOG_OR = 2'b01, LOG_XOR = 2'b10, LOG_NOR = 2'b11;
  localparam logic [1:0] AR_ADD = 2'b00, AR_ADDU = 2'b01, AR_SUB = 2'b10, AR_SUBU = 2'b11;
  localparam logic [1:0] CMP_SLT = 2'b10, CMP_SLTU = 2'b11;
  localparam logic [1:0] SH_SLL = 2'b00, SH_SRL = 2'b10, SH_SRA = 2'b11;

endpackage
