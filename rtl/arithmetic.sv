// arithmetic: arithmetic class of the ALU (ADD, ADDU, SUB, SUBU).
//
// One adder serves all four operations. ALUOp[1] selects subtraction: it makes
// bor_not_b complement B and feeds the adder's carry-in, so the adder forms
// A + ~B + 1. ALUOp[0] marks the unsigned variants, which differ only in never
// flagging overflow. calc_zero forwards the sum and detects a zero result;
// overflow_detect flags signed overflow from A[31], B[31] and S[31]. CarryOut
// leaves the block for the comparison class (for unsigned compare, a carry of
// 0 after subtraction means A < B). The structure follows the original
// arithmetic diagram. Combinational.
module arithmetic #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] A,
  input  logic [WIDTH-1:0] B,
  input  logic [1:0]       ALUOp,
  output logic [WIDTH-1:0] ArithmeticR,
  output logic             CarryOut,
  output logic             Overflow,
  output logic             Zero
);

  logic [WIDTH-1:0] btemp, s;

  bor_not_b #(.WIDTH(WIDTH)) u_bornotb (
    .B(B), .Invert(ALUOp[1]), .Btemp(btemp)
  );

  add32 #(.WIDTH(WIDTH)) u_add32 (
    .A(A), .B(btemp), .CI(ALUOp[1]), .S(s), .CO(CarryOut)
  );

  calc_zero #(.WIDTH(WIDTH)) u_calczero (
    .S(s), .ArithmeticR(ArithmeticR), .Zero(Zero)
  );

  overflow_detect u_overflow (
    .ALUOp(ALUOp), .Asign(A[WIDTH-1]), .Bsign(B[WIDTH-1]), .Ssign(s[WIDTH-1]),
    .CarryOut(CarryOut), .Overflow(Overflow)
  );

endmodule
