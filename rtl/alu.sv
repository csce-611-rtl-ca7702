// alu: 32-bit combinational ALU covering the MIPS logical, arithmetic,
// comparison and shift operations.
//
// Four class blocks work on the operands in parallel: logical (AND/OR/XOR/NOR),
// arithmetic (signed and unsigned add and subtract, one adder), comparison
// (signed and unsigned set-on-less-than, built on the arithmetic block's
// subtraction) and shifter (SLL/SRL/SRA of A by SHAMT). ALUOp[1:0] goes to all
// four; mux4bus32 uses ALUOp[3:2] to pick the result R. Operation codes are in
// alu_pkg. This structure and the wiring follow the original block diagram.
//
// Overflow and Zero are wired straight from the arithmetic block, as in the
// original: they describe the adder's result for the current ALUOp[1:0]
// whatever class is selected, so they are meaningful for the arithmetic class
// (and Zero for a SUB used as an equality test). Overflow is raised only by the
// signed ADD and SUB codes.
//
// No clock, no state: outputs settle one combinational delay after the inputs.
module alu
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned SHW   = $clog2(WIDTH)
) (
  input  logic [WIDTH-1:0] A,
  input  logic [WIDTH-1:0] B,
  input  logic [3:0]       ALUOp,
  input  logic [SHW-1:0]   SHAMT,
  output logic [WIDTH-1:0] R,
  output logic             Overflow,
  output logic             Zero
);

  logic [WIDTH-1:0] logical_r, arithmetic_r, comparison_r, shifter_r;
  logic             carry_out;

  logical #(.WIDTH(WIDTH)) u_logical (
    .A(A), .B(B), .ALUOp(ALUOp[1:0]), .LogicalR(logical_r)
  );

  arithmetic #(.WIDTH(WIDTH)) u_arithmetic (
    .A(A), .B(B), .ALUOp(ALUOp[1:0]), .ArithmeticR(arithmetic_r),
    .CarryOut(carry_out), .Overflow(Overflow), .Zero(Zero)
  );

  comparison #(.WIDTH(WIDTH)) u_comparison (
    .ALUOp(ALUOp[1:0]), .Asign(A[WIDTH-1]), .Bsign(B[WIDTH-1]),
    .Rsign(arithmetic_r[WIDTH-1]), .CarryOut(carry_out),
    .ComparisonR(comparison_r)
  );

  shifter #(.WIDTH(WIDTH), .SHW(SHW)) u_shifter (
    .A(A), .ALUOp(ALUOp[1:0]), .SHAMT(SHAMT), .ShifterR(shifter_r)
  );

  mux4bus32 #(.WIDTH(WIDTH)) u_mux (
    .ALUOp(ALUOp[3:2]), .LogicalR(logical_r), .ArithmeticR(arithmetic_r),
    .ComparisonR(comparison_r), .ShifterR(shifter_r), .R(R)
  );

endmodule
