// mux4bus32: output selector of the ALU.
//
// All four class results are computed in parallel; ALUOp[3:2] picks the one
// that leaves the ALU: 00 logical, 01 arithmetic, 10 comparison, 11 shift, as
// in the original design. Combinational.
module mux4bus32
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [1:0]       ALUOp,
  input  logic [WIDTH-1:0] LogicalR,
  input  logic [WIDTH-1:0] ArithmeticR,
  input  logic [WIDTH-1:0] ComparisonR,
  input  logic [WIDTH-1:0] ShifterR,
  output logic [WIDTH-1:0] R
);

  always_comb begin
    unique case (op_class_e'(ALUOp))
      CLS_LOGICAL: R = LogicalR;
      CLS_ARITH:   R = ArithmeticR;
      CLS_COMPARE: R = ComparisonR;
      default:     R = ShifterR;
    endcase
  end

endmodule
