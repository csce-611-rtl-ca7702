// comparison: set-on-less-than class of the ALU (SLT, SLTU).
//
// Uses the subtraction A - B that the arithmetic block forms at the same time
// (the comparison codes 10 and 11 share their low bits with SUB and SUBU, so
// the adder is subtracting whenever this class is selected). The result is 1
// in bit 0 when A < B, else 0. From the original truth table:
//   SLT  (10): signs equal and difference negative, or A negative and B not.
//   SLTU (11): no carry out of A + ~B + 1, i.e. a borrow.
// Codes 00 and 01 give 0. Bits WIDTH-1..1 of the result are constant zero by
// design, as a set-on-less-than result is a single bit. Combinational.
module comparison
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [1:0]       ALUOp,
  input  logic             Asign,
  input  logic             Bsign,
  input  logic             Rsign,
  input  logic             CarryOut,
  output logic [WIDTH-1:0] ComparisonR
);

  logic less;

  always_comb begin
    unique case (ALUOp)
      CMP_SLT:  less = (Asign == Bsign) ? Rsign : Asign;
      CMP_SLTU: less = ~CarryOut;
      default:  less = 1'b0;
    endcase
  end

  assign ComparisonR = {{(WIDTH-1){1'b0}}, less};

endmodule
