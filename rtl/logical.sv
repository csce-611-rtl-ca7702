// logical: bit-wise logical class of the ALU.
//
// AND, OR, XOR and NOR of A and B are all formed in parallel and a 4-way
// selector driven by ALUOp[1:0] passes one of them on: 00 AND, 01 OR, 10 XOR,
// 11 NOR. That code assignment and the structure (four gates into a selector)
// follow the original design. Purely combinational.
module logical
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] A,
  input  logic [WIDTH-1:0] B,
  input  logic [1:0]       ALUOp,
  output logic [WIDTH-1:0] LogicalR
);

  logic [WIDTH-1:0] and_r, or_r, xor_r, nor_r;

  assign and_r = A & B;
  assign or_r  = A | B;
  assign xor_r = A ^ B;
  assign nor_r = ~(A | B);

  always_comb begin
    unique case (ALUOp)
      LOG_AND: LogicalR = and_r;
      LOG_OR:  LogicalR = or_r;
      LOG_XOR: LogicalR = xor_r;
      default: LogicalR = nor_r;
    endcase
  end

endmodule
