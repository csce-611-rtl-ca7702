// bor_not_b: operand conditioning in front of the adder.
//
// Passes B unchanged for addition, or its one's complement for subtraction;
// with the adder's carry-in also set, the adder then forms A + ~B + 1 = A - B.
// Invert is driven by ALUOp[1], the same bit that drives the carry-in. The
// block appears by name in the original arithmetic diagram; its function is
// read from that name and its place there. Combinational.
module bor_not_b #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] B,
  input  logic             Invert,
  output logic [WIDTH-1:0] Btemp
);

  assign Btemp = B ^ {WIDTH{Invert}};

endmodule
