// calc_zero: arithmetic result and zero-result detection.
//
// Forwards the adder's sum as the arithmetic result and raises Zero when no
// sum bit is set (a NOR over all bits), as in the original design. Zero thus
// always describes the adder output, whatever operation class is selected.
// Combinational.
module calc_zero #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] S,
  output logic [WIDTH-1:0] ArithmeticR,
  output logic             Zero
);

  assign ArithmeticR = S;
  assign Zero        = ~|S;

endmodule
