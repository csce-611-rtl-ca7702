// add32: WIDTH-bit binary adder with carry in and carry out.
//
// The original design instantiates a ready-made library adder with ports
// A, B, CI, S and CO; only that interface is given. This version is the plain
// behavioural form, S and CO taken from one WIDTH+1-bit addition, and leaves
// the adder architecture to synthesis. Combinational.
module add32 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] A,
  input  logic [WIDTH-1:0] B,
  input  logic             CI,
  output logic [WIDTH-1:0] S,
  output logic             CO
);

  assign {CO, S} = {1'b0, A} + {1'b0, B} + {{WIDTH{1'b0}}, CI};

endmodule
