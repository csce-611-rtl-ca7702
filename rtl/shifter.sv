// shifter: shift class of the ALU (SLL, SRL, SRA).
//
// Shifts operand A by SHAMT. ALUOp[1] = 0 shifts left (so codes 00 and 01 both
// give SLL); otherwise ALUOp[0] chooses the fill for a right shift, 0 for
// logical (SRL, 10) and A's sign bit for arithmetic (SRA, 11). As in the
// original flowchart, shift amount bit i, when set, shifts by 2**i, so the
// shifter is a chain of $clog2(WIDTH) stages, each a fixed shift or a pass.
// Combinational; WIDTH must be a power of two.
module shifter
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned SHW   = $clog2(WIDTH)
) (
  input  logic [WIDTH-1:0] A,
  input  logic [1:0]       ALUOp,
  input  logic [SHW-1:0]   SHAMT,
  output logic [WIDTH-1:0] ShifterR
);

  logic             left;
  logic             fill;
  logic [WIDTH-1:0] stage [SHW+1];

  assign left = ~ALUOp[1];
  assign fill = ALUOp[0] && !left && A[WIDTH-1];

  assign stage[0] = A;

  for (genvar i = 0; i < SHW; i++) begin : g_stage
    localparam int unsigned D = 2 ** i;
    assign stage[i+1] = !SHAMT[i] ? stage[i]
                      : left      ? {stage[i][WIDTH-1-D:0], {D{fill}}}
                      :             {{D{fill}}, stage[i][WIDTH-1:D]};
  end

  assign ShifterR = stage[SHW];

endmodule
