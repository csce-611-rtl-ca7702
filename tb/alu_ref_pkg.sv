// alu_ref_pkg: reference model for the ALU testbenches.
//
// Computes the expected result, overflow and zero flags of every ALU operation
// directly from the operation's definition (signed and unsigned arithmetic,
// relational operators, shift operators), without the adder-plus-truth-table
// structure the RTL uses, so the testbenches compare two independent
// descriptions.
package alu_ref_pkg;

  typedef struct packed {
    logic [31:0] r;
    logic        ovf;
    logic        zero;
  } alu_res_t;

  // Signed overflow: the exact sum does not fit in 32 signed bits.
  function automatic logic add_ovf(logic signed [31:0] a, logic signed [31:0] b, logic sub);
    longint exact;
    exact = sub ? longint'(a) - longint'(b) : longint'(a) + longint'(b);
    return (exact > longint'(32'sh7fffffff)) || (exact < -longint'(64'h80000000));
  endfunction

  // Adder output for ALUOp[1:0]: A+B for 00/01, A-B for 10/11.
  function automatic logic [31:0] adder_out(logic [1:0] op, logic [31:0] a, logic [31:0] b);
    return op[1] ? a - b : a + b;
  endfunction

  function automatic alu_res_t ref_alu(logic [3:0] op, logic [31:0] a, logic [31:0] b,
                                       logic [4:0] shamt);
    alu_res_t res;
    logic [31:0] sum;
    sum      = adder_out(op[1:0], a, b);
    res.zero = (sum == 32'd0);
    res.ovf  = (op[1:0] == 2'b00) ? add_ovf(a, b, 1'b0) :
               (op[1:0] == 2'b10) ? add_ovf(a, b, 1'b1) : 1'b0;
    case (op[3:2])
      2'b00: case (op[1:0])
               2'b00: res.r = a & b;
               2'b01: res.r = a | b;
               2'b10: res.r = a ^ b;
               default: res.r = ~(a | b);
             endcase
      2'b01: res.r = sum;
      2'b10: case (op[1:0])
               2'b10: res.r = ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
               2'b11: res.r = (a < b) ? 32'd1 : 32'd0;
               default: res.r = 32'd0;
             endcase
      default: case (op[1:0])
               2'b10: res.r = a >> shamt;
               2'b11: res.r = $unsigned($signed(a) >>> shamt);
               default: res.r = a << shamt;
             endcase
    endcase
    return res;
  endfunction

  // Operands biased toward the corners: zero, all ones, sign boundaries.
  function automatic logic [31:0] rand_operand();
    case ($urandom_range(0, 7))
      0: return 32'd0;
      1: return 32'hffff_ffff;
      2: return 32'h7fff_ffff;
      3: return 32'h8000_0000;
      4: return 32'h8000_0000 | $urandom_range(0, 255);
      5: return $urandom_range(0, 15);
      default: return $urandom;
    endcase
  endfunction

endpackage
