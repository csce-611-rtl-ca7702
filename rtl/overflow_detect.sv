// overflow_detect: signed overflow flag for ADD and SUB.
//
// A truth table on the operation code and three sign bits, as in the original
// design:
//   ADD (00): A and B have the same sign and the sum's sign differs.
//   SUB (10): A and B have different signs and the difference's sign is not A's.
// Bsign is the sign of the original B, not of the complemented operand. The
// unsigned operations (01, 11) never report overflow. CarryOut is a port of
// the original block but none of its table rows depend on it, so it is unused
// here. Combinational.
module overflow_detect
  import alu_pkg::*;
(
  input  logic [1:0] ALUOp,
  input  logic       Asign,
  input  logic       Bsign,
  input  logic       Ssign,
  input  logic       CarryOut,
  output logic       Overflow
);

  logic unused_carry;
  assign unused_carry = CarryOut;

  always_comb begin
    unique case (ALUOp)
      AR_ADD:  Overflow = (Asign == Bsign) && (Ssign != Asign);
      AR_SUB:  Overflow = (Asign != Bsign) && (Ssign != Asign);
      default: Overflow = 1'b0;
    endcase
  end

endmodule
