// tb_overflow_detect: exhaustive test of the overflow table. For all 64
// combinations of code, the three sign bits and the carry it compares with
// the rule "the operands' signs allow overflow and the result's sign is
// wrong", stated as: ADD overflows when both operands have one sign and the
// sum the other; SUB when A and -B would have one sign and the result the other.
module tb_overflow_detect;
  logic [1:0] op;
  logic       as, bs, ss, co, ovf;
  int checks = 0, failures = 0, seen = 0;

  overflow_detect dut (.ALUOp(op), .Asign(as), .Bsign(bs), .Ssign(ss), .CarryOut(co),
                       .Overflow(ovf));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      logic e;
      {op, as, bs, ss, co} = 6'(v);
      #1;
      case (op)
        2'b00:   e = (as & bs & ~ss) | (~as & ~bs & ss);
        2'b10:   e = (as & ~bs & ~ss) | (~as & bs & ss);
        default: e = 1'b0;
      endcase
      if (e) seen++;
      checks++;
      if (ovf !== e) begin
        failures++;
        $display("FAIL op=%b a=%b b=%b s=%b c=%b ovf=%b exp=%b", op, as, bs, ss, co, ovf, e);
      end
    end
    if (seen != 8) begin
      failures++;
      $display("FAIL expected 8 overflow rows, saw %0d", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
