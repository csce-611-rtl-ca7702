// tb_shifter: every shift amount 0..31 for SLL (00, and 01 which also shifts
// left), SRL (10) and SRA (11) on positive and negative operands, then random
// ones; results compared with the <<, >> and >>> operators.
module tb_shifter;
  logic [31:0] a, r;
  logic [1:0]  op;
  logic [4:0]  sh;
  int checks = 0, failures = 0;

  shifter dut (.A(a), .ALUOp(op), .SHAMT(sh), .ShifterR(r));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [1:0] o, logic [31:0] x, logic [4:0] s);
    logic [31:0] e;
    op = o; a = x; sh = s;
    #1;
    case (o)
      2'b10:   e = x >> s;
      2'b11:   e = $unsigned($signed(x) >>> s);
      default: e = x << s;
    endcase
    checks++;
    if (r !== e) begin
      failures++;
      $display("FAIL op=%b a=%h shamt=%0d r=%h exp=%h", o, x, s, r, e);
    end
  endtask

  initial begin
    for (int o = 0; o < 4; o++)
      for (int s = 0; s < 32; s++) begin
        apply(2'(o), 32'h8765_4321, 5'(s));
        apply(2'(o), 32'h1234_5678, 5'(s));
      end
    for (int i = 0; i < 1000; i++) apply(2'($urandom), $urandom, 5'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
