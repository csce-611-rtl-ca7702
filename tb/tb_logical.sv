// tb_logical: self-checking test of the logical class (AND, OR, XOR, NOR).
// Fixed patterns then random operands for all four codes; each result is
// compared with the operator applied directly in the testbench.
module tb_logical;
  logic [31:0] a, b, r, exp_r;
  logic [1:0]  op;
  int checks = 0, failures = 0;

  logical dut (.A(a), .B(b), .ALUOp(op), .LogicalR(r));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [1:0] o, logic [31:0] x, logic [31:0] y);
    op = o; a = x; b = y;
    #1;
    case (o)
      2'b00: exp_r = x & y;
      2'b01: exp_r = x | y;
      2'b10: exp_r = x ^ y;
      default: exp_r = ~(x | y);
    endcase
    checks++;
    if (r !== exp_r) begin
      failures++;
      $display("FAIL op=%b a=%h b=%h r=%h exp=%h", o, x, y, r, exp_r);
    end
  endtask

  initial begin
    for (int o = 0; o < 4; o++) begin
      apply(2'(o), 32'hF0F0_F0F0, 32'hFF00_FF00);
      apply(2'(o), 32'h0000_0000, 32'h0000_0000);
      apply(2'(o), 32'hFFFF_FFFF, 32'h1234_5678);
      for (int i = 0; i < 200; i++) apply(2'(o), $urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
