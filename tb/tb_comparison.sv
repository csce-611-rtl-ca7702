// tb_comparison: drives the comparison block with the sign bits and carry of a
// subtraction A - B computed in the testbench, and checks the result against
// the relational operators: signed A < B for SLT (10), unsigned A < B for
// SLTU (11), and 0 for codes 00 and 01.
module tb_comparison;
  logic [31:0] a, b, diff, r;
  logic [1:0]  op;
  logic        carry;
  int checks = 0, failures = 0, n_true = 0;

  comparison dut (.ALUOp(op), .Asign(a[31]), .Bsign(b[31]), .Rsign(diff[31]),
                  .CarryOut(carry), .ComparisonR(r));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [1:0] o, logic [31:0] x, logic [31:0] y);
    logic [31:0] e, ny;
    op = o; a = x; b = y;
    ny = ~y;
    {carry, diff} = {1'b0, x} + {1'b0, ny} + 33'd1;
    #1;
    case (o)
      2'b10:   e = ($signed(x) < $signed(y)) ? 32'd1 : 32'd0;
      2'b11:   e = (x < y) ? 32'd1 : 32'd0;
      default: e = 32'd0;
    endcase
    if (e == 32'd1) n_true++;
    checks++;
    if (r !== e) begin
      failures++;
      $display("FAIL op=%b a=%h b=%h r=%h exp=%h", o, x, y, r, e);
    end
  endtask

  initial begin
    for (int o = 0; o < 4; o++) begin
      apply(2'(o), 32'h8000_0000, 32'h7FFF_FFFF);
      apply(2'(o), 32'h7FFF_FFFF, 32'h8000_0000);
      apply(2'(o), 32'h5, 32'h5);
      apply(2'(o), 32'hFFFF_FFFF, 32'h0);
      apply(2'(o), 32'h0, 32'hFFFF_FFFF);
      for (int i = 0; i < 500; i++) apply(2'(o), alu_ref_pkg::rand_operand(),
                                          alu_ref_pkg::rand_operand());
    end
    if (n_true == 0) begin
      failures++;
      $display("FAIL coverage: no true comparison");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
