// tb_arithmetic: ADD, ADDU, SUB and SUBU with corner and random operands.
// Result, zero flag and signed overflow are compared with the reference model,
// the carry out with 33-bit arithmetic (for subtraction: carry = no borrow).
// Counts that signed overflow was seen for both ADD and SUB and that Zero was set.
module tb_arithmetic;
  import alu_ref_pkg::*;
  logic [31:0] a, b, r;
  logic [1:0]  op;
  logic        co, ovf, z;
  int checks = 0, failures = 0;
  int n_ovf_add = 0, n_ovf_sub = 0, n_zero = 0;

  arithmetic dut (.A(a), .B(b), .ALUOp(op), .ArithmeticR(r), .CarryOut(co),
                  .Overflow(ovf), .Zero(z));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [1:0] o, logic [31:0] x, logic [31:0] y);
    alu_res_t e;
    logic     e_co;
    op = o; a = x; b = y;
    #1;
    e    = ref_alu({2'b01, o}, x, y, 5'd0);
    e_co = o[1] ? (x >= y) : ((33'(x) + 33'(y)) >> 32) != 0;
    if (e.ovf && o == 2'b00) n_ovf_add++;
    if (e.ovf && o == 2'b10) n_ovf_sub++;
    if (e.zero) n_zero++;
    checks++;
    if (r !== e.r || ovf !== e.ovf || z !== e.zero || co !== e_co) begin
      failures++;
      $display("FAIL op=%b a=%h b=%h r=%h/%h ovf=%b/%b z=%b/%b co=%b/%b", o, x, y,
               r, e.r, ovf, e.ovf, z, e.zero, co, e_co);
    end
  endtask

  initial begin
    for (int o = 0; o < 4; o++) begin
      apply(2'(o), 32'h7FFF_FFFF, 32'h1);
      apply(2'(o), 32'h8000_0000, 32'h1);
      apply(2'(o), 32'h8000_0000, 32'hFFFF_FFFF);
      apply(2'(o), 32'h1234_5678, 32'h1234_5678);
      apply(2'(o), 32'h0, 32'h0);
      for (int i = 0; i < 500; i++) apply(2'(o), rand_operand(), rand_operand());
    end
    if (n_ovf_add == 0 || n_ovf_sub == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL coverage: ovf_add=%0d ovf_sub=%0d zero=%0d", n_ovf_add, n_ovf_sub, n_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
