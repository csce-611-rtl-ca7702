// tb_alu: end-to-end test of the full ALU at its default 32-bit width.
//
// Plays the part of a tester beside the ALU: it drives A, B, ALUOp and SHAMT,
// waits for the combinational result and checks R, Overflow and Zero against
// the reference model in alu_ref_pkg. It first runs directed cases for each of
// the 13 operations, then random operands over all 16 ALUOp codes (including
// the three unused ones, whose behaviour follows from the sub-blocks).
// It counts how often each mechanism of the design was exercised (each
// operation, signed overflow on ADD and on SUB, the zero flag, the three
// branches of signed set-on-less-than, unsigned borrow, sign fill on SRA) and
// counts a failure for any that never happened.
module tb_alu;
  import alu_pkg::*;
  import alu_ref_pkg::*;

  logic [31:0] a, b, r;
  logic [3:0]  op;
  logic [4:0]  sh;
  logic        ovf, z;
  int checks = 0, failures = 0;

  int n_op [16];
  int n_ovf_add = 0, n_ovf_sub = 0, n_zero = 0, n_sra_fill = 0, n_sltu_borrow = 0;
  int n_slt_same_sign = 0, n_slt_neg_pos = 0, n_slt_pos_neg = 0;

  alu dut (.A(a), .B(b), .ALUOp(op), .SHAMT(sh), .R(r), .Overflow(ovf), .Zero(z));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [3:0] o, logic [31:0] x, logic [31:0] y, logic [4:0] s);
    alu_res_t e;
    op = o; a = x; b = y; sh = s;
    #1;
    e = ref_alu(o, x, y, s);
    n_op[o]++;
    if (o == OP_ADD && e.ovf) n_ovf_add++;
    if (o == OP_SUB && e.ovf) n_ovf_sub++;
    if (o[3:2] == CLS_ARITH && e.zero) n_zero++;
    if (o == OP_SRA && x[31] && s != 0) n_sra_fill++;
    if (o == OP_SLTU && x < y) n_sltu_borrow++;
    if (o == OP_SLT && x[31] == y[31] && e.r[0]) n_slt_same_sign++;
    if (o == OP_SLT && x[31] && !y[31]) n_slt_neg_pos++;
    if (o == OP_SLT && !x[31] && y[31]) n_slt_pos_neg++;
    checks++;
    if (r !== e.r || ovf !== e.ovf || z !== e.zero) begin
      failures++;
      $display("FAIL op=%b a=%h b=%h sh=%0d : R=%h/%h Ovf=%b/%b Zero=%b/%b", o, x, y, s,
               r, e.r, ovf, e.ovf, z, e.zero);
    end
  endtask

  task automatic need(string what, int n);
    $display("  %-22s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  localparam alu_op_e OPS [13] = '{OP_AND, OP_OR, OP_XOR, OP_NOR, OP_ADD, OP_ADDU, OP_SUB,
                                   OP_SUBU, OP_SLT, OP_SLTU, OP_SLL, OP_SRL, OP_SRA};

  initial begin
    foreach (n_op[i]) n_op[i] = 0;
    // Directed cases.
    apply(OP_AND,  32'hF0F0_1234, 32'h0FF0_FFFF, 0);
    apply(OP_OR,   32'hF000_0000, 32'h0000_000F, 0);
    apply(OP_XOR,  32'hAAAA_AAAA, 32'hFFFF_0000, 0);
    apply(OP_NOR,  32'h0000_0000, 32'h0000_0000, 0);
    apply(OP_ADD,  32'h7FFF_FFFF, 32'h0000_0001, 0);   // positive overflow
    apply(OP_ADD,  32'h8000_0000, 32'h8000_0000, 0);   // negative overflow, zero sum
    apply(OP_ADDU, 32'hFFFF_FFFF, 32'h0000_0001, 0);   // wraps, no overflow
    apply(OP_SUB,  32'h8000_0000, 32'h0000_0001, 0);   // overflow
    apply(OP_SUB,  32'h0000_1234, 32'h0000_1234, 0);   // zero
    apply(OP_SUBU, 32'h0000_0000, 32'h0000_0001, 0);   // borrow, no overflow
    apply(OP_SLT,  32'hFFFF_FFFF, 32'h0000_0001, 0);   // -1 < 1
    apply(OP_SLT,  32'h0000_0001, 32'hFFFF_FFFF, 0);   // 1 < -1 false
    apply(OP_SLT,  32'h0000_0003, 32'h0000_0007, 0);
    apply(OP_SLTU, 32'hFFFF_FFFF, 32'h0000_0001, 0);   // false unsigned
    apply(OP_SLTU, 32'h0000_0001, 32'hFFFF_FFFF, 0);   // true unsigned
    apply(OP_SLL,  32'h0000_0001, 32'h0, 31);
    apply(OP_SRL,  32'h8000_0000, 32'h0, 31);
    apply(OP_SRA,  32'h8000_0000, 32'h0, 31);
    apply(OP_SRA,  32'h4000_0000, 32'h0, 4);
    // Random cases for every defined operation, then for all 16 codes.
    for (int i = 0; i < 2000; i++)
      foreach (OPS[k]) apply(OPS[k], rand_operand(), rand_operand(), 5'($urandom));
    for (int i = 0; i < 2000; i++)
      apply(4'($urandom), rand_operand(), rand_operand(), 5'($urandom));

    $display("Mechanisms exercised:");
    foreach (OPS[k]) need(OPS[k].name(), n_op[OPS[k]]);
    need("ADD overflow", n_ovf_add);
    need("SUB overflow", n_ovf_sub);
    need("zero result", n_zero);
    need("SLT same sign", n_slt_same_sign);
    need("SLT A<0<=B", n_slt_neg_pos);
    need("SLT B<0<=A", n_slt_pos_neg);
    need("SLTU borrow", n_sltu_borrow);
    need("SRA sign fill", n_sra_fill);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
