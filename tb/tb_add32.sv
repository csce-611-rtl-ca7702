// tb_add32: checks sum and carry out of the adder against 64-bit arithmetic,
// for corner values (carry propagation through all bits, overflow of the
// unsigned range) and random operands, with carry in 0 and 1.
module tb_add32;
  logic [31:0] a, b, s;
  logic        ci, co;
  int checks = 0, failures = 0;

  add32 dut (.A(a), .B(b), .CI(ci), .S(s), .CO(co));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [31:0] x, logic [31:0] y, logic c);
    longint unsigned exact;
    a = x; b = y; ci = c;
    #1;
    exact = longint'(x) + longint'(y) + longint'(c);
    checks++;
    if (s !== exact[31:0] || co !== exact[32]) begin
      failures++;
      $display("FAIL a=%h b=%h ci=%b s=%h co=%b exact=%h", x, y, c, s, co, exact);
    end
  endtask

  initial begin
    apply(32'hFFFF_FFFF, 32'h0, 1);
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1);
    apply(32'h7FFF_FFFF, 32'h1, 0);
    apply(32'h0, 32'h0, 0);
    apply(32'h8000_0000, 32'h8000_0000, 0);
    for (int i = 0; i < 1000; i++) apply($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
