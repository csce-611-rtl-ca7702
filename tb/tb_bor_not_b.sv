// tb_bor_not_b: checks that B passes unchanged with Invert low and comes out
// complemented with Invert high, for fixed and random values.
module tb_bor_not_b;
  logic [31:0] b, bt;
  logic        inv;
  int checks = 0, failures = 0;

  bor_not_b dut (.B(b), .Invert(inv), .Btemp(bt));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic i, logic [31:0] x);
    logic [31:0] e;
    inv = i; b = x;
    #1;
    e = i ? (32'hFFFF_FFFF - x) : x;
    checks++;
    if (bt !== e) begin
      failures++;
      $display("FAIL inv=%b b=%h btemp=%h exp=%h", i, x, bt, e);
    end
  endtask

  initial begin
    apply(0, 32'h0); apply(1, 32'h0); apply(0, 32'hDEAD_BEEF); apply(1, 32'hDEAD_BEEF);
    for (int i = 0; i < 400; i++) apply(1'($urandom), $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
