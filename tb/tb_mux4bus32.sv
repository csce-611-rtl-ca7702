// tb_mux4bus32: four distinct random inputs, each select code must pass the
// matching input (00 logical, 01 arithmetic, 10 comparison, 11 shifter).
module tb_mux4bus32;
  logic [31:0] l, ar, c, s, r;
  logic [1:0]  op;
  int checks = 0, failures = 0;

  mux4bus32 dut (.ALUOp(op), .LogicalR(l), .ArithmeticR(ar), .ComparisonR(c),
                 .ShifterR(s), .R(r));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      l = $urandom; ar = $urandom; c = $urandom; s = $urandom;
      for (int o = 0; o < 4; o++) begin
        logic [31:0] e;
        op = 2'(o);
        #1;
        e = (o == 0) ? l : (o == 1) ? ar : (o == 2) ? c : s;
        checks++;
        if (r !== e) begin
          failures++;
          $display("FAIL sel=%0d r=%h exp=%h", o, r, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
