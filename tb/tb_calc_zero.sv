// tb_calc_zero: checks that the sum passes through unchanged and that Zero is
// set for an all-zero sum only, including every single-bit-set value.
module tb_calc_zero;
  logic [31:0] s, r;
  logic        z;
  int checks = 0, failures = 0;

  calc_zero dut (.S(s), .ArithmeticR(r), .Zero(z));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [31:0] x);
    s = x;
    #1;
    checks++;
    if (r !== x || z !== (x == 32'd0)) begin
      failures++;
      $display("FAIL s=%h r=%h zero=%b", x, r, z);
    end
  endtask

  initial begin
    apply(32'h0);
    for (int i = 0; i < 32; i++) apply(32'h1 << i);
    apply(32'hFFFF_FFFF);
    for (int i = 0; i < 200; i++) apply($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
