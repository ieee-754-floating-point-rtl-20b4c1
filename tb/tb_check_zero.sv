// tb_check_zero: the zero flag must be set exactly when at least one
// operand has a zero exponent field (+0, -0 or a subnormal). Random
// operands, with zero exponents forced in many of them.
module tb_check_zero;
  import fp_pkg::*;
  fp32_t a, b;
  logic  zero;
  int    checks = 0, failures = 0, hits = 0;

  check_zero dut (.a(a), .b(b), .zero(zero));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      a = fp32_t'($urandom);
      b = fp32_t'($urandom);
      if (n % 4 == 1) a.exp = '0;
      if (n % 8 == 2) b.exp = '0;
      if (n % 16 == 3) begin a = '0; b = '0; end
      if (n % 16 == 4) begin a.exp = 8'h01; b.exp = 8'h80; end
      #1;
      checks++;
      if (zero != (a[30:23] == 8'd0 || b[30:23] == 8'd0)) begin
        failures++;
        $display("FAIL a=%h b=%h zero=%b", a, b, zero);
      end
      if (zero) hits++;
    end
    checks++;
    if (hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
