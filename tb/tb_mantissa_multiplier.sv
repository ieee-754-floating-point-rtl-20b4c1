// tb_mantissa_multiplier: random 23-bit fractions (and the extremes) are
// applied one pair per cycle; one cycle later the 48-bit product must be
// (2^23 + fa) * (2^23 + fb), or 0 when the zero flag was set.
module tb_mantissa_multiplier;
  logic        clk = 1'b0;
  logic [22:0] a_frac, b_frac;
  logic        zero;
  logic [47:0] prod, expect_q;
  int          checks = 0, failures = 0, cycles = 0;

  mantissa_multiplier dut (.clk(clk), .a_frac(a_frac), .b_frac(b_frac),
                           .zero(zero), .prod(prod));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 20000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      a_frac = (n == 0) ? '1 : (n == 1) ? '0 : 23'($urandom);
      b_frac = (n == 0) ? '1 : (n == 1) ? '0 : 23'($urandom);
      zero   = (n % 10 == 7);
      expect_q = zero ? '0 : 48'({1'b1, a_frac}) * 48'({1'b1, b_frac});
      @(posedge clk);
      #1;
      checks++;
      if (prod != expect_q) begin
        failures++;
        $display("FAIL %h * %h zero=%b -> %h expected %h", a_frac, b_frac, zero, prod, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
