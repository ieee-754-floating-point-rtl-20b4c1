// tb_add_exponent: all 65536 pairs of 8-bit exponents are applied; the
// result must be the signed value E1 + E2 - 127, and 0 whenever the zero
// flag is set (tried on a spread of pairs).
module tb_add_exponent;
  logic [7:0]        a_exp, b_exp;
  logic              zero;
  logic signed [9:0] exp;
  int                checks = 0, failures = 0;

  add_exponent dut (.a_exp(a_exp), .b_exp(b_exp), .zero(zero), .exp(exp));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {a_exp, b_exp} = 16'(v);
      zero = 1'b0;
      #1;
      checks++;
      if (int'(exp) != int'(a_exp) + int'(b_exp) - 127) begin
        failures++;
        $display("FAIL %0d + %0d -> %0d", a_exp, b_exp, exp);
      end
      if (v % 97 == 0) begin
        zero = 1'b1;
        #1;
        checks++;
        if (exp != 0) begin
          failures++;
          $display("FAIL zero flag: %0d", exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
