// tb_check_sign: the product sign must be positive for equal operand signs
// and negative for different ones; all four cases are applied.
module tb_check_sign;
  logic a_sign, b_sign, sign;
  int   checks = 0, failures = 0;

  check_sign dut (.a_sign(a_sign), .b_sign(b_sign), .sign(sign));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a_sign, b_sign} = 2'(v);
      #1;
      checks++;
      if (sign != (a_sign != b_sign)) begin
        failures++;
        $display("FAIL %b %b -> %b", a_sign, b_sign, sign);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
