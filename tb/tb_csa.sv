// tb_csa: exhaustive test of a 4-bit carry-save row. For every triple of
// operands the sum word must be the bitwise XOR and s + 2*c must equal
// x + y + z.
module tb_csa;
  logic [3:0] x, y, z, s, c;
  int         checks = 0, failures = 0;

  csa dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      {x, y, z} = 12'(v);
      #1;
      checks++;
      if (s != (x ^ y ^ z) || (6'(s) + 6'(2 * c)) != (6'(x) + 6'(y) + 6'(z))) begin
        failures++;
        $display("FAIL %h %h %h -> s=%h c=%h", x, y, z, s, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
