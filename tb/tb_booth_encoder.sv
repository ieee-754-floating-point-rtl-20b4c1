// tb_booth_encoder: all eight 3-bit groups are applied and the selected digit
// (one, two, neg) compared with the radix-4 recoding table, digit =
// -2*x(1) + x(0) + x(-1).
module tb_booth_encoder;
  logic [2:0] grp;
  logic       one, two, neg;
  int         checks = 0, failures = 0;
  int         digit, got;

  booth_encoder dut (.grp(grp), .one(one), .two(two), .neg(neg));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      grp = 3'(v);
      #1;
      digit = -2 * int'(grp[2]) + int'(grp[1]) + int'(grp[0]);
      got   = (one ? 1 : 0) + (two ? 2 : 0);
      if (neg) got = -got;
      checks++;
      if (got != digit || (one && two) || (digit == 0 && neg)) begin
        failures++;
        $display("FAIL grp=%b one=%b two=%b neg=%b expected %0d", grp, one, two, neg, digit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
