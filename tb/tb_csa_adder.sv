// tb_csa_adder: multi-operand carry-save adder test. The default four-operand
// 4-bit adder is checked exhaustively; a 14-operand 52-bit instance (the size
// used by the Booth multiplier) and a 3-operand 10-bit one (the exponent
// adder) are checked with random operands. Results are compared with the sum
// of the operands modulo 2^W.
module tb_csa_adder;
  logic [3:0][3:0]   ops4;
  logic [3:0]        sum4;
  logic [13:0][51:0] ops14;
  logic [51:0]       sum14, ref14;
  logic [2:0][9:0]   ops3;
  logic [9:0]        sum3;
  int                checks = 0, failures = 0;

  csa_adder dut4 (.ops(ops4), .sum(sum4));
  csa_adder #(.NOPS(14), .W(52)) dut14 (.ops(ops14), .sum(sum14));
  csa_adder #(.NOPS(3), .W(10)) dut3 (.ops(ops3), .sum(sum3));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      ops4 = 16'(v);
      #1;
      checks++;
      if (sum4 != 4'(ops4[0] + ops4[1] + ops4[2] + ops4[3])) begin
        failures++;
        $display("FAIL4 %h -> %h", ops4, sum4);
      end
    end
    for (int n = 0; n < 2000; n++) begin
      ref14 = '0;
      for (int k = 0; k < 14; k++) begin
        ops14[k] = (n < 5) ? '1 : 52'({$urandom, $urandom});
        ref14    = ref14 + ops14[k];
      end
      ops3 = 30'($urandom);
      #1;
      checks++;
      if (sum14 != ref14) begin
        failures++;
        $display("FAIL14 -> %h expected %h", sum14, ref14);
      end
      checks++;
      if (sum3 != 10'(ops3[0] + ops3[1] + ops3[2])) begin
        failures++;
        $display("FAIL3 %h -> %h", ops3, sum3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
