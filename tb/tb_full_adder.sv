// tb_full_adder: exhaustive test of the one-bit full adder. All eight input
// combinations are applied and sum and carry compared with the arithmetic
// sum x + y + cin.
module tb_full_adder;
  logic x, y, cin, sum, cout;
  int   checks = 0, failures = 0;

  full_adder dut (.x(x), .y(y), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} != 2'(x + y + cin)) begin
        failures++;
        $display("FAIL x=%b y=%b cin=%b -> cout=%b sum=%b", x, y, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
