// tb_rca: ripple-carry adder test. The default 4-bit adder is checked
// exhaustively (all x, y and carry-in values); a 52-bit instance is checked
// with random operands. Sum and carry out are compared with x + y + cin.
module tb_rca;
  logic [3:0]  x4, y4, s4;
  logic        cin4, cout4;
  logic [51:0] x52, y52, s52;
  logic        cin52, cout52;
  int          checks = 0, failures = 0;

  rca dut4 (.x(x4), .y(y4), .cin(cin4), .s(s4), .cout(cout4));
  rca #(.N(52)) dut52 (.x(x52), .y(y52), .cin(cin52), .s(s52), .cout(cout52));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {x4, y4, cin4} = 9'(v);
      #1;
      checks++;
      if ({cout4, s4} != 5'(x4 + y4 + cin4)) begin
        failures++;
        $display("FAIL4 %h+%h+%b -> %b %h", x4, y4, cin4, cout4, s4);
      end
    end
    for (int n = 0; n < 2000; n++) begin
      x52   = {$urandom, $urandom};
      y52   = (n < 10) ? ~x52 : {$urandom, $urandom};
      cin52 = 1'($urandom);
      #1;
      checks++;
      if ({cout52, s52} != 53'({1'b0, x52} + {1'b0, y52} + 53'(cin52))) begin
        failures++;
        $display("FAIL52 %h+%h+%b -> %b %h", x52, y52, cin52, cout52, s52);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
