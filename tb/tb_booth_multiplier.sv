// tb_booth_multiplier: the 26 x 26 Booth multiplier is fed a new signed
// operand pair every cycle (corner values first, then random ones) and each
// product is expected exactly one cycle later, equal to the 52-bit signed
// product a * b, while the output must not change before that edge.
module tb_booth_multiplier;
  localparam int N  = 26;
  localparam int PW = 2 * N;
  logic                clk = 1'b0;
  logic signed [N-1:0] a, b;
  logic [2*N-1:0]      p;
  logic [2*N-1:0]      expect_q;
  logic                valid_q = 1'b0;
  int                  checks = 0, failures = 0, cycles = 0;
  logic signed [N-1:0] corner [6] = '{26'sd0, 26'sd1, -26'sd1,
                                      26'sh1ffffff, -26'sh2000000, 26'shffffff};

  booth_multiplier dut (.clk(clk), .a(a), .b(b), .p(p));

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
    a = '0;
    b = '0;
    for (int n = 0; n < 3000; n++) begin
      if (n < 36) begin
        a = corner[n % 6];
        b = corner[n / 6];
      end else begin
        a = N'($urandom);
        b = N'($urandom);
      end
      // before the edge p must still hold the previous product
      #1;
      if (valid_q) begin
        checks++;
        if (p != expect_q) begin
          failures++;
          $display("FAIL early change: p=%h expected %h", p, expect_q);
        end
      end
      expect_q = PW'(64'(a) * 64'(b));
      @(posedge clk);
      #1;
      checks++;
      if (p != expect_q) begin
        failures++;
        $display("FAIL a=%h b=%h p=%h expected %h", a, b, p, expect_q);
      end
      valid_q  = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
