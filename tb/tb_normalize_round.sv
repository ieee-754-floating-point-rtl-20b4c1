// tb_normalize_round: random significand products in [2^46, 2^48) and
// exponents near both ends of the range are applied. The expected result is
// worked out by integer division: the product is divided by 2^23 or 2^24
// (so that the quotient has 24 bits), the remainder compared with half the
// divisor to round to nearest even, and the exponent checked against 1..254.
// Special products exercise the rounding carry (1.11..1 rounding up to 10.0)
// and exact ties.
module tb_normalize_round;
  import fp_pkg::*;
  logic              sign, zero;
  logic signed [9:0] exp;
  logic [47:0]       prod;
  fp32_t             result;
  logic              overflow, underflow;
  int                checks = 0, failures = 0;
  int                n_ovf = 0, n_unf = 0, n_carry = 0, n_shift = 0;

  normalize_round dut (.sign(sign), .exp(exp), .prod(prod), .zero(zero),
                       .result(result), .overflow(overflow), .underflow(underflow));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    longint unsigned div, q, r, half;
    int              e;
    logic [31:0]     exp_word;
    logic            e_ovf, e_unf;
    if (prod[47]) begin div = 64'd1 << 24; e = int'(exp) + 1; n_shift++; end
    else          begin div = 64'd1 << 23; e = int'(exp); end
    q    = 64'(prod) / div;
    r    = 64'(prod) % div;
    half = div / 2;
    if (r > half || (r == half && q[0])) q = q + 1;
    if (q == 64'd1 << 24) begin q = q / 2; e = e + 1; n_carry++; end
    e_ovf = !zero && e >= 255;
    e_unf = !zero && e <= 0;
    if (zero)       exp_word = 32'd0;
    else if (e_ovf) exp_word = {sign, 8'hff, 23'd0};
    else if (e_unf) exp_word = {sign, 31'd0};
    else            exp_word = {sign, 8'(e), q[22:0]};
    n_ovf += int'(e_ovf);
    n_unf += int'(e_unf);
    #1;
    checks++;
    if (result != exp_word || overflow != e_ovf || underflow != e_unf) begin
      failures++;
      $display("FAIL s=%b e=%0d p=%h z=%b -> %h o=%b u=%b expected %h o=%b u=%b",
               sign, exp, prod, zero, result, overflow, underflow, exp_word, e_ovf, e_unf);
    end
  endtask

  initial begin
    for (int n = 0; n < 20000; n++) begin
      sign = 1'($urandom);
      zero = (n % 50 == 0);
      case (n % 5)
        0:       exp = 10'($urandom_range(1, 253));
        1:       exp = 10'($signed($urandom_range(0, 12)) - 8);     // near underflow
        2:       exp = 10'($urandom_range(250, 260));               // near overflow
        default: exp = 10'($signed($urandom_range(0, 510)) - 127);
      endcase
      prod = {$urandom, $urandom};
      prod[47:46] = (prod[47:46] == 2'b00) ? 2'b01 : prod[47:46];
      if (n % 7 == 3) prod[46:0] = '1;                              // rounds to 2.0
      if (n % 7 == 4) prod = {1'b0, 1'b1, 22'h3fffff, 1'b1, 23'h0}; // exact tie, odd
      if (n % 7 == 5) prod = {2'b11, 22'h3ffffe, 1'b1, 23'h0};      // exact tie, even
      if (n % 7 == 6) prod[47:0] = {2'b11, 46'h3fffffffffff};        // carry after shift
      check_one();
    end
    checks++;
    if (n_ovf == 0 || n_unf == 0 || n_carry == 0 || n_shift == 0) begin
      failures++;
      $display("FAIL coverage ovf=%0d unf=%0d carry=%0d shift=%0d", n_ovf, n_unf, n_carry, n_shift);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
