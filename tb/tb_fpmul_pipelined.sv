// tb_fpmul_pipelined: end-to-end test of the three-stage binary32
// multiplier at its default (and only) size.
//
// A new operand pair enters on every clock cycle; the result is expected
// exactly three cycles later. The expected value is computed without the
// design's datapath: both operands are converted to double precision, where
// the product of two 24-bit significands is exact, and the double is then
// rounded to a 24-bit significand (nearest, ties to even) and its exponent
// checked against 1..254 for overflow and underflow. Operands with a zero
// exponent field give +0.
//
// The stimulus starts with the operand pairs of the published simulation
// (-18 x 9.5 = -171 and the like), then mixes random operands with cases
// aimed at each mechanism of the design, and counts how often each one
// happened: zero operand, product normalised by a right shift, rounding up,
// rounding carry needing a second normalisation, overflow, underflow. A
// mechanism that never happened counts as a failure.
module tb_fpmul_pipelined;
  localparam int LAT = 3;

  logic        clk = 1'b0;
  logic [31:0] inA = '0, inB = '0;
  logic [31:0] out;
  logic        overflow, underflow;

  int checks = 0, failures = 0, cycles = 0;
  int n_zero = 0, n_shift = 0, n_round = 0, n_carry = 0, n_ovf = 0, n_unf = 0;

  // expected {overflow, underflow, out} of the pairs in flight
  logic [33:0] pipe_q [$];

  fpmul_pipelined dut (
    .clk(clk), .inA(inA), .inB(inB),
    .out(out), .overflow(overflow), .underflow(underflow)
  );

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 200000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  function automatic logic [63:0] to_double(input logic [31:0] x);
    return {x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0};
  endfunction

  // Reference model; also counts the mechanisms the operands exercise.
  function automatic logic [33:0] ref_mul(input logic [31:0] a, input logic [31:0] b);
    real         p;
    logic [63:0] pb;
    logic [52:0] m;
    logic [24:0] q;
    logic        guard, sticky, rnd;
    int          e;
    logic        sgn;
    if (a[30:23] == 8'd0 || b[30:23] == 8'd0) begin
      n_zero++;
      return 34'd0;
    end
    p   = $bitstoreal(to_double(a)) * $bitstoreal(to_double(b));
    pb  = $realtobits(p);
    sgn = pb[63];
    e   = int'(pb[62:52]) - 1023 + 127;
    m   = {1'b1, pb[51:0]};
    if (48'({1'b1, a[22:0]}) * 48'({1'b1, b[22:0]}) >= 48'd1 << 47) n_shift++;
    guard  = m[28];
    sticky = |m[27:0];
    rnd    = guard & (sticky | m[29]);
    q      = {1'b0, m[52:29]} + 25'(rnd);
    if (rnd) n_round++;
    if (q[24]) begin
      q = q >> 1;
      e = e + 1;
      n_carry++;
    end
    if (e >= 255) begin
      n_ovf++;
      return {2'b10, sgn, 8'hff, 23'd0};
    end
    if (e <= 0) begin
      n_unf++;
      return {2'b01, sgn, 31'd0};
    end
    return {2'b00, sgn, 8'(e), q[22:0]};
  endfunction

  task automatic apply(input logic [31:0] a, input logic [31:0] b);
    logic [33:0] exp_v;
    inA = a;
    inB = b;
    pipe_q.push_back(ref_mul(a, b));
    @(posedge clk);
    #1;
    if (pipe_q.size() >= LAT) begin
      exp_v = pipe_q.pop_front();
      checks++;
      if ({overflow, underflow, out} != exp_v) begin
        failures++;
        $display("FAIL cycle %0d: out=%h ovf=%b unf=%b expected out=%h ovf=%b unf=%b",
                 cycles, out, overflow, underflow, exp_v[31:0], exp_v[33], exp_v[32]);
      end
    end
  endtask

  function automatic logic [31:0] rnd_fp(input int lo, input int hi);
    return {1'($urandom), 8'($urandom_range(hi, lo)), 23'($urandom)};
  endfunction

  // operand pairs and products printed in the published waveforms
  localparam logic [31:0] FIG_A [6] = '{32'd3247439872, 32'd3249537024, 32'd3247439872,
                                        32'd3650093056, 32'd3247439872, 32'd3247636480};
  localparam logic [31:0] FIG_B [6] = '{32'd1092091904, 32'd1092091904, 32'd1094189056,
                                        32'd1092354048, 32'd1092354048, 32'd1092354048};
  localparam logic [31:0] FIG_P [6] = '{32'd3274375168, 32'd3276865536, 32'd3276734464,
                                        32'd3677323264, 32'd3274670080, 32'd3274909696};

  initial begin
    logic [31:0] a, b;
    // fill the pipeline so the outputs are defined
    for (int i = 0; i < LAT; i++) apply(32'd0, 32'd0);
    pipe_q.delete();
    // published examples
    for (int i = 0; i < 6; i++) begin
      checks++;
      if (ref_mul(FIG_A[i], FIG_B[i]) != {2'b00, FIG_P[i]}) begin
        failures++;
        $display("FAIL reference disagrees with published example %0d", i);
      end
      apply(FIG_A[i], FIG_B[i]);
    end
    for (int n = 0; n < 30000; n++) begin
      case (n % 8)
        0: begin a = rnd_fp(1, 254); b = rnd_fp(1, 254); end
        1: begin a = rnd_fp(100, 154); b = rnd_fp(100, 154); end
        2: begin a = rnd_fp(190, 254); b = rnd_fp(160, 254); end     // overflow
        3: begin a = rnd_fp(1, 60); b = rnd_fp(1, 100); end          // underflow
        4: begin a = rnd_fp(0, 3); b = rnd_fp(0, 254); end           // zeros
        5: begin                                                     // rounding carry
          // significands A, B with 2^47 - 2^22 <= A*B < 2^47: the product
          // rounds up to 2.0 and must be normalised a second time
          longint unsigned sa, sb;
          do begin
            sa = 64'({1'b1, 23'($urandom)});
            sb = ((64'd1 << 47) - (64'd1 << 22) + sa - 1) / sa;
          end while (sa * sb >= (64'd1 << 47) || sb >= (64'd1 << 24));
          a = {1'($urandom), 8'($urandom_range(140, 100)), sa[22:0]};
          b = {1'($urandom), 8'($urandom_range(140, 100)), sb[22:0]};
        end
        6: begin a = rnd_fp(126, 128); b = rnd_fp(126, 129); end
        default: begin a = rnd_fp(1, 254); b = 32'h3f800000; end     // times 1.0
      endcase
      apply(a, b);
    end
    // drain
    for (int i = 0; i < LAT; i++) apply(32'd0, 32'd0);

    $display("mechanisms: zero=%0d shift=%0d round=%0d carry=%0d overflow=%0d underflow=%0d",
             n_zero, n_shift, n_round, n_carry, n_ovf, n_unf);
    checks++;
    if (n_zero == 0 || n_shift == 0 || n_round == 0 || n_carry == 0 || n_ovf == 0 || n_unf == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
