// booth_multiplier: N x N two's-complement multiplier using radix-4 modified
// Booth recoding, a carry-save adder chain and a ripple-carry final adder,
// with a registered 2N-bit product.
//
// The multiplier b is scanned in N/2 overlapping 3-bit groups
// {b[2i+1], b[2i], b[2i-1]} (b[-1] = 0), each recoded by a booth_encoder
// into 0, +-a or +-2a. Partial product i is that multiple of the multiplicand
// a, N+1 bits wide, sign-extended to 2N bits and shifted left by 2i. A
// negative multiple is formed as the one's complement of the positive one;
// the missing +1 of each such row is collected, at bit 2i, in one extra
// correction row. The N/2 + 1 rows are summed modulo 2^(2N) by csa_adder
// (a chain of 3:2 carry-save rows and an RCA), which is exact because a
// signed N x N product fits in 2N bits.
//
// Timing: combinational from a and b to the product register; p shows the
// product of the operands present at the previous rising edge of clk
// (one cycle of latency, one product per cycle). No reset.
// The default N = 26 is the size given for the design's mantissa
// multiplier: a 24-bit significand plus two zero bits, which keeps it
// positive and the width even.
module booth_multiplier #(
  parameter int unsigned N = 26     // operand width, must be even
) (
  input  logic                clk,
  input  logic signed [N-1:0] a,    // multiplicand
  input  logic signed [N-1:0] b,    // multiplier (Booth-recoded)
  output logic [2*N-1:0]      p     // registered product a * b
);
  localparam int unsigned NPP = N / 2;     // partial products
  localparam int unsigned PW  = 2 * N;     // product width

  logic [N:0]                 b_ext;       // b with the implied zero below
  logic [NPP:0][PW-1:0]       rows;        // NPP partial products + correction
  logic [PW-1:0]              corr;
  logic [PW-1:0]              sum;

  if (N % 2 != 0) begin : g_bad_width
    $error("booth_multiplier: N must be even");
  end

  assign b_ext = {b, 1'b0};

  for (genvar i = 0; i < NPP; i++) begin : g_pp
    logic       one, two, neg;
    logic [N:0] mag;                       // |digit| * a, N+1 bits signed
    logic [N:0] row;

    booth_encoder u_enc (
      .grp(b_ext[2*i+2 -: 3]),
      .one(one),
      .two(two),
      .neg(neg)
    );

    always_comb begin
      if (one)      mag = {a[N-1], a};
      else if (two) mag = {a, 1'b0};
      else          mag = '0;
      row = mag ^ {(N+1){neg}};
    end

    // Sign-extend to 2N bits and move to weight 4^i.
    assign rows[i]    = PW'({{(PW-N-1){row[N]}}, row} << (2 * i));
    assign corr[2*i]   = neg;
    assign corr[2*i+1] = 1'b0;
  end

  assign corr[PW-1:N] = '0;
  assign rows[NPP]     = corr;

  csa_adder #(.NOPS(NPP + 1), .W(PW)) u_sum (
    .ops(rows),
    .sum(sum)
  );

  always_ff @(posedge clk) begin
    p <= sum;
  end
endmodule
