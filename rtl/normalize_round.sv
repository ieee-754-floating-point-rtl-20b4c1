// normalize_round: third pipeline stage. Turns the sign, the unnormalised
// exponent and the 48-bit significand product into a binary32 result and the
// overflow / underflow flags.
//   1. Normalise: the product lies in [1, 4). If bit 47 is set it is shifted
//      right by one and the exponent incremented.
//   2. Round the 24-bit significand to nearest, ties to even, using the
//      guard bit below it and the sticky OR of the rest.
//   3. If rounding carried out of the significand (1.11..1 + ulp = 10.0),
//      normalise again: shift right, increment the exponent.
//   4. Check the biased exponent: 255 or more is an overflow, 0 or less an
//      underflow. An overflow gives infinity and an underflow a zero, both
//      with the product's sign (no subnormal results).
//   5. Concatenate sign, exponent and fraction.
// A zero operand (zero set) gives +0 with no flag. Purely combinational; the
// pipeline registers its outputs. The rounding mode, the values returned on
// overflow and underflow and the absence of subnormals are choices of this
// design.
module normalize_round
  import fp_pkg::*;
(
  input  logic                     sign,
  input  logic signed [XEXP_W-1:0] exp,
  input  logic [PROD_W-1:0]        prod,
  input  logic                     zero,
  output fp32_t                    result,
  output logic                     overflow,
  output logic                     underflow
);
  localparam logic signed [XEXP_W-1:0] EXP_TOP = XEXP_W'(EXP_MAX);
  localparam logic signed [XEXP_W-1:0] EXP_ONE = XEXP_W'(1);

  logic [MANT_W-1:0]        mant;      // 1.xxx, 24 bits
  logic                     guard;
  logic                     sticky;
  logic                     round_up;
  logic [MANT_W:0]          mant_r;    // after rounding, 25 bits
  logic signed [XEXP_W-1:0] exp_n;     // after normalisation
  logic signed [XEXP_W-1:0] exp_f;     // final biased exponent
  logic [FRAC_W-1:0]        frac_f;

  always_comb begin
    // 1. normalise
    if (prod[PROD_W-1]) begin
      mant   = prod[PROD_W-1 -: MANT_W];
      guard  = prod[PROD_W-1-MANT_W];
      sticky = |prod[PROD_W-2-MANT_W:0];
      exp_n  = exp + XEXP_W'(1);
    end else begin
      mant   = prod[PROD_W-2 -: MANT_W];
      guard  = prod[PROD_W-2-MANT_W];
      sticky = |prod[PROD_W-3-MANT_W:0];
      exp_n  = exp;
    end

    // 2. round to nearest even
    round_up = guard & (sticky | mant[0]);
    mant_r   = {1'b0, mant} + (MANT_W+1)'(round_up);

    // 3. still normalised?
    if (mant_r[MANT_W]) begin
      frac_f = mant_r[MANT_W-1:1];         // 1.00..0: fraction all zero
      exp_f  = exp_n + XEXP_W'(1);
    end else begin
      frac_f = mant_r[FRAC_W-1:0];
      exp_f  = exp_n;
    end

    // 4. exceptions and 5. result
    overflow  = 1'b0;
    underflow = 1'b0;
    result    = '0;
    if (!zero) begin
      if (exp_f >= EXP_TOP) begin
        overflow = 1'b1;
        result   = '{sign: sign, exp: '1, frac: '0};
      end else if (exp_f < EXP_ONE) begin
        underflow = 1'b1;
        result    = '{sign: sign, exp: '0, frac: '0};
      end else begin
        result = '{sign: sign, exp: exp_f[EXP_W-1:0], frac: frac_f};
      end
    end
  end
endmodule
