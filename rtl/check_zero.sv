// check_zero: first pipeline stage of the multiplier. Raises zero when
// either operand is zero, in which case the product is zero and the later
// stages skip their work. An operand counts as zero when its biased exponent
// is 0; this covers +0 and -0 and also flushes subnormal operands to zero,
// since the datapath handles normalised numbers only (a choice of this
// design). Purely combinational; the pipeline registers its output.
module check_zero
  import fp_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output logic  zero
);
  always_comb begin
    zero = (a.exp == '0) || (b.exp == '0);
  end
endmodule
