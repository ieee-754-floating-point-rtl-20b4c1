// fpmul_pipelined: IEEE-754 single-precision (binary32) multiplier in a
// three-stage pipeline.
//   Stage 1  check_zero: is either operand zero? The operands and the flag
//            are registered.
//   Stage 2  check_sign (XOR of the signs), add_exponent (E1 + E2 - 127 with
//            a carry-save adder) and mantissa_multiplier (26-bit radix-4
//            Booth multiplier) work in parallel. Sign, exponent and flag are
//            registered here; the product is registered inside the Booth
//            multiplier.
//   Stage 3  normalize_round: normalise, round to nearest even, detect
//            overflow and underflow and concatenate the result, which is
//            registered on the outputs.
// Interface: clk, the operands inA and inB, the product out and the flags
// overflow and underflow; there is no reset and no handshake. A new operand
// pair may be applied every cycle; its result appears after the third rising
// edge of clk that follows (latency 3 cycles, throughput 1 per cycle). The
// outputs hold arbitrary values until the first operands have passed through.
// The stage split and the port list follow the described design; the
// register placement, the number formats at the stage boundaries and the
// treatment of zero, subnormal, infinite and NaN operands are choices of this
// design (exponent 0 counts as zero; exponent 255 is treated as an ordinary
// exponent).
module fpmul_pipelined
  import fp_pkg::*;
(
  input  logic              clk,
  input  logic [WORD_W-1:0] inA,
  input  logic [WORD_W-1:0] inB,
  output logic [WORD_W-1:0] out,
  output logic              overflow,
  output logic              underflow
);
  // ---------------- stage 1: check zero
  logic    zero_1;
  stage1_t s1;

  check_zero u_check_zero (
    .a   (fp32_t'(inA)),
    .b   (fp32_t'(inB)),
    .zero(zero_1)
  );

  always_ff @(posedge clk) begin
    s1 <= '{a: fp32_t'(inA), b: fp32_t'(inB), zero: zero_1};
  end

  // ---------------- stage 2: sign, exponent, mantissa
  logic                     sign_2;
  logic signed [XEXP_W-1:0] exp_2;
  logic [PROD_W-1:0]        prod_3;   // registered inside the multiplier
  stage2_t                  s2;

  check_sign u_check_sign (
    .a_sign(s1.a.sign),
    .b_sign(s1.b.sign),
    .sign  (sign_2)
  );

  add_exponent u_add_exponent (
    .a_exp(s1.a.exp),
    .b_exp(s1.b.exp),
    .zero (s1.zero),
    .exp  (exp_2)
  );

  mantissa_multiplier u_mantissa (
    .clk   (clk),
    .a_frac(s1.a.frac),
    .b_frac(s1.b.frac),
    .zero  (s1.zero),
    .prod  (prod_3)
  );

  always_ff @(posedge clk) begin
    s2 <= '{sign: sign_2, exp: exp_2, zero: s1.zero};
  end

  // ---------------- stage 3: normalise, round, concatenate
  fp32_t result_3;
  logic  ovf_3, unf_3;

  normalize_round u_normalize (
    .sign     (s2.sign),
    .exp      (s2.exp),
    .prod     (prod_3),
    .zero     (s2.zero),
    .result   (result_3),
    .overflow (ovf_3),
    .underflow(unf_3)
  );

  always_ff @(posedge clk) begin
    out       <= result_3;
    overflow  <= ovf_3;
    underflow <= unf_3;
  end
endmodule
