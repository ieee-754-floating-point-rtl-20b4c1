// add_exponent: exponent of the product before normalisation,
// E = E1 + E2 - 127, where E1 and E2 are the biased 8-bit operand exponents.
// The three terms (E1, E2 and -127 in two's complement) are summed in a
// 10-bit csa_adder: one carry-save row and a ripple-carry adder. The result is
// a signed 10-bit number (range -127 .. 383) so that later stages can see
// overflow and underflow. When zero is set the stage is idle and passes 0.
// Purely combinational; part of the second pipeline stage.
module add_exponent
  import fp_pkg::*;
(
  input  logic [EXP_W-1:0]         a_exp,
  input  logic [EXP_W-1:0]         b_exp,
  input  logic                     zero,
  output logic signed [XEXP_W-1:0] exp
);
  localparam logic [XEXP_W-1:0] MINUS_BIAS = XEXP_W'(-BIAS);

  logic [2:0][XEXP_W-1:0] ops;
  logic [XEXP_W-1:0]      sum;

  assign ops[0] = XEXP_W'(a_exp);
  assign ops[1] = XEXP_W'(b_exp);
  assign ops[2] = MINUS_BIAS;

  csa_adder #(.NOPS(3), .W(XEXP_W)) u_add (
    .ops(ops),
    .sum(sum)
  );

  always_comb begin
    exp = zero ? '0 : $signed(sum);
  end
endmodule
