// check_sign: sign of the product, the exclusive OR of the operand signs
// (equal signs give a positive product, different signs a negative one).
// Purely combinational; part of the second pipeline stage.
module check_sign
  import fp_pkg::*;
(
  input  logic a_sign,
  input  logic b_sign,
  output logic sign
);
  always_comb begin
    sign = a_sign ^ b_sign;
  end
endmodule
