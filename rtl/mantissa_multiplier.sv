// mantissa_multiplier: multiplies the two 24-bit significands of the
// operands. It restores the hidden leading one in front of each 23-bit
// fraction, zero-extends both to 26 bits (positive, even width) and feeds
// them to the 26-bit radix-4 Booth multiplier, whose output register is the
// second pipeline register of the multiplier. The product of two significands
// in [1, 2) lies in [1, 4), so only its low 48 bits can be non-zero; those are
// returned, with the binary point between bits 46 and 45.
// When zero is set no multiplication is wanted: both significands are forced
// to 0, the multiplier sees no activity and the product is 0.
// Timing: one cycle, like booth_multiplier.
module mantissa_multiplier
  import fp_pkg::*;
(
  input  logic              clk,
  input  logic [FRAC_W-1:0] a_frac,
  input  logic [FRAC_W-1:0] b_frac,
  input  logic              zero,
  output logic [PROD_W-1:0] prod
);
  localparam int unsigned BW = MANT_W + 2;   // 26-bit Booth operands

  logic signed [BW-1:0] a_sig, b_sig;
  logic [2*BW-1:0]      p;
  logic [2*BW-PROD_W-1:0] unused_top;        // always zero for significands

  always_comb begin
    a_sig = zero ? '0 : BW'({1'b1, a_frac});
    b_sig = zero ? '0 : BW'({1'b1, b_frac});
  end

  booth_multiplier #(.N(BW)) u_booth (
    .clk(clk),
    .a  (a_sig),
    .b  (b_sig),
    .p  (p)
  );

  assign prod       = p[PROD_W-1:0];
  assign unused_top = p[2*BW-1:PROD_W];
endmodule
