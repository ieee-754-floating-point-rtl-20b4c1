// csa: one carry-save row, a 3:2 compressor of W-bit words. W independent
// full adders reduce three operands to a sum word and a carry word with no
// carry chain, so the delay is one full adder whatever W is:
//   x + y + z = s + (c << 1)   (modulo 2^(W+1); c keeps the carries unshifted)
// Purely combinational.
module csa #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (
      .x   (x[i]),
      .y   (y[i]),
      .cin (z[i]),
      .sum (s[i]),
      .cout(c[i])
    );
  end
endmodule
