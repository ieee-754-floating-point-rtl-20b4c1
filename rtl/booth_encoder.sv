// booth_encoder: radix-4 (modified) Booth recoding of one overlapping group
// of three multiplier bits {x(2i+1), x(2i), x(2i-1)} into a digit in
// {-2, -1, 0, +1, +2}:
//   000 -> 0    001 -> +Y   010 -> +Y   011 -> +2Y
//   100 -> -2Y  101 -> -Y   110 -> -Y   111 -> 0
// The digit is given as three select lines: one (|digit| = 1), two
// (|digit| = 2) and neg (digit < 0). Both zero codes give neg = 0.
// Purely combinational.
module booth_encoder (
  input  logic [2:0] grp,    // {x(1), x(0), x(-1)} of the group
  output logic       one,
  output logic       two,
  output logic       neg
);
  always_comb begin
    one = grp[1] ^ grp[0];
    two = (grp[2] & ~grp[1] & ~grp[0]) | (~grp[2] & grp[1] & grp[0]);
    neg = grp[2] & ~(grp[1] & grp[0]);
  end
endmodule
