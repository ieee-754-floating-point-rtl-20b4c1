// full_adder: one-bit full adder written with the generate / propagate terms
// G = x & y and P = x ^ y, so that cout = G | (P & cin) and sum = P ^ cin.
// Purely combinational. It is the cell from which the ripple-carry adder and
// each bit of a carry-save row are built.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic g, p;

  always_comb begin
    g    = x & y;
    p    = x ^ y;
    sum  = p ^ cin;
    cout = g | (p & cin);
  end
endmodule
