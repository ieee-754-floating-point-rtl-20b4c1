// rca: N-bit ripple-carry adder. N full adders in series; the carry out of
// stage i is the carry in of stage i+1, c[0] is the external carry in and
// c[N] the carry out. Purely combinational; the delay grows linearly with N.
// The default of 4 bits is the width drawn in the adder's schematic; callers
// set N to the width they need.
module rca #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_fa
    full_adder u_fa (
      .x   (x[i]),
      .y   (y[i]),
      .cin (c[i]),
      .sum (s[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[N];
endmodule
