// csa_adder: multi-operand adder made of carry-save rows and a final
// ripple-carry adder. With the default four operands it is the adder of the
// design's carry-save figure: a first CSA row compresses operands 1..3
// (B, E, F in the figure), a second row adds operand 0 (A), and an RCA turns
// the remaining carry word C' and sum word S' into one result. For NOPS
// operands the rows form a chain of NOPS-2 compressors, each folding one more
// operand into the running (sum, carry) pair. NOPS must be at least 3.
//
// All arithmetic is modulo 2^W: callers extend their operands (zero or sign)
// to the width the result needs. This is how the Booth multiplier sums its
// partial products (two's-complement rows) and how the exponent adder forms
// E1 + E2 - 127. Purely combinational. The chain (rather than a Wallace tree)
// and the modulo-2^W interface are choices of this design.
module csa_adder #(
  parameter int unsigned NOPS = 4,
  parameter int unsigned W    = 4
) (
  input  logic [NOPS-1:0][W-1:0] ops,
  output logic [W-1:0]           sum
);
  // Running carry-save pair; row k (1 .. NOPS-2) folds in operand NOPS-2-k.
  logic [NOPS-2:0][W-1:0] s_word;
  logic [NOPS-2:0][W-1:0] c_word;   // carry words, shifted into place
  logic [NOPS-2:1][W-1:0] c_raw;    // carry words before the shift
  logic                   unused_cout;

  if (NOPS < 3) begin : g_bad_nops
    $error("csa_adder: NOPS must be at least 3");
  end

  // The two highest-numbered operands enter the first row directly.
  assign s_word[0] = ops[NOPS-1];
  assign c_word[0] = ops[NOPS-2];

  for (genvar k = 1; k <= NOPS - 2; k++) begin : g_row
    csa #(.W(W)) u_csa (
      .x(s_word[k-1]),
      .y(c_word[k-1]),
      .z(ops[NOPS-2-k]),
      .s(s_word[k]),
      .c(c_raw[k])
    );
    assign c_word[k] = {c_raw[k][W-2:0], 1'b0};
  end

  rca #(.N(W)) u_rca (
    .x   (c_word[NOPS-2]),
    .y   (s_word[NOPS-2]),
    .cin (1'b0),
    .s   (sum),
    .cout(unused_cout)
  );
endmodule
