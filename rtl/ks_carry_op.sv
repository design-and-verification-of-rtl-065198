// ks_carry_op: the prefix "dot" (carry) operator of a parallel prefix adder.
//
// It merges the propagate/generate pair of a more significant span (p_hi, g_hi)
// with that of the adjacent less significant span (p_lo, g_lo) into the pair of
// the joined span:
//     p_out = p_hi & p_lo
//     g_out = g_hi | (p_hi & g_lo)
// The operator is associative, which is what lets the Kogge-Stone tree evaluate
// all prefixes in log2(N) levels. These are the standard carry-operator
// equations; the port names are this design's own.
//
// Interface: four 1-bit inputs, two 1-bit outputs. Purely combinational.
module ks_carry_op (
  input  logic p_hi,
  input  logic g_hi,
  input  logic p_lo,
  input  logic g_lo,
  output logic p_out,
  output logic g_out
);

  always_comb begin
    p_out = p_hi & p_lo;
    g_out = g_hi | (p_hi & g_lo);
  end

endmodule
