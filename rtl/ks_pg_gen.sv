// ks_pg_gen: pre-processing stage of a Kogge-Stone adder.
//
// For every bit position i it forms the bit propagate p[i] = a[i] ^ b[i] and
// the bit generate g[i] = a[i] & b[i]. The XOR form of propagate is the one
// given for this adder; it is also the half-sum reused by the post-processing
// stage.
//
// Interface: N-bit operands a, b; N-bit p, g. Purely combinational.
module ks_pg_gen #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] p,
  output logic [N-1:0] g
);

  always_comb begin
    p = a ^ b;
    g = a & b;
  end

endmodule
