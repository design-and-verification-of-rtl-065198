// ks_sum_gen: post-processing stage of a Kogge-Stone adder.
//
// The carry out of bit i is c[i] = G[i:0] | (P[i:0] & cin); the carry into
// bit i is cin for bit 0 and c[i-1] above it. Each sum bit is the bit
// propagate XOR the carry into that bit, and cout is c[N-1].
//
// Interface: N-bit bit propagate p, N-bit group pairs pp/gg over [i:0], cin;
// N-bit sum and cout. Purely combinational.
module ks_sum_gen #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] p,
  input  logic [N-1:0] pp,
  input  logic [N-1:0] gg,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N-1:0] c;      // carry out of each bit position
  logic [N:0]   cc;     // {carries out, cin}: cc[i] is the carry into bit i

  always_comb begin
    c      = gg | (pp & {N{cin}});
    cc     = {c, cin};
    sum    = p ^ cc[N-1:0];
    cout   = cc[N];
  end

endmodule
