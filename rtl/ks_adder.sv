// ks_adder: N-bit Kogge-Stone parallel prefix adder with carry in and out.
//
// Three stages: ks_pg_gen forms bit propagate/generate, ks_prefix_tree (the
// Kogge-Stone carry generation network, ceil(log2 N) levels of carry operators
// with fan-out of at most two) forms the group pairs over [i:0], and ks_sum_gen
// turns them and cin into carries and sum bits. The default N = 16 is the size
// of the textbook Kogge-Stone tree; the carry select adder ks_csla uses this
// module at N = 2, 3, 4 and 5.
//
// Interface: a, b (N bits), cin; sum (N bits), cout, with
// {cout, sum} = a + b + cin. Purely combinational.
module ks_adder #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N-1:0] p, g, pp, gg;

  ks_pg_gen #(.N(N)) u_pre (
    .a(a), .b(b), .p(p), .g(g)
  );

  ks_prefix_tree #(.N(N)) u_tree (
    .p(p), .g(g), .pp(pp), .gg(gg)
  );

  ks_sum_gen #(.N(N)) u_post (
    .p(p), .pp(pp), .gg(gg), .cin(cin), .sum(sum), .cout(cout)
  );

endmodule
