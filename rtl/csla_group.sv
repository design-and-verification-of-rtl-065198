// csla_group: one carry select stage of the Kogge-Stone carry select adder.
//
// A W-bit Kogge-Stone adder adds the group's operand slices with carry in 0,
// giving the (W+1)-bit word {c0, s0}. A (W+1)-bit binary to excess-1 converter
// adds one to that word, which is exactly the result the group would give with
// carry in 1, so no second adder is needed. A (2W+2):(W+1) multiplexer, steered
// by the real carry into the group (sel), then passes one of the two words out
// as {cout, sum}. The carry out thus comes out of the multiplexer and steers the
// next group's multiplexer: the carry ripples only through one mux per group.
//
// Interface: a, b (W bits), sel (carry into the group); sum (W bits), cout.
// Purely combinational.
module csla_group #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sel,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W-1:0] s0;
  logic         c0;
  logic [W:0]   r1;   // {carry, sum} for carry in 1

  ks_adder #(.N(W)) u_add (
    .a(a), .b(b), .cin(1'b0), .sum(s0), .cout(c0)
  );

  bec #(.N(W+1)) u_bec (
    .b({c0, s0}), .x(r1)
  );

  csla_mux #(.W(W+1)) u_mux (
    .d0({c0, s0}), .d1(r1), .s(sel), .y({cout, sum})
  );

endmodule
