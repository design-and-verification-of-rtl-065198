// bec: binary to excess-1 converter.
//
// Produces x = b + 1 (modulo 2^N) without an adder: bit i of the result is
// b[i] XOR (AND of all bits below i), so bit 0 is simply inverted. In the carry
// select adder it replaces the second (carry-in = 1) group adder: the word fed
// to it is {carry, sum} of the carry-in = 0 group adder, and its output is that
// group's {carry, sum} for carry-in = 1. The gate-level form is the usual one
// for this converter; the N-bit generic description is this design's own.
//
// Interface: b (N bits) in, x (N bits) out. Purely combinational.
module bec #(
  parameter int unsigned N = 3
) (
  input  logic [N-1:0] b,
  output logic [N-1:0] x
);

  always_comb begin
    logic all_low;  // AND of the bits below position i
    all_low = 1'b1;
    for (int i = 0; i < N; i++) begin
      x[i]    = b[i] ^ all_low;
      all_low = all_low & b[i];
    end
  end

endmodule
