// csla_mux: W-bit 2:1 multiplexer, the "2W:W" mux of a carry select stage.
//
// y = s ? d1 : d0. In the carry select adder d0 is a group's {carry, sum} for
// carry-in 0, d1 the same for carry-in 1, and s the real carry into the group,
// so the default W = 3 is the 6:3 mux (3 bits from each of two words) of the
// first select stage.
//
// Interface: d0, d1 (W bits), s; y (W bits). Purely combinational.
module csla_mux #(
  parameter int unsigned W = 3
) (
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  input  logic         s,
  output logic [W-1:0] y
);

  always_comb y = s ? d1 : d0;

endmodule
