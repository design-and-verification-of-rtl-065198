// ks_csla: 16-bit carry select adder built from Kogge-Stone group adders and
// binary to excess-1 converters (BEC).
//
// The operands are split into groups of 2, 2, 3, 4 and 5 bits (package
// kscsla_pkg). Group 0 (bits [1:0]) is a plain 2-bit Kogge-Stone adder fed by
// the external carry in. Every other group is a csla_group: a Kogge-Stone adder
// computes the group sum for carry in 0, a BEC derives the sum for carry in 1
// by adding one, and a multiplexer steered by the previous group's carry picks
// one (the 6:3, 8:4, 10:5 and 12:6 multiplexers for the 2-, 3-, 4- and 5-bit
// groups). All groups work in parallel; after the group adders settle, the
// carry only passes one multiplexer per group. The last multiplexer's carry is
// cout. Replacing the ripple carry group adders of the classic BEC-based
// carry select adder by Kogge-Stone adders is the point of the design; the
// carry-in port of group 0 and the parameterised group layout are this
// implementation's choices.
//
// Interface: a, b (N bits, N = sum of GROUP_W = 16), cin; sum (N bits), cout,
// with {cout, sum} = a + b + cin. Purely combinational, no clock or reset.
module ks_csla
  import kscsla_pkg::*;
#(
  parameter group_w_t    GROUP_W = KS_GROUP_W,
  localparam int unsigned N      = total_width(GROUP_W)
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  // carry[k] is the carry into group k; carry[KS_N_GROUPS] is cout.
  logic [KS_N_GROUPS:0] carry;

  assign carry[0] = cin;

  for (genvar k = 0; k < KS_N_GROUPS; k++) begin : g_group
    localparam int unsigned W   = GROUP_W[k];
    localparam int unsigned LSB = group_lsb(GROUP_W, k);
    if (k == 0) begin : g_first
      ks_adder #(.N(W)) u_add (
        .a   (a[LSB +: W]),
        .b   (b[LSB +: W]),
        .cin (carry[k]),
        .sum (sum[LSB +: W]),
        .cout(carry[k+1])
      );
    end else begin : g_select
      csla_group #(.W(W)) u_grp (
        .a   (a[LSB +: W]),
        .b   (b[LSB +: W]),
        .sel (carry[k]),
        .sum (sum[LSB +: W]),
        .cout(carry[k+1])
      );
    end
  end

  assign cout = carry[KS_N_GROUPS];

endmodule
