// ks_prefix_tree: Kogge-Stone carry generation network.
//
// Starting from the bit pairs (p[i], g[i]), level k (k = 0 .. log2(N)-1)
// combines every position i >= 2^k with the position 2^k below it through a
// ks_carry_op; positions below 2^k pass through unchanged (the buffers of the
// classic drawing). After ceil(log2 N) levels position i holds the group pair
// over bits [i:0]: pp[i] = P[i:0], gg[i] = G[i:0]. Every node has fan-out of at
// most two, and every node uses the full operator (both P and G), also the ones
// whose span already reaches bit 0, where only G would be needed; a synthesis
// tool removes the unused P logic.
//
// Interface: N-bit p, g in; N-bit pp, gg out. Purely combinational, depth
// ceil(log2 N) operator levels.
module ks_prefix_tree #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] p,
  input  logic [N-1:0] g,
  output logic [N-1:0] pp,
  output logic [N-1:0] gg
);

  localparam int unsigned LEVELS = (N > 1) ? $clog2(N) : 0;

  // Level l holds the pairs after l operator levels.
  logic [N-1:0] lp [LEVELS+1];
  logic [N-1:0] lg [LEVELS+1];

  assign lp[0] = p;
  assign lg[0] = g;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned D = 1 << l;
    for (genvar i = 0; i < N; i++) begin : g_bit
      if (i >= D) begin : g_op
        ks_carry_op u_op (
          .p_hi (lp[l][i]),
          .g_hi (lg[l][i]),
          .p_lo (lp[l][i-D]),
          .g_lo (lg[l][i-D]),
          .p_out(lp[l+1][i]),
          .g_out(lg[l+1][i])
        );
      end else begin : g_buf
        assign lp[l+1][i] = lp[l][i];
        assign lg[l+1][i] = lg[l][i];
      end
    end
  end

  assign pp = lp[LEVELS];
  assign gg = lg[LEVELS];

endmodule
