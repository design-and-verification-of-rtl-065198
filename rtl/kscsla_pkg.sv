// kscsla_pkg: group layout of the Kogge-Stone carry select adder.
//
// The 16-bit adder is cut, from the least significant end, into groups of
// 2, 2, 3, 4 and 5 bits (bits [1:0], [3:2], [6:4], [10:7], [15:11]). The first
// group is a plain adder that takes the external carry in; each later group is
// a carry select stage. The helper functions give a group's lowest bit
// position and the total width, so that ks_csla can be built for any layout.
package kscsla_pkg;

  localparam int unsigned KS_N_GROUPS = 5;

  typedef int unsigned group_w_t [KS_N_GROUPS];

  // Group widths, least significant group first.
  localparam group_w_t KS_GROUP_W = '{2, 2, 3, 4, 5};

  // Lowest bit position of group k.
  function automatic int unsigned group_lsb(group_w_t w, int unsigned k);
    int unsigned s = 0;
    for (int unsigned j = 0; j < k; j++) s += w[j];
    return s;
  endfunction

  // Total adder width.
  function automatic int unsigned total_width(group_w_t w);
    return group_lsb(w, KS_N_GROUPS);
  endfunction

endpackage
