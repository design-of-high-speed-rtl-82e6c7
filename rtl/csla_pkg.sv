// csla_pkg: shared constants of the 32-bit carry select adders.
//
// The 32-bit adders are cut into eight groups of unequal width, lowest first:
// bits [1:0], [3:2], [6:4], [10:7], [15:11], [21:16], [28:22] and [31:29].
// The widths grow by one from group to group so that each group's select
// carry arrives at about the time its two precomputed results are ready; the
// last group takes the three bits that remain. This partition is the one of
// the reference architecture. The lowest group is a plain adder fed by the
// carry in; every other group is a "select group" with two results and a mux.
package csla_pkg;

  localparam int unsigned NUM_GROUPS = 8;

  typedef int unsigned group_w_t [NUM_GROUPS];

  // Width of each group, lowest group first.
  localparam group_w_t GROUP_W = '{2, 2, 3, 4, 5, 6, 7, 3};

  // Sum of the group widths: the adder width.
  function automatic int unsigned total_width();
    int unsigned s = 0;
    for (int i = 0; i < NUM_GROUPS; i++) s += GROUP_W[i];
    return s;
  endfunction

  // Index of the lowest bit of group g.
  function automatic int unsigned group_lsb(int unsigned g);
    int unsigned s = 0;
    for (int i = 0; i < NUM_GROUPS; i++) if (i < g) s += GROUP_W[i];
    return s;
  endfunction

  localparam int unsigned CSLA_WIDTH = total_width();

endpackage
