// csla_pkg: constants shared by the 16-bit BEC carry select adder.
//
// The adder is split into five groups whose widths grow from the least
// significant end: 2, 2, 3, 4 and 5 bits (bits [1:0], [3:2], [6:4], [10:7],
// [15:11]). This square-root-like partition is the one of the 16-bit
// non-uniform adder the design is built on. group_lsb() gives the position of
// a group's lowest bit, so the datapath can be generated from the table.
package csla_pkg;

  localparam int unsigned NUM_GROUPS = 5;

  // Width of each group, least significant group first.
  localparam int unsigned GROUP_W [NUM_GROUPS] = '{2, 2, 3, 4, 5};

  // Bit position of the lowest bit of group g.
  function automatic int unsigned group_lsb(int unsigned g);
    int unsigned lsb = 0;
    for (int unsigned i = 0; i < g; i++) lsb += GROUP_W[i];
    return lsb;
  endfunction

  // Total adder width: the sum of all group widths (16).
  localparam int unsigned WIDTH = group_lsb(NUM_GROUPS);

endpackage
