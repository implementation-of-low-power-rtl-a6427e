// csla_bec16: 16-bit non-uniform carry select adder with binary to
// excess-1 converters, {cout, sum} = a + b + cin.
//
// The operands are split into five groups of 2, 2, 3, 4 and 5 bits
// (csla_pkg::GROUP_W). Group 1, bits [1:0], is a plain 2-bit ripple carry
// adder fed by cin. Each higher group (csla_group) computes its result for
// a carry in of zero with a ripple carry adder and derives the result for a
// carry in of one from it with an excess-1 converter, then lets the carry of
// the group below choose between the two. The carry therefore crosses each
// higher group through a single mux while the groups' own additions run in
// parallel; the groups grow in width so that each one's local sum is ready
// about when its select carry arrives.
//
// Interface: a, b, cin in; sum, cout out. car1..car4 are the carries out of
// groups 1 to 4 (into bits 2, 4, 7 and 11), brought out as in the reference
// design; cout is the carry out of group 5.
// Purely combinational, no clock: the result is valid one adder delay after
// the inputs settle.
//
// Timing in the unit-gate model the design is costed in (AND, OR, NOT one
// unit each): the group 1 carry is ready at 7. Group 2's own zero-carry
// result is ready only at 10, so its carry out follows at 13; from there
// each group adds one mux delay (3), giving selects at 7, 13, 16 and 19 and
// the last sum and cout at 22. The partition, the carry chain and the
// car1..car4 outputs follow the reference design. Making the partition a
// package table is this design's choice; the car1..car4 ports assume five
// groups.
module csla_bec16
  import csla_pkg::*;
(
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             car1,
  output logic             car2,
  output logic             car3,
  output logic             car4
);
  // c[g] is the carry into group g; c[NUM_GROUPS] is the final carry out.
  logic [NUM_GROUPS:0] c;

  assign c[0] = cin;

  rca #(.N(GROUP_W[0])) u_group1 (
    .a   (a[GROUP_W[0]-1:0]),
    .b   (b[GROUP_W[0]-1:0]),
    .cin (c[0]),
    .sum (sum[GROUP_W[0]-1:0]),
    .cout(c[1])
  );

  for (genvar g = 1; g < NUM_GROUPS; g++) begin : g_group
    localparam int unsigned LSB = group_lsb(g);
    localparam int unsigned W   = GROUP_W[g];

    csla_group #(.N(W)) u_grp (
      .a   (a[LSB +: W]),
      .b   (b[LSB +: W]),
      .cin (c[g]),
      .sum (sum[LSB +: W]),
      .cout(c[g+1])
    );
  end

  assign cout = c[NUM_GROUPS];
  assign car1 = c[1];
  assign car2 = c[2];
  assign car3 = c[3];
  assign car4 = c[4];
endmodule
