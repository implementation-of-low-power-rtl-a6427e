// half_adder: one-bit half adder, s = a ^ b, c = a & b.
//
// Purely combinational. It is the least significant cell of the ripple
// carry adder that each carry select group runs with a carry in of zero:
// with no carry to absorb, a half adder is enough there and saves the
// gates of a full adder (6 against 13 AND/OR/NOT gates in the unit-gate
// area count the design is evaluated with).
// The reference design gives only the cell's function and cost (delay 3,
// area 6); the two gates are the obvious realisation.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
