// full_adder: one-bit full adder.
//
// Purely combinational: s = a ^ b ^ ci, co = a & b | ci & (a ^ b), the
// usual two-XOR, majority-carry form. It is the cell the ripple carry
// adders of the design are chained from.
// The reference design specifies the full adder only by its function and
// its unit-gate cost (delay 6, area 13); the gate form here is the common one.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;
  assign p  = a ^ b;
  assign s  = p ^ ci;
  assign co = (a & b) | (ci & p);
endmodule
