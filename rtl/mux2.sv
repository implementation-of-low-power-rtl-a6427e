// mux2: W-bit 2:1 multiplexer, y = sel ? d1 : d0.
//
// Purely combinational. The carry select groups use it as their 6:3, 8:4,
// 10:5 and 12:6 muxes (W = 3, 4, 5, 6): d0 is the zero-carry adder's result,
// d1 the excess-1 converter's, and sel is the carry from the group below.
// The select polarity (converter result on 1) follows the reference design;
// the reference costs a 2:1 mux bit at 4 gates and 3 gate delays, here it
// is left to synthesis as a plain select.
module mux2 #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  input  logic         sel,
  output logic [W-1:0] y
);
  assign y = sel ? d1 : d0;
endmodule
