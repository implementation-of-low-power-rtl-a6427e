// bec: N-bit binary to excess-1 converter, x = b + 1 (mod 2^N).
//
// Built as in the design's 4-bit converter: x[0] = ~b[0] and, for i > 0,
// x[i] = b[i] ^ (b[0] & ... & b[i-1]). The running AND is a chain of
// two-input gates, one per bit, so an N-bit converter needs one inverter,
// N-1 XORs and N-2 ANDs, far fewer gates than a second ripple carry adder.
// All ones wraps to all zeros. Purely combinational.
//
// In a carry select group the converter takes the n-bit sum and the carry
// out of the zero-carry adder as one (n+1)-bit word, so N = n + 1 (the
// groups of 2, 3, 4 and 5 bits use 3-, 4-, 5- and 6-bit converters).
// The equations, the AND chain and these widths follow the reference design;
// writing one parameterized converter in place of its four fixed-width
// ones, with {carry, sum} packed into one input word, is this design's choice.
module bec #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] b,
  output logic [N-1:0] x
);
  // all1[i] = b[0] & ... & b[i-1]; all1[0] = 1.
  logic [N-1:0] all1;

  assign all1[0] = 1'b1;
  for (genvar i = 1; i < N; i++) begin : g_and
    assign all1[i] = all1[i-1] & b[i-1];
  end

  assign x[0] = ~b[0];
  for (genvar i = 1; i < N; i++) begin : g_xor
    assign x[i] = b[i] ^ all1[i];
  end
endmodule
