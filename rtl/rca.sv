// rca: N-bit ripple carry adder.
//
// A chain of N full adders: bit i adds a[i], b[i] and the carry out of bit
// i-1, with cin entering at bit 0. {cout, sum} = a + b + cin. Purely
// combinational; the carry ripples through all N cells, so the delay grows
// linearly with N. The least significant group of the carry select adder is
// one such adder (2 bits, fed by the adder's carry in), and the upper bits
// of every other group's zero-carry adder are one too.
// Structure and use follow the reference design; the port names follow its
// 2-bit block (a, b, cin, sum, carry out).
module rca #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (sum[i]),
      .co(c[i+1])
    );
  end

  assign cout = c[N];
endmodule
