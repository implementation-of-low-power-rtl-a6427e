// csla_group: one N-bit group of the BEC carry select adder.
//
// A ripple carry adder with carry in fixed at zero computes {c0, s0} = a + b
// (a half adder at bit 0, full adders above it). Instead of a second adder
// with carry in one, an (N+1)-bit binary to excess-1 converter turns {c0, s0}
// into {c0, s0} + 1, which is a + b + 1. Both candidates are ready before the
// carry from the group below arrives; that carry, cin, then only has to pass
// one 2:1 mux of width N+1: {cout, sum} = cin ? {c0, s0} + 1 : {c0, s0}.
//
// Interface: a, b are this group's slices of the operands, cin the carry out
// of the group below, sum and cout this group's result and carry out.
// Purely combinational. The half adder at bit 0, the converter width and the
// mux polarity (excess-1 result on select 1) follow the design's group
// structure; the parameter N is the group width (2, 3, 4 or 5 in the 16-bit
// adder).
module csla_group #(
  parameter int unsigned N = 2
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N-1:0] s0;     // sum with carry in 0
  logic         c0;     // carry out with carry in 0
  logic         hc;     // carry out of the half adder at bit 0
  logic [N:0]   inc;    // {c0, s0} + 1, the carry-in-1 result

  half_adder u_ha (
    .a(a[0]),
    .b(b[0]),
    .s(s0[0]),
    .c(hc)
  );

  if (N > 1) begin : g_upper
    rca #(.N(N - 1)) u_rca (
      .a   (a[N-1:1]),
      .b   (b[N-1:1]),
      .cin (hc),
      .sum (s0[N-1:1]),
      .cout(c0)
    );
  end else begin : g_single
    assign c0 = hc;
  end

  bec #(.N(N + 1)) u_bec (
    .b({c0, s0}),
    .x(inc)
  );

  mux2 #(.W(N + 1)) u_mux (
    .d0 ({c0, s0}),
    .d1 (inc),
    .sel(cin),
    .y  ({cout, sum})
  );
endmodule
