// cla_adder64: 64-bit carry look-ahead adder made of four 16-bit CLAs.
//
// A third look-ahead level (cla_lookahead4) combines the group
// generate/propagate of the four 16-bit adders, so the carry into each 16-bit
// slice and the carry out are available after three look-ahead levels.
// Purely combinational. Building 64 bits from four 16-bit adders follows the
// design description.
module cla_adder64 (
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  logic        cin,
  output logic [63:0] sum,
  output logic        cout,
  output logic        gg,
  output logic        gp
);
  logic [3:0] g, p, c;
  logic [3:0] unused_cout;

  cla_lookahead4 u_la (.g(g), .p(p), .cin(cin), .cgrp(c), .cout(cout), .gg(gg), .gp(gp));

  for (genvar i = 0; i < 4; i++) begin : g_slice
    cla_adder16 u_slice (
      .a(a[16*i +: 16]), .b(b[16*i +: 16]), .cin(c[i]),
      .sum(sum[16*i +: 16]), .cout(unused_cout[i]), .gg(g[i]), .gp(p[i])
    );
  end
endmodule
