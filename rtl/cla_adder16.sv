// cla_adder16: 16-bit carry look-ahead adder made of four 4-bit CLA cells.
//
// The cells report group generate/propagate to a look-ahead unit
// (cla_lookahead4), which returns the carry into each cell; the carry path is
// therefore two look-ahead levels deep instead of sixteen ripple stages.
// gg/gp are exported for the next level. Purely combinational.
// Building 16 bits from four 4-bit cells follows the design description.
module cla_adder16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] sum,
  output logic        cout,
  output logic        gg,
  output logic        gp
);
  logic [3:0] g, p, c;
  logic [3:0] unused_cout;

  cla_lookahead4 u_la (.g(g), .p(p), .cin(cin), .cgrp(c), .cout(cout), .gg(gg), .gp(gp));

  for (genvar i = 0; i < 4; i++) begin : g_cell
    cla_adder4 u_cell (
      .a(a[4*i +: 4]), .b(b[4*i +: 4]), .cin(c[i]),
      .sum(sum[4*i +: 4]), .cout(unused_cout[i]), .gg(g[i]), .gp(p[i])
    );
  end
endmodule
