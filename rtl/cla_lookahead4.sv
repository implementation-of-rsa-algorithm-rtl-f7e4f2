// cla_lookahead4: look-ahead carry unit for four adder groups.
//
// From the group generate/propagate of four sub-adders and the incoming carry
// it produces the carry into each group and the generate/propagate of the
// four together. Used by cla_adder16 (over four 4-bit cells) and cla_adder64
// (over four 16-bit adders). Purely combinational.
module cla_lookahead4 (
  input  logic [3:0] g,
  input  logic [3:0] p,
  input  logic       cin,
  output logic [3:0] cgrp,  // carry into group i
  output logic       cout,
  output logic       gg,
  output logic       gp
);
  always_comb begin
    cgrp[0] = cin;
    cgrp[1] = g[0] | (p[0] & cin);
    cgrp[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    cgrp[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
    gg      = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    gp      = &p;
    cout    = gg | (gp & cin);
  end
endmodule
