// cla_adder4: 4-bit carry look-ahead adder, the leaf cell of the adder tree.
//
// Each bit forms generate g = a&b and propagate p = a^b; the three internal
// carries and the carry out are computed directly from g, p and cin (two-level
// look-ahead), so no carry ripples through the cell. The cell also exports the
// group generate/propagate (gg, gp) so that a higher look-ahead level can
// compute its carry without waiting for cout. Purely combinational.
// The 4-bit leaf follows the design description; exporting gg/gp is this
// implementation's choice for building the 16- and 64-bit levels.
module cla_adder4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       cout,
  output logic       gg,   // group generate
  output logic       gp    // group propagate
);
  logic [3:0] g, p;
  logic [4:0] c;

  always_comb begin
    g = a & b;
    p = a ^ b;
    c[0] = cin;
    c[1] = g[0] | (p[0] & cin);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
    gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    gp   = &p;
    c[4] = gg | (gp & cin);
    sum  = p ^ c[3:0];
    cout = c[4];
  end
endmodule
