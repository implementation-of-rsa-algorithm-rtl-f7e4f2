// barrel_rotl: W-bit barrel shifter that rotates left by 0..W-1 places in one
// cycle's worth of logic.
//
// log2(W) stages, stage i rotating by 2^i when bit i of the amount is set, so
// any rotation takes the same logic depth. Used by the random number
// generator, whose core the design description names as a barrel shifter.
// W must be a power of two. Purely combinational. Rotation (rather than a
// plain shift) is this implementation's choice: it loses no state bits.
module barrel_rotl #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0]         data_in,
  input  logic [$clog2(W)-1:0] amount,
  output logic [W-1:0]         data_out
);
  localparam int unsigned S = $clog2(W);

  logic [W-1:0] stage [S+1];

  assign stage[0] = data_in;
  for (genvar i = 0; i < S; i++) begin : g_stage
    localparam int unsigned SH = 1 << i;
    assign stage[i+1] = amount[i] ? {stage[i][W-1-SH:0], stage[i][W-1:W-SH]} : stage[i];
  end
  assign data_out = stage[S];
endmodule
