// wallace_reduce: Wallace tree reduction of M operands to a sum/carry pair.
//
// Ports: ops[M] (W bits each) in, sum_vec and carry_vec (W bits) out, with
// sum_vec + carry_vec = ops[0] + ... + ops[M-1]  (mod 2^W).
// The operands are taken in groups of three; each group passes through a row
// of full adders (a 3:2 carry-save compressor) that turns it into a sum vector
// and a carry vector shifted left by one. Operands left over from a layer pass
// straight to the next. Layers repeat until two vectors remain, so no carry
// propagates anywhere in the tree; the final carry-propagate addition is left
// to the user (a carry look-ahead adder in this design). Purely combinational.
// The design description names Wallace tree reduction as the way to shorten
// the additions of the modular multiplier; the layer structure above is the
// standard Wallace scheme, written here as this implementation's own.
module wallace_reduce #(
  parameter int unsigned W = 16,
  parameter int unsigned M = 4     // number of operands, at least 2
) (
  input  logic [W-1:0] ops [M],
  output logic [W-1:0] sum_vec,
  output logic [W-1:0] carry_vec
);
  // Operands present at the input of layer l.
  function automatic int unsigned count_at(int unsigned l);
    int unsigned n = M;
    for (int unsigned i = 0; i < l; i++) n = 2 * (n / 3) + (n % 3);
    return n;
  endfunction

  function automatic int unsigned num_layers();
    int unsigned n = M;
    int unsigned l = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + (n % 3);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned L = num_layers();

  // Each layer holds its own input and output vectors, so that no signal
  // spans layers (a single 2-D array would look like a loop to a linter).
  for (genvar l = 0; l < L; l++) begin : g_layer
    localparam int unsigned N_IN  = count_at(l);
    localparam int unsigned N_GRP = N_IN / 3;
    localparam int unsigned N_OUT = count_at(l + 1);
    logic [W-1:0] cur [M];
    logic [W-1:0] nxt [M];
    if (l == 0) begin : g_first
      assign cur = ops;
    end else begin : g_next
      assign cur = g_layer[l-1].nxt;
    end
    for (genvar g = 0; g < N_GRP; g++) begin : g_csa
      logic [W-1:0] x, y, z;
      assign x = cur[3*g];
      assign y = cur[3*g+1];
      assign z = cur[3*g+2];
      assign nxt[2*g]   = x ^ y ^ z;                               // sum bits
      assign nxt[2*g+1] = ((x & y) | (x & z) | (y & z)) << 1;      // carries, one place up
    end
    for (genvar r = 0; r < N_IN - 3 * N_GRP; r++) begin : g_pass
      assign nxt[2*N_GRP + r] = cur[3*N_GRP + r];
    end
    for (genvar u = N_OUT; u < M; u++) begin : g_unused
      assign nxt[u] = '0;
    end
  end

  if (L == 0) begin : g_two
    assign sum_vec   = ops[0];
    assign carry_vec = ops[1];
  end else begin : g_tree
    assign sum_vec   = g_layer[L-1].nxt[0];
    assign carry_vec = g_layer[L-1].nxt[1];
  end
endmodule
