// mont_mul: radix-2 Montgomery multiplier, result = a * b * 2^-W mod N.
//
// Interface: pulse start with a, b and modulus valid (modulus odd, b < modulus,
// a any W-bit value). W+1 clock edges after the start edge, result holds the
// product (fully reduced, < modulus) and done pulses for one cycle. The
// latency is the same for all operands.
//
// How it works: the running sum is kept in carry-save form as two vectors
// S and C. Each of the W iterations takes one bit a_i of a (LSB first) and
// forms S + C + a_i*b + q*N, where q = (S + C + a_i*b) mod 2 is chosen so
// that the total is even; a Wallace tree of 3:2 compressors reduces these
// four operands to a new sum/carry pair without propagating any carry, and
// the pair is halved by a one-place right shift. No division is needed. The
// invariant S + C < 2N holds throughout. In the last cycle the two vectors
// are added by the carry look-ahead adder and N is subtracted when the sum is
// N or more (both are computed every time and a multiplexer picks one, so the
// final reduction does not change the timing).
// The design description chooses Montgomery multiplication (for having no
// division) combined with Wallace tree reduction and carry look-ahead
// addition; the radix-2 bit-serial form, the carry-save state and the
// constant-time final subtraction are this implementation's own choices.
module mont_mul #(
  parameter int unsigned W = rsa_pkg::KEY_BITS
) (
  input  logic         clk,
  input  logic         rst,      // synchronous, active high
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] modulus,
  output logic [W-1:0] result,
  output logic         done
);
  localparam int unsigned SW = W + 2;          // width of S and C (each < 2^(W+1))
  localparam int unsigned TW = W + 3;          // width inside the Wallace tree
  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  a_sh, b_q, n_q;
  logic [SW-1:0] s_q, c_q;
  logic [CW-1:0] cnt;
  logic          busy;

  // ---- one iteration: S + C + a_i*b + q*N, reduced by the Wallace tree ----
  logic          ai, q;
  logic [TW-1:0] ops [4];
  logic [TW-1:0] tree_s, tree_c;

  assign ai     = a_sh[0];
  assign q      = s_q[0] ^ c_q[0] ^ (ai & b_q[0]);
  assign ops[0] = TW'(s_q);
  assign ops[1] = TW'(c_q);
  assign ops[2] = ai ? TW'(b_q) : '0;
  assign ops[3] = q  ? TW'(n_q) : '0;

  wallace_reduce #(.W(TW), .M(4)) u_tree (.ops(ops), .sum_vec(tree_s), .carry_vec(tree_c));

  // ---- final carry-propagate addition and conditional subtraction ----
  logic [SW-1:0] t_sum, t_diff;
  logic          unused_t_cout, no_borrow;

  cla_adder_n #(.N(SW)) u_add (
    .input1(s_q), .input2(c_q), .carry_in(1'b0),
    .output_sum(t_sum), .carry_out(unused_t_cout)
  );
  cla_adder_n #(.N(SW)) u_sub (
    .input1(t_sum), .input2(~SW'(n_q)), .carry_in(1'b1),
    .output_sum(t_diff), .carry_out(no_borrow)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      a_sh   <= '0;
      b_q    <= '0;
      n_q    <= '0;
      s_q    <= '0;
      c_q    <= '0;
      cnt    <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
      result <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        a_sh <= a;
        b_q  <= b;
        n_q  <= modulus;
        s_q  <= '0;
        c_q  <= '0;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (cnt == CW'(W)) begin
          result <= no_borrow ? t_diff[W-1:0] : t_sum[W-1:0];
          done   <= 1'b1;
          busy   <= 1'b0;
        end else begin
          // The total is even and the carry vector's LSB is 0, so both halve exactly.
          s_q  <= SW'(tree_s >> 1);
          c_q  <= SW'(tree_c >> 1);
          a_sh <= a_sh >> 1;
          cnt  <= cnt + 1'b1;
        end
      end
    end
  end

  // The tree's sum vector is even whenever q is chosen as above.
  assert property (@(posedge clk) disable iff (rst) (busy && cnt != CW'(W)) |-> !tree_s[0]);
endmodule
