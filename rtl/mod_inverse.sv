// mod_inverse: extended Euclidean algorithm; gcd(a, m) and a^-1 mod m.
//
// Interface: pulse start with a and m valid (m > 0). When done pulses,
// gcd = gcd(a, m), coprime = (gcd == 1) and, if coprime, inverse = a^-1 mod m
// (0 <= inverse < m). The run time depends on the operands (it is used on a
// random number, whose value is not secret to the timing).
//
// How it works: the remainder sequence r0 = m, r1 = a and the Bezout
// coefficients t0 = 0, t1 = 1 (r_i = t_i * a mod m) are kept in registers.
// Each Euclid step divides r0 by r1 by shift and subtract, with no divider:
// the divisor d = r1 and its coefficient td = t1 are shifted left while
// 2*d <= r0, then shifted back one place per cycle; whenever d <= r0 the
// cycle subtracts d from r0 and td from t0. After the quotient's last bit,
// r0 holds the remainder and t0 = t0 - q*t1; the pairs are then swapped and
// the next step begins, until r1 reaches 0. Then r0 is the gcd and t0, made
// non-negative by adding m, the inverse. Every subtraction and comparison is
// done by the carry look-ahead adder (a carry out of 1 means no borrow).
// The coefficients stay within +-m, so W+2 signed bits hold them.
// The design description uses the extended Euclidean algorithm to get the
// gcd and the modular inverse of the random number; the shift-and-subtract
// division inside each step is this implementation's own choice.
module mod_inverse #(
  parameter int unsigned W = rsa_pkg::KEY_BITS
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] m,
  output logic [W-1:0] gcd,
  output logic [W-1:0] inverse,
  output logic         coprime,
  output logic         done
);
  localparam int unsigned TW = W + 2;
  localparam int unsigned KW = $clog2(W + 2);

  typedef enum logic [1:0] {EE_IDLE, EE_CHECK, EE_UP, EE_SUB} ee_state_t;

  ee_state_t           st;
  logic [W-1:0]        r0, r1, m_q;
  logic signed [TW-1:0] t0, t1, td;
  logic [W:0]          d;
  logic [KW-1:0]       k;

  // (2*d <= r0) ?
  logic [W+1:0] up_diff;
  logic         up_ok;
  cla_adder_n #(.N(W+2)) u_up (
    .input1({2'b00, r0}), .input2(~{d, 1'b0}), .carry_in(1'b1),
    .output_sum(up_diff), .carry_out(up_ok)
  );

  // r0 - d and (d <= r0) ?
  logic [W:0] sub_diff;
  logic       sub_ok;
  cla_adder_n #(.N(W+1)) u_sub (
    .input1({1'b0, r0}), .input2(~d), .carry_in(1'b1),
    .output_sum(sub_diff), .carry_out(sub_ok)
  );

  // t0 - td
  logic [TW-1:0] t_diff;
  logic          unused_t_cout;
  cla_adder_n #(.N(TW)) u_tsub (
    .input1(t0), .input2(~td), .carry_in(1'b1),
    .output_sum(t_diff), .carry_out(unused_t_cout)
  );

  // t0 + m, the inverse when t0 is negative
  logic [W-1:0] fix_sum;
  logic         unused_fix_cout;
  cla_adder_n #(.N(W)) u_fix (
    .input1(t0[W-1:0]), .input2(m_q), .carry_in(1'b0),
    .output_sum(fix_sum), .carry_out(unused_fix_cout)
  );

  logic [W-1:0]         r0_next;
  logic signed [TW-1:0] t0_next;
  assign r0_next = sub_ok ? sub_diff[W-1:0] : r0;
  assign t0_next = sub_ok ? t_diff : t0;

  always_ff @(posedge clk) begin
    if (rst) begin
      st      <= EE_IDLE;
      r0      <= '0;
      r1      <= '0;
      m_q     <= '0;
      t0      <= '0;
      t1      <= '0;
      td      <= '0;
      d       <= '0;
      k       <= '0;
      gcd     <= '0;
      inverse <= '0;
      coprime <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st)
        EE_IDLE: if (start) begin
          r0  <= m;
          r1  <= a;
          m_q <= m;
          t0  <= '0;
          t1  <= TW'(1);
          st  <= EE_CHECK;
        end
        EE_CHECK: begin
          if (r1 == '0) begin
            gcd     <= r0;
            coprime <= (r0 == W'(1));
            inverse <= t0[TW-1] ? fix_sum : t0[W-1:0];
            done    <= 1'b1;
            st      <= EE_IDLE;
          end else begin
            d  <= {1'b0, r1};
            td <= t1;
            k  <= '0;
            st <= EE_UP;
          end
        end
        EE_UP: begin
          if (up_ok) begin
            d  <= d << 1;
            td <= td <<< 1;
            k  <= k + 1'b1;
          end else begin
            st <= EE_SUB;
          end
        end
        EE_SUB: begin
          if (k == '0) begin
            // quotient complete: (r0, r1) <= (r1, remainder), same for t
            r0 <= r1;
            r1 <= r0_next;
            t0 <= t1;
            t1 <= t0_next;
            st <= EE_CHECK;
          end else begin
            r0 <= r0_next;
            t0 <= t0_next;
            d  <= d >> 1;
            td <= td >>> 1;
            k  <= k - 1'b1;
          end
        end
        default: st <= EE_IDLE;
      endcase
    end
  end
endmodule
