// mod_exp: modular exponentiation, result = base^exponent mod N.
//
// Interface: pulse start with base (any W-bit value), exponent (EW bits),
// modulus (odd) and r2 = 2^(2W) mod N valid; done pulses for one cycle when
// result is valid. Every Montgomery product takes W+1 cycles plus 2 cycles of
// hand-over, and one operation uses 3 + EW + popcount(exponent) products, so
// the run time depends on the Hamming weight of the exponent but not on the
// base or modulus.
//
// How it works: left-to-right square and multiply on one Montgomery
// multiplier (mont_mul). The base is first brought into the Montgomery
// domain, X = base*2^W mod N (a product with r2), and the accumulator starts
// at 1*2^W mod N (also a product with r2). For every exponent bit, from the
// most significant down, the accumulator is squared and, if the bit is 1,
// multiplied by X. A last product with 1 leaves the Montgomery domain.
// The design description gives square and multiply over Montgomery
// multiplication; the ordering, the domain conversions and scanning all EW
// exponent bits are this implementation's choices.
module mod_exp #(
  parameter int unsigned W  = rsa_pkg::KEY_BITS,
  parameter int unsigned EW = W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [W-1:0]  base,
  input  logic [EW-1:0] exponent,
  input  logic [W-1:0]  modulus,
  input  logic [W-1:0]  r2,
  output logic [W-1:0]  result,
  output logic          done
);
  typedef enum logic [2:0] {EX_IDLE, EX_TO_X, EX_TO_ACC, EX_SQUARE, EX_MULT, EX_FROM} ex_state_t;

  localparam int unsigned IW = (EW > 1) ? $clog2(EW) : 1;

  ex_state_t     st;
  logic [EW-1:0] e_q;
  logic [W-1:0]  r2_q, x_q;
  logic [IW-1:0] idx;
  logic          mm_start, mm_done;
  logic [W-1:0]  mm_a, mm_b, mm_n, mm_res;

  mont_mul #(.W(W)) u_mont (
    .clk(clk), .rst(rst), .start(mm_start), .a(mm_a), .b(mm_b),
    .modulus(mm_n), .result(mm_res), .done(mm_done)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= EX_IDLE;
      e_q      <= '0;
      r2_q     <= '0;
      x_q      <= '0;
      idx      <= '0;
      mm_start <= 1'b0;
      mm_a     <= '0;
      mm_b     <= '0;
      mm_n     <= '0;
      result   <= '0;
      done     <= 1'b0;
    end else begin
      mm_start <= 1'b0;
      done     <= 1'b0;
      unique case (st)
        EX_IDLE: if (start) begin
          e_q      <= exponent;
          r2_q     <= r2;
          mm_n     <= modulus;
          mm_a     <= base;
          mm_b     <= r2;
          mm_start <= 1'b1;
          st       <= EX_TO_X;
        end
        EX_TO_X: if (mm_done) begin          // X = base * 2^W mod N
          x_q      <= mm_res;
          mm_a     <= W'(1);
          mm_b     <= r2_q;
          mm_start <= 1'b1;
          st       <= EX_TO_ACC;
        end
        EX_TO_ACC: if (mm_done) begin        // acc = 2^W mod N (one, in the domain)
          idx      <= IW'(EW - 1);
          mm_a     <= mm_res;
          mm_b     <= mm_res;
          mm_start <= 1'b1;
          st       <= EX_SQUARE;
        end
        EX_SQUARE: if (mm_done) begin
          mm_start <= 1'b1;
          if (e_q[idx]) begin
            mm_a <= mm_res;
            mm_b <= x_q;
            st   <= EX_MULT;
          end else if (idx == '0) begin
            mm_a <= mm_res;
            mm_b <= W'(1);
            st   <= EX_FROM;
          end else begin
            idx  <= idx - 1'b1;
            mm_a <= mm_res;
            mm_b <= mm_res;
          end
        end
        EX_MULT: if (mm_done) begin
          mm_start <= 1'b1;
          if (idx == '0) begin
            mm_a <= mm_res;
            mm_b <= W'(1);
            st   <= EX_FROM;
          end else begin
            idx  <= idx - 1'b1;
            mm_a <= mm_res;
            mm_b <= mm_res;
            st   <= EX_SQUARE;
          end
        end
        EX_FROM: if (mm_done) begin          // leave the Montgomery domain
          result <= mm_res;
          done   <= 1'b1;
          st     <= EX_IDLE;
        end
        default: st <= EX_IDLE;
      endcase
    end
  end
endmodule
