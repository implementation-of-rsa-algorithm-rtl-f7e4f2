// rsa_blinded_top: RSA private-key operation with base blinding against
// timing attacks; result = base^d mod N.
//
// Interface: pulse start with base, exp_d (private exponent), exp_e (public
// exponent), modulus (odd), r2 = 2^(2W) mod N, and the generator seeds
// rng_init / rng_key valid. blind_en selects the blinded operation (1) or a
// plain exponentiation (0), for comparison. done pulses with result; busy is
// high in between. Also reported per operation: the random number used
// (rand_r), how many random numbers had to be redrawn because they shared a
// factor with N (retries), and the clock cycles from start to done
// (op_cycles).
//
// How it works (blinded): the random number generator draws r; the extended
// Euclidean unit gives gcd(r, N) and r^-1 mod N (a new r is drawn until the
// gcd is 1). The exponentiator computes r^e mod N and the modular multiplier
// blinds the base: b' = base * r^e mod N. The exponentiator then computes
// b'^d mod N = base^d * r^(e*d) = base^d * r mod N, the product of the random
// number and the wanted exponentiation; a last modular multiplication by
// r^-1 mod N removes r. The exponentiation of the secret exponent thus works
// on a base the observer neither chooses nor knows, so its timing carries no
// usable relation to the input. Timing: a few thousand cycles for the random
// number and the inverse, then two exponentiations and two multiplications
// (see mod_exp and mod_mul).
//
// The design description gives the chain random number -> blinded
// exponentiation (a product of the random number and the exponentiation) ->
// multiplication by the inverse of the random number, and the units used.
// Blinding the base with r^e (which needs the public exponent) so that the
// result is exact, redrawing r when it is not invertible, sharing one
// exponentiator and one multiplier between the two phases that use them, and
// the blind_en switch are this implementation's choices.
module rsa_blinded_top
  import rsa_pkg::*;
#(
  parameter int unsigned W = KEY_BITS
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic         blind_en,
  input  logic [W-1:0] base,
  input  logic [W-1:0] exp_d,
  input  logic [W-1:0] exp_e,
  input  logic [W-1:0] modulus,
  input  logic [W-1:0] r2,
  input  logic [31:0]  rng_init,
  input  logic [31:0]  rng_key,
  output logic [W-1:0] result,
  output logic         done,
  output logic         busy,
  output logic [31:0]  rand_r,
  output logic [15:0]  retries,
  output logic [31:0]  op_cycles
);
  phase_t st;

  // latched operands
  logic [W-1:0] base_q, d_q, e_q, n_q, r2_q;
  logic         blind_q;
  logic [W-1:0] rinv_q;
  logic         rng_wait;

  // ---- random number generator ----
  logic        rng_en, rng_done;
  logic [31:0] rng_out;
  rng32 u_rng (
    .clk(clk), .rst(rst), .enable(rng_en), .initial_value(rng_init), .key(rng_key),
    .rand_out(rng_out), .done(rng_done)
  );

  logic [W-1:0] r_w;
  assign r_w = W'(rng_out);

  // ---- extended Euclid: r^-1 mod N ----
  logic         inv_start, inv_done, inv_coprime;
  logic [W-1:0] inv_gcd, inv_val;
  mod_inverse #(.W(W)) u_inv (
    .clk(clk), .rst(rst), .start(inv_start), .a(r_w), .m(n_q),
    .gcd(inv_gcd), .inverse(inv_val), .coprime(inv_coprime), .done(inv_done)
  );

  // ---- shared exponentiator ----
  logic         ex_start, ex_done;
  logic [W-1:0] ex_base, ex_exp, ex_res;
  mod_exp #(.W(W), .EW(W)) u_exp (
    .clk(clk), .rst(rst), .start(ex_start), .base(ex_base), .exponent(ex_exp),
    .modulus(n_q), .r2(r2_q), .result(ex_res), .done(ex_done)
  );

  // ---- shared modular multiplier ----
  logic         mm_en, mm_done;
  logic [W-1:0] mm_in1, mm_in2, mm_res;
  mod_mul #(.W(W)) u_mul (
    .clk(clk), .rst(rst), .enable(mm_en), .in1(mm_in1), .in2(mm_in2),
    .modulus(n_q), .r2(r2_q), .result(mm_res), .done(mm_done)
  );


  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= PH_IDLE;
      base_q    <= '0;
      d_q       <= '0;
      e_q       <= '0;
      n_q       <= '0;
      r2_q      <= '0;
      blind_q   <= 1'b0;
      rinv_q    <= '0;
      rng_en    <= 1'b0;
      rng_wait  <= 1'b0;
      inv_start <= 1'b0;
      ex_start  <= 1'b0;
      ex_base   <= '0;
      ex_exp    <= '0;
      mm_en     <= 1'b0;
      mm_in1    <= '0;
      mm_in2    <= '0;
      result    <= '0;
      done      <= 1'b0;
      busy      <= 1'b0;
      rand_r    <= '0;
      retries   <= '0;
      op_cycles <= '0;
    end else begin
      rng_en    <= 1'b0;
      inv_start <= 1'b0;
      ex_start  <= 1'b0;
      mm_en     <= 1'b0;
      done      <= 1'b0;
      if (busy) op_cycles <= op_cycles + 1'b1;
      unique case (st)
        PH_IDLE: if (start) begin
          base_q    <= base;
          d_q       <= exp_d;
          e_q       <= exp_e;
          n_q       <= modulus;
          r2_q      <= r2;
          blind_q   <= blind_en;
          busy      <= 1'b1;
          retries   <= '0;
          op_cycles <= '0;
          if (blind_en) begin
            rng_en   <= 1'b1;
            rng_wait <= 1'b1;
            st       <= PH_RNG;
          end else begin
            ex_base  <= base;
            ex_exp   <= exp_d;
            ex_start <= 1'b1;
            st       <= PH_EXP;
          end
        end
        PH_RNG: begin
          // The generator clears done on the edge after rng_en; skip that cycle.
          rng_wait <= 1'b0;
          if (!rng_wait && rng_done) begin
            rand_r    <= rng_out;
            inv_start <= 1'b1;
            st        <= PH_INV;
          end
        end
        PH_INV: if (inv_done) begin
          if (inv_coprime) begin
            rinv_q   <= inv_val;
            ex_base  <= r_w;
            ex_exp   <= e_q;
            ex_start <= 1'b1;
            st       <= PH_BLIND_EXP;
          end else begin
            retries  <= retries + 1'b1;
            rng_en   <= 1'b1;
            rng_wait <= 1'b1;
            st       <= PH_RNG;
          end
        end
        PH_BLIND_EXP: if (ex_done) begin     // r^e mod N
          mm_in1 <= base_q;
          mm_in2 <= ex_res;
          mm_en  <= 1'b1;
          st     <= PH_BLIND_MUL;
        end
        PH_BLIND_MUL: if (mm_done) begin     // base * r^e mod N
          ex_base  <= mm_res;
          ex_exp   <= d_q;
          ex_start <= 1'b1;
          st       <= PH_EXP;
        end
        PH_EXP: if (ex_done) begin           // base^d * r mod N (or base^d unblinded)
          if (blind_q) begin
            mm_in1 <= ex_res;
            mm_in2 <= rinv_q;
            mm_en  <= 1'b1;
            st     <= PH_UNBLIND;
          end else begin
            result <= ex_res;
            st     <= PH_DONE;
          end
        end
        PH_UNBLIND: if (mm_done) begin       // remove r
          result <= mm_res;
          st     <= PH_DONE;
        end
        PH_DONE: begin
          done <= 1'b1;
          busy <= 1'b0;
          st   <= PH_IDLE;
        end
        default: st <= PH_IDLE;
      endcase
    end
  end
endmodule
