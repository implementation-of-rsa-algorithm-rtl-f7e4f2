// mod_mul: modular multiplier, result = in1 * in2 mod N.
//
// Interface (clock, reset, enable, two inputs, result, done): a one-cycle
// pulse on enable starts a multiplication of in1 (any W-bit value) by in2
// (< modulus); r2 must hold 2^(2W) mod N. done pulses when result is valid,
// 2*(W+3) clock edges after the enable edge, independent of the operands.
//
// How it works: two passes through one Montgomery multiplier (mont_mul).
// The first gives p = in1*in2*2^-W mod N; the second multiplies p by
// 2^(2W) mod N, which cancels the 2^-W and leaves in1*in2 mod N. Like the
// Montgomery multiplier it never divides.
// The port list follows the design description's modular multiplication
// block; supplying the constant 2^(2W) mod N from outside, and the two-pass
// scheme, are this implementation's choices.
module mod_mul #(
  parameter int unsigned W = rsa_pkg::KEY_BITS
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         enable,
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  input  logic [W-1:0] modulus,
  input  logic [W-1:0] r2,
  output logic [W-1:0] result,
  output logic         done
);
  typedef enum logic [1:0] {MM_IDLE, MM_PASS1, MM_PASS2} mm_state_t;

  mm_state_t    st;
  logic         mm_start, mm_done;
  logic [W-1:0] mm_a, mm_b, mm_n, mm_res;

  mont_mul #(.W(W)) u_mont (
    .clk(clk), .rst(rst), .start(mm_start), .a(mm_a), .b(mm_b),
    .modulus(mm_n), .result(mm_res), .done(mm_done)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      st       <= MM_IDLE;
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
        MM_IDLE: if (enable) begin
          mm_a     <= in1;
          mm_b     <= in2;
          mm_n     <= modulus;
          mm_start <= 1'b1;
          st       <= MM_PASS1;
        end
        MM_PASS1: if (mm_done) begin
          mm_a     <= mm_res;
          mm_b     <= r2;
          mm_start <= 1'b1;
          st       <= MM_PASS2;
        end
        MM_PASS2: if (mm_done) begin
          result <= mm_res;
          done   <= 1'b1;
          st     <= MM_IDLE;
        end
        default: st <= MM_IDLE;
      endcase
    end
  end
endmodule
