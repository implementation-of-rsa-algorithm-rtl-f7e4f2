// rng32: 32-bit pseudo random number generator for RSA blinding.
//
// Interface: initial_value and key seed the generator; a rising edge on
// enable starts one generation; rand_out holds the result and done (data
// ready) is high from the moment it is valid until the next start.
// Timing: done rises exactly CYCLES (40) clock edges after the edge that saw
// enable rise, whatever the seed, so drawing a number has a fixed duration.
//
// How it works: at the start the state s and key register k are loaded from
// initial_value and key, both XORed with the previous output, so that every
// request returns a new number even with unchanged seeds. Each following
// cycle performs one round
//     t  = rotl(s, k[4:0])             (barrel shifter)
//     s' = (t ^ k) + s
//     k' = k + (t ^ 32'h9E37_79B9)
// and the last cycle registers rand_out = s ^ k.
// The design description gives the interface (initial value, key, clock,
// reset, enable, 32-bit output, done), the 32-bit width, the 40-cycle
// generation time and that a barrel shifter is the generator's core; it does
// not give the mixing function. The round above (one barrel shifter, two
// 32-bit adders, three XORs of 32 bits) is this implementation's own choice,
// sized to match the adder and XOR counts reported for the original; its
// outputs therefore differ from the original's.
module rng32 #(
  parameter int unsigned CYCLES = rsa_pkg::RNG_CYCLES
) (
  input  logic        clk,
  input  logic        rst,            // synchronous, active high
  input  logic        enable,         // rising edge starts a generation
  input  logic [31:0] initial_value,
  input  logic [31:0] key,
  output logic [31:0] rand_out,
  output logic        done
);
  localparam logic [31:0] MIX = 32'h9E37_79B9;
  localparam int unsigned CW  = $clog2(CYCLES);

  logic [31:0]   s, k, t;
  logic [CW-1:0] cnt;
  logic          busy, enable_q, start;

  barrel_rotl #(.W(32)) u_rot (.data_in(s), .amount(k[4:0]), .data_out(t));

  assign start = enable & ~enable_q & ~busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      s        <= '0;
      k        <= '0;
      cnt      <= '0;
      busy     <= 1'b0;
      enable_q <= 1'b0;
      rand_out <= '0;
      done     <= 1'b0;
    end else begin
      enable_q <= enable;
      if (start) begin
        s    <= initial_value ^ rand_out;
        k    <= key ^ rand_out;
        cnt  <= '0;
        busy <= 1'b1;
        done <= 1'b0;
      end else if (busy) begin
        if (cnt == CW'(CYCLES - 1)) begin
          rand_out <= s ^ k;
          done     <= 1'b1;
          busy     <= 1'b0;
        end else begin
          s   <= (t ^ k) + s;
          k   <= k + (t ^ MIX);
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
