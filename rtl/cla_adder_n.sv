// cla_adder_n: N-bit adder ("Adder n-bits"), 512 bits by default.
//
// Ports: input1, input2 (N bits), carry_in; output_sum (N bits), carry_out.
// The operands are cut into 64-bit slices, each added by a 64-bit carry
// look-ahead adder, and the slices are cascaded: the carry out of one slice is
// the carry in of the next. A width that is not a multiple of 64 is padded
// with zeros in the top slice, and the carry out is taken at bit N of that
// slice. Purely combinational.
// The port set and the cascade of 64-bit CLAs follow the design description;
// the padding rule for other widths is this implementation's own.
module cla_adder_n #(
  parameter int unsigned N = 512
) (
  input  logic [N-1:0] input1,
  input  logic [N-1:0] input2,
  input  logic         carry_in,
  output logic [N-1:0] output_sum,
  output logic         carry_out
);
  localparam int unsigned NS = (N + 63) / 64;  // number of 64-bit slices
  localparam int unsigned NP = NS * 64;        // padded width

  logic [NP-1:0] a_p, b_p, s_p;
  logic [NS:0]   c;
  logic [NS-1:0] unused_gg, unused_gp;

  assign a_p  = NP'(input1);
  assign b_p  = NP'(input2);
  assign c[0] = carry_in;

  for (genvar i = 0; i < NS; i++) begin : g_slice
    cla_adder64 u_slice (
      .a(a_p[64*i +: 64]), .b(b_p[64*i +: 64]), .cin(c[i]),
      .sum(s_p[64*i +: 64]), .cout(c[i+1]), .gg(unused_gg[i]), .gp(unused_gp[i])
    );
  end

  assign output_sum = s_p[N-1:0];
  if (NP == N) begin : g_exact
    assign carry_out = c[NS];
  end else begin : g_padded
    // Padding bits are zero, so bit N of the padded sum is the carry out of bit N-1.
    assign carry_out = s_p[N];
  end
endmodule
