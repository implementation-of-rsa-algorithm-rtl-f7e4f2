// tb_mod_inverse: extended Euclid unit at 64 bits (random operands, small
// moduli, a >= m, a = 0 and a = 1) and at the default 512 bits with 32-bit
// random numbers against an RSA modulus, as in the blinding. The gcd is
// compared with Euclid's algorithm written in the testbench; when it is 1 the
// inverse must be below m and satisfy a * inverse mod m == 1.
module tb_mod_inverse;
  localparam int W1 = 512;
  localparam int W2 = 64;
  localparam logic [W1-1:0] N512 =
    512'hd1fee1b1598a8b52831043684c971ef4ba302653983be8012ad537e514b600f729047ca323f64a42e0f01fa1f8aef1bdeed728c5b863383e3152364e522f1d97;

  logic clk = 1'b0, rst = 1'b1;
  logic s1 = 1'b0, s2 = 1'b0, d1, d2, c1, c2;
  logic [W1-1:0] a1, m1, g1, i1;
  logic [W2-1:0] a2, m2, g2, i2;
  int checks = 0, failures = 0, n_coprime = 0, n_not = 0;

  mod_inverse           dut1 (.clk(clk), .rst(rst), .start(s1), .a(a1), .m(m1), .gcd(g1),
                              .inverse(i1), .coprime(c1), .done(d1));
  mod_inverse #(.W(W2)) dut2 (.clk(clk), .rst(rst), .start(s2), .a(a2), .m(m2), .gcd(g2),
                              .inverse(i2), .coprime(c2), .done(d2));

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W2-1:0] gcd64(logic [W2-1:0] x, logic [W2-1:0] y);
    while (y != 0) begin
      logic [W2-1:0] t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

  task automatic run64(logic [W2-1:0] a, logic [W2-1:0] m);
    logic [W2-1:0] g;
    logic [2*W2-1:0] pr;
    a2 = a; m2 = m;
    @(negedge clk) s2 = 1'b1;
    do begin @(negedge clk); s2 = 1'b0; end while (!d2);
    g = gcd64(m, a);
    checks++;
    if (g2 !== g || c2 !== (g == 1)) begin
      failures++;
      $display("FAIL 64 gcd a=%h m=%h got %h want %h", a, m, g2, g);
    end
    if (g == 1) begin
      n_coprime++;
      pr = (128'(a) * 128'(i2)) % 128'(m);
      checks++;
      if (i2 >= m || (m != 1 && pr != 1)) begin
        failures++;
        $display("FAIL 64 inverse a=%h m=%h inv=%h", a, m, i2);
      end
    end else n_not++;
  endtask

  initial begin
    a1 = '0; m1 = N512; a2 = '0; m2 = 64'd1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    run64(64'd0, 64'h846039af8ee4b6f1);
    run64(64'd1, 64'h846039af8ee4b6f1);
    run64(64'hF8EDBAAD, 64'h846039af8ee4b6f1);
    run64(64'hFFFF_FFFF_FFFF_FFFF, 64'h846039af8ee4b6f1);   // a >= m
    run64(64'd3, 64'h81952da42b5ce2a9);                     // shares the factor 3
    run64(64'd6, 64'd9);
    for (int i = 0; i < 400; i++) begin
      logic [W2-1:0] m;
      m = {$urandom, $urandom};
      if (i % 3 == 0) m = 64'($urandom % 1000 + 2);
      if (m == 0) m = 64'd7;
      run64((i % 2) ? {$urandom, $urandom} : 64'($urandom), m);
    end
    for (int i = 0; i < 6; i++) begin
      logic [2*W1-1:0] pr;
      a1 = W1'($urandom);
      m1 = N512;
      @(negedge clk) s1 = 1'b1;
      do begin @(negedge clk); s1 = 1'b0; end while (!d1);
      pr = ({{W1{1'b0}}, a1} * {{W1{1'b0}}, i1}) % {{W1{1'b0}}, N512};
      checks++;
      if (!c1 || g1 != 1 || i1 >= N512 || pr != 1) begin
        failures++;
        $display("FAIL 512 a=%h", a1);
      end
    end
    checks++;
    if (n_coprime == 0 || n_not == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
