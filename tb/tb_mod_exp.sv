// tb_mod_exp: modular exponentiation at 64 bits (random odd moduli, random
// and edge-case exponents) and once at the default 512 bits with an RSA
// private exponent. Results are compared with square-and-multiply written in
// the testbench with wide integer arithmetic; the run time must be
// (3 + EW + popcount(exponent)) * (W + 3) cycles.
module tb_mod_exp;
  localparam int W1 = 512;
  localparam int W2 = 64;
  localparam logic [W1-1:0] N512 =
    512'hd1fee1b1598a8b52831043684c971ef4ba302653983be8012ad537e514b600f729047ca323f64a42e0f01fa1f8aef1bdeed728c5b863383e3152364e522f1d97;
  localparam logic [W1-1:0] D512 =
    512'h7e1969f98f654c883dbfb45a9b335c1964fca8e725d1435e00148d3df893da3b79d61bfd17278cb85bebdf833460b4b1f24116eb26d516f2845d696312054901;

  logic clk = 1'b0, rst = 1'b1;
  logic s1 = 1'b0, s2 = 1'b0, d1, d2;
  logic [W1-1:0] b1, e1, n1, r2_1, p1;
  logic [W2-1:0] b2, e2, n2, r2_2, p2;
  int checks = 0, failures = 0;

  mod_exp           dut1 (.clk(clk), .rst(rst), .start(s1), .base(b1), .exponent(e1), .modulus(n1),
                          .r2(r2_1), .result(p1), .done(d1));
  mod_exp #(.W(W2)) dut2 (.clk(clk), .rst(rst), .start(s2), .base(b2), .exponent(e2), .modulus(n2),
                          .r2(r2_2), .result(p2), .done(d2));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W1-1:0] powmod512(logic [W1-1:0] b, logic [W1-1:0] e, logic [W1-1:0] m);
    logic [2*W1-1:0] acc = 1, x = {{W1{1'b0}}, b} % {{W1{1'b0}}, m}, mm = {{W1{1'b0}}, m};
    for (int i = W1 - 1; i >= 0; i--) begin
      acc = (acc * acc) % mm;
      if (e[i]) acc = (acc * x) % mm;
    end
    return acc[W1-1:0];
  endfunction

  function automatic logic [W2-1:0] powmod64(logic [W2-1:0] b, logic [W2-1:0] e, logic [W2-1:0] m);
    logic [2*W2-1:0] acc = 1, x = 128'(b) % 128'(m), mm = 128'(m);
    for (int i = W2 - 1; i >= 0; i--) begin
      acc = (acc * acc) % mm;
      if (e[i]) acc = (acc * x) % mm;
    end
    return acc[W2-1:0];
  endfunction

  task automatic run64(logic [W2-1:0] b, logic [W2-1:0] e, logic [W2-1:0] m);
    int n = 0;
    logic [3*W2-1:0] r2w;
    b2 = b; e2 = e; n2 = m;
    r2w = (192'(1) << (2 * W2)) % 192'(m);
    r2_2 = r2w[W2-1:0];
    @(negedge clk) s2 = 1'b1;
    do begin @(negedge clk); s2 = 1'b0; n++; end while (!d2);
    checks++;
    if (p2 !== powmod64(b, e, m)) begin
      failures++;
      $display("FAIL 64 b=%h e=%h m=%h got %h want %h", b, e, m, p2, powmod64(b, e, m));
    end
    checks++;
    if (n - 1 != (3 + W2 + $countones(e)) * (W2 + 3)) begin
      failures++;
      $display("FAIL 64 cycles %0d", n - 1);
    end
  endtask

  initial begin
    int n = 0;
    b1 = '0; e1 = '0; n1 = N512; r2_1 = '0; b2 = '0; e2 = '0; n2 = 64'd1; r2_2 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    run64(64'd12345, 64'd0, 64'h846039af8ee4b6f1);
    run64(64'd12345, 64'd1, 64'h846039af8ee4b6f1);
    run64(64'd0, 64'd7, 64'h846039af8ee4b6f1);
    run64('1, '1, 64'h846039af8ee4b6f1);
    // base / exponent pairs of the published RSA timing table, 64-bit RSA modulus
    run64(64'd161984, 64'd161998, 64'h846039af8ee4b6f1);
    run64(64'd236789, 64'd456721, 64'h846039af8ee4b6f1);
    run64(64'd975310, 64'd864209, 64'h846039af8ee4b6f1);
    run64(64'd194023, 64'd196507, 64'h846039af8ee4b6f1);
    run64(64'd251992, 64'd201999, 64'h846039af8ee4b6f1);
    for (int i = 0; i < 40; i++) begin
      logic [W2-1:0] m;
      m = {$urandom, $urandom} | 64'h1;
      if (i % 5 == 0) m = 64'(($urandom % 5000) * 2 + 3);
      run64({$urandom, $urandom}, {$urandom, $urandom}, m);
    end
    // one full-width exponentiation with a 512-bit RSA private exponent
    b1 = W1'(251992); e1 = D512; n1 = N512;
    r2_1 = W1'(((2*W1+1)'(1) << (2*W1)) % (2*W1+1)'(N512));
    @(negedge clk) s1 = 1'b1;
    do begin @(negedge clk); s1 = 1'b0; n++; end while (!d1);
    checks++;
    if (p1 !== powmod512(b1, D512, N512)) begin failures++; $display("FAIL 512"); end
    checks++;
    if (n - 1 != (3 + W1 + $countones(D512)) * (W1 + 3)) begin failures++; $display("FAIL 512 cycles %0d", n - 1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
