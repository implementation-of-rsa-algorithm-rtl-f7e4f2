// tb_mod_mul: modular multiplier at its default 512 bits (with an RSA
// modulus) and at 64 bits (random odd moduli). result must equal
// in1 * in2 mod N, computed here with wide integer arithmetic, and arrive
// 2*(W+3) cycles after the enable edge for every operand.
module tb_mod_mul;
  localparam int W1 = 512;
  localparam int W2 = 64;
  localparam logic [W1-1:0] N512 =
    512'hd1fee1b1598a8b52831043684c971ef4ba302653983be8012ad537e514b600f729047ca323f64a42e0f01fa1f8aef1bdeed728c5b863383e3152364e522f1d97;

  logic clk = 1'b0, rst = 1'b1;
  logic en1 = 1'b0, en2 = 1'b0, d1, d2;
  logic [W1-1:0] a1, b1, n1, r2_1, p1;
  logic [W2-1:0] a2, b2, n2, r2_2, p2;
  int checks = 0, failures = 0;

  mod_mul           dut1 (.clk(clk), .rst(rst), .enable(en1), .in1(a1), .in2(b1), .modulus(n1),
                          .r2(r2_1), .result(p1), .done(d1));
  mod_mul #(.W(W2)) dut2 (.clk(clk), .rst(rst), .enable(en2), .in1(a2), .in2(b2), .modulus(n2),
                          .r2(r2_2), .result(p2), .done(d2));

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W1-1:0] rnd();
    logic [W1-1:0] v = '0;
    for (int i = 0; i < W1; i += 32) v = (v << 32) | W1'($urandom);
    return v;
  endfunction

  task automatic run512(logic [W1-1:0] a, logic [W1-1:0] b);
    int n = 0;
    logic [2*W1-1:0] want;
    a1 = a; b1 = b; n1 = N512;
    r2_1 = W1'(((2*W1+1)'(1) << (2*W1)) % (2*W1+1)'(N512));
    @(negedge clk) en1 = 1'b1;
    do begin @(negedge clk); en1 = 1'b0; n++; end while (!d1);
    want = ({{W1{1'b0}}, a} * {{W1{1'b0}}, b}) % {{W1{1'b0}}, N512};
    checks++;
    if (p1 !== want[W1-1:0]) begin failures++; $display("FAIL 512 a=%h b=%h", a, b); end
    checks++;
    if (n - 1 != 2 * (W1 + 3)) begin failures++; $display("FAIL 512 latency %0d", n - 1); end
  endtask

  task automatic run64(logic [W2-1:0] a, logic [W2-1:0] b, logic [W2-1:0] m);
    int n = 0;
    logic [3*W2-1:0] want, r2w;
    a2 = a; b2 = b; n2 = m;
    r2w = (192'(1) << (2 * W2)) % 192'(m);
    r2_2 = r2w[W2-1:0];
    @(negedge clk) en2 = 1'b1;
    do begin @(negedge clk); en2 = 1'b0; n++; end while (!d2);
    want = (192'(a) * 192'(b)) % 192'(m);
    checks++;
    if (p2 !== want[W2-1:0]) begin failures++; $display("FAIL 64 a=%h b=%h m=%h got %h want %h", a, b, m, p2, want[W2-1:0]); end
    checks++;
    if (n - 1 != 2 * (W2 + 3)) begin failures++; $display("FAIL 64 latency %0d", n - 1); end
  endtask

  initial begin
    a1 = '0; b1 = '0; n1 = N512; r2_1 = '0; a2 = '0; b2 = '0; n2 = 64'd1; r2_2 = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    run512(N512 - 1, N512 - 1);
    run512(W1'(1), W1'(12345));
    for (int i = 0; i < 8; i++) run512(rnd(), rnd() % N512);
    // operand pairs of the published multiplication table, modulo an RSA modulus
    run64(64'd135790, 64'd864203, 64'h846039af8ee4b6f1);
    run64(64'd2345678, 64'd456789, 64'h846039af8ee4b6f1);
    run64(64'd2468761, 64'd98791, 64'h846039af8ee4b6f1);
    run64(64'd147952, 64'd290541, 64'h846039af8ee4b6f1);
    run64(64'd246789, 64'd123678, 64'h846039af8ee4b6f1);
    for (int i = 0; i < 300; i++) begin
      logic [W2-1:0] m;
      m = {$urandom, $urandom} | 64'h1;
      if (i % 7 == 0) m = 64'(($urandom % 5000) * 2 + 3);
      run64({$urandom, $urandom}, {$urandom, $urandom} % m, m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
