// tb_mont_mul: Montgomery multiplier at its default 512 bits and at 64 bits.
// A result p is correct when p < N and p * 2^W mod N == a * b mod N, which
// the testbench checks with its own wide arithmetic. Operands include 0, 1,
// N-1 and random values; the latency must be W+1 cycles for every operand.
module tb_mont_mul;
  localparam int W1 = 512;
  localparam int W2 = 64;
  localparam logic [W1-1:0] N512 =
    512'hd1fee1b1598a8b52831043684c971ef4ba302653983be8012ad537e514b600f729047ca323f64a42e0f01fa1f8aef1bdeed728c5b863383e3152364e522f1d97;

  logic clk = 1'b0, rst = 1'b1;
  logic st1 = 1'b0, st2 = 1'b0, d1, d2;
  logic [W1-1:0] a1, b1, n1, p1;
  logic [W2-1:0] a2, b2, n2, p2;
  int checks = 0, failures = 0;

  mont_mul            dut1 (.clk(clk), .rst(rst), .start(st1), .a(a1), .b(b1), .modulus(n1), .result(p1), .done(d1));
  mont_mul #(.W(W2))  dut2 (.clk(clk), .rst(rst), .start(st2), .a(a2), .b(b2), .modulus(n2), .result(p2), .done(d2));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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
    int t0;
    logic [2*W1-1:0] lhs, rhs;
    a1 = a; b1 = b; n1 = N512;
    @(negedge clk) st1 = 1'b1;
    t0 = 0;
    do begin
      @(negedge clk);
      st1 = 1'b0;
      t0++;
    end while (!d1);
    lhs = ({{W1{1'b0}}, p1} << W1) % {{W1{1'b0}}, N512};
    rhs = ({{W1{1'b0}}, a} * {{W1{1'b0}}, b}) % {{W1{1'b0}}, N512};
    checks++;
    if (lhs !== rhs || p1 >= N512) begin
      failures++;
      $display("FAIL 512 a=%h b=%h p=%h", a, b, p1);
    end
    checks++;
    if (t0 - 1 != W1 + 1) begin failures++; $display("FAIL 512 latency %0d", t0 - 1); end
  endtask

  task automatic run64(logic [W2-1:0] a, logic [W2-1:0] b, logic [W2-1:0] n);
    int t0;
    logic [2*W2-1:0] lhs, rhs;
    a2 = a; b2 = b; n2 = n;
    @(negedge clk) st2 = 1'b1;
    t0 = 0;
    do begin
      @(negedge clk);
      st2 = 1'b0;
      t0++;
    end while (!d2);
    lhs = ({{W2{1'b0}}, p2} << W2) % {{W2{1'b0}}, n};
    rhs = ({{W2{1'b0}}, a} * {{W2{1'b0}}, b}) % {{W2{1'b0}}, n};
    checks++;
    if (lhs !== rhs || p2 >= n) begin
      failures++;
      $display("FAIL 64 a=%h b=%h n=%h p=%h", a, b, n, p2);
    end
    checks++;
    if (t0 - 1 != W2 + 1) begin failures++; $display("FAIL 64 latency %0d", t0 - 1); end
  endtask

  initial begin
    a1 = '0; b1 = '0; n1 = N512; a2 = '0; b2 = '0; n2 = 64'd1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    run512('0, N512 - 1);
    run512(W1'(1), W1'(1));
    run512(N512 - 1, N512 - 1);
    run512('1, N512 - 1);
    for (int i = 0; i < 12; i++) run512(rnd() % N512, rnd() % N512);
    for (int i = 0; i < 400; i++) begin
      logic [W2-1:0] n;
      n = {$urandom, $urandom} | 64'h1;
      if (i % 5 == 0) n = n | 64'h8000_0000_0000_0000;
      if (i % 7 == 0) n = 64'(($urandom % 1000) * 2 + 3);
      if (i % 11 == 0) run64('1, n - 1, n);
      else run64({$urandom, $urandom}, {$urandom, $urandom} % n, n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
