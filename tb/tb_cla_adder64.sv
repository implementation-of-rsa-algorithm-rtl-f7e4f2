// tb_cla_adder64: random and corner-case test of the 64-bit carry look-ahead
// adder. Sum and carry out are compared with integer addition; the group
// generate/propagate outputs with their definitions. Corner cases include the
// all-ones operand plus one, where the carry must run through every group.
module tb_cla_adder64;
  localparam int N = 64;
  logic [N-1:0] a, b, sum;
  logic         cin, cout, gg, gp;
  int checks = 0, failures = 0;

  cla_adder64 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .gg(gg), .gp(gp));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [N:0] ref_sum;
    #1;
    ref_sum = {1'b0, a} + {1'b0, b} + (N+1)'(cin);
    checks++;
    if ({cout, sum} !== ref_sum) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%b got %b_%h want %h", a, b, cin, cout, sum, ref_sum);
    end
    checks++;
    if (gg !== ref_gen(a, b) || gp !== ((a ^ b) == '1)) begin
      failures++;
      $display("FAIL gg/gp a=%h b=%h", a, b);
    end
  endtask

  function automatic logic ref_gen(logic [N-1:0] x, logic [N-1:0] y);
    logic [N:0] s = {1'b0, x} + {1'b0, y};
    return s[N];
  endfunction

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] v = '0;
    for (int i = 0; i < N; i += 32) v = (v << 32) | N'($urandom);
    return v;
  endfunction

  initial begin
    a = '1; b = '0; cin = 1'b1; check();
    a = '1; b = N'(1); cin = 1'b0; check();
    a = '1; b = '1; cin = 1'b1; check();
    a = '0; b = '0; cin = 1'b0; check();
    for (int i = 0; i < 3000; i++) begin
      a = rnd(); b = rnd(); cin = 1'($urandom);
      if (i % 4 == 0) b = ~a;   // long propagate chains
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
