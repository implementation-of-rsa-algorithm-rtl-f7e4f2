// tb_cla_adder_n: test of the n-bit cascaded carry look-ahead adder at its
// default 512 bits and at 70 bits (a width that is not a multiple of the
// 64-bit slice). Results are compared with integer addition on random
// operands and on carry chains through every slice.
module tb_cla_adder_n;
  localparam int N1 = 512;
  localparam int N2 = 70;
  logic [N1-1:0] a1, b1, s1;
  logic [N2-1:0] a2, b2, s2;
  logic          cin, c1, c2;
  int checks = 0, failures = 0;

  cla_adder_n            dut1 (.input1(a1), .input2(b1), .carry_in(cin), .output_sum(s1), .carry_out(c1));
  cla_adder_n #(.N(N2))  dut2 (.input1(a2), .input2(b2), .carry_in(cin), .output_sum(s2), .carry_out(c2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N1-1:0] rnd();
    logic [N1-1:0] v = '0;
    for (int i = 0; i < N1; i += 32) v = (v << 32) | N1'($urandom);
    return v;
  endfunction

  task automatic check();
    logic [N1:0] r1;
    logic [N2:0] r2;
    #1;
    r1 = {1'b0, a1} + {1'b0, b1} + (N1+1)'(cin);
    r2 = {1'b0, a2} + {1'b0, b2} + (N2+1)'(cin);
    checks++;
    if ({c1, s1} !== r1) begin
      failures++;
      $display("FAIL 512: a=%h b=%h cin=%b", a1, b1, cin);
    end
    checks++;
    if ({c2, s2} !== r2) begin
      failures++;
      $display("FAIL 70: a=%h b=%h cin=%b got %b_%h want %h", a2, b2, cin, c2, s2, r2);
    end
  endtask

  initial begin
    a1 = '1; b1 = '0; a2 = '1; b2 = '0; cin = 1'b1; check();
    a1 = '1; b1 = '1; a2 = '1; b2 = '1; cin = 1'b0; check();
    for (int i = 0; i < 2000; i++) begin
      a1 = rnd(); b1 = rnd(); cin = 1'($urandom);
      if (i % 4 == 0) b1 = ~a1;
      a2 = a1[N2-1:0]; b2 = b1[N2-1:0];
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
