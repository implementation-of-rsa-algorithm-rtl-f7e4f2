// tb_wallace_reduce: the Wallace tree must keep the sum of its operands:
// sum_vec + carry_vec == sum of all operands (mod 2^W). Checked for 4
// operands (as used by the Montgomery multiplier), 7 operands (three layers,
// with operands passed through) and 2 operands (no layer).
module tb_wallace_reduce;
  logic [15:0] o4 [4];
  logic [19:0] o7 [7];
  logic [7:0]  o2 [2];
  logic [15:0] s4, c4;
  logic [19:0] s7, c7;
  logic [7:0]  s2, c2;
  int checks = 0, failures = 0;

  wallace_reduce                   dut4 (.ops(o4), .sum_vec(s4), .carry_vec(c4));
  wallace_reduce #(.W(20), .M(7))  dut7 (.ops(o7), .sum_vec(s7), .carry_vec(c7));
  wallace_reduce #(.W(8),  .M(2))  dut2 (.ops(o2), .sum_vec(s2), .carry_vec(c2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [15:0] r4;
      logic [19:0] r7;
      logic [7:0]  r2;
      r4 = '0; r7 = '0; r2 = '0;
      foreach (o4[j]) begin o4[j] = (i < 4) ? '1 : 16'($urandom); r4 += o4[j]; end
      foreach (o7[j]) begin o7[j] = (i < 4) ? '1 : 20'($urandom); r7 += o7[j]; end
      foreach (o2[j]) begin o2[j] = 8'($urandom); r2 += o2[j]; end
      #1;
      checks++;
      if (16'(s4 + c4) !== r4) begin failures++; $display("FAIL M=4 got %h want %h", 16'(s4 + c4), r4); end
      checks++;
      if (20'(s7 + c7) !== r7) begin failures++; $display("FAIL M=7 got %h want %h", 20'(s7 + c7), r7); end
      checks++;
      if (8'(s2 + c2) !== r2) begin failures++; $display("FAIL M=2"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
