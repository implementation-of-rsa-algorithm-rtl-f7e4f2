// tb_cla_adder4: exhaustive test of the 4-bit carry look-ahead cell.
// All 512 combinations of a, b and cin are applied; sum and cout are compared
// with integer addition, and the group generate/propagate outputs with their
// definitions (the cell generates a carry by itself / passes cin through).
module tb_cla_adder4;
  logic [3:0] a, b, sum;
  logic       cin, cout, gg, gp;
  int checks = 0, failures = 0;

  cla_adder4 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout), .gg(gg), .gp(gp));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      logic [4:0] ref_sum;
      {cin, a, b} = 9'(i);
      #1;
      ref_sum = {1'b0, a} + {1'b0, b} + {4'b0, cin};
      checks++;
      if ({cout, sum} !== ref_sum) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b got %b_%h want %h", a, b, cin, cout, sum, ref_sum);
      end
      checks++;
      if (gg !== (({1'b0, a} + {1'b0, b}) > 5'd15) || gp !== ((a ^ b) == 4'hF)) begin
        failures++;
        $display("FAIL gg/gp a=%h b=%h gg=%b gp=%b", a, b, gg, gp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
