// tb_barrel_rotl: every rotation amount of the 32-bit barrel shifter on
// random data, compared with a rotation written as two shifts.
module tb_barrel_rotl;
  logic [31:0] din, dout;
  logic [4:0]  amt;
  int checks = 0, failures = 0;

  barrel_rotl dut (.data_in(din), .amount(amt), .data_out(dout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      din = (i == 0) ? 32'h0000_0001 : $urandom;
      for (int s = 0; s < 32; s++) begin
        logic [31:0] expect_v;
        amt = 5'(s);
        #1;
        expect_v = (s == 0) ? din : ((din << s) | (din >> (32 - s)));
        checks++;
        if (dout !== expect_v) begin
          failures++;
          $display("FAIL din=%h amt=%0d got %h want %h", din, s, dout, expect_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
