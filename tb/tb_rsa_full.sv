// tb_rsa_full: the blinded RSA unit at its default 512-bit key size, with a
// 512-bit RSA key (public exponent 65537). One blinded private-key operation
// and one unblinded operation on the same base; both results are compared
// with base^d mod N computed in the testbench, and the blinded run must take
// longer than the unblinded one by the work of blinding.
module tb_rsa_full;
  localparam int W = 512;
  localparam logic [W-1:0] N =
    512'hd1fee1b1598a8b52831043684c971ef4ba302653983be8012ad537e514b600f729047ca323f64a42e0f01fa1f8aef1bdeed728c5b863383e3152364e522f1d97;
  localparam logic [W-1:0] D =
    512'h7e1969f98f654c883dbfb45a9b335c1964fca8e725d1435e00148d3df893da3b79d61bfd17278cb85bebdf833460b4b1f24116eb26d516f2845d696312054901;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0, blind_en = 1'b0;
  logic [W-1:0] base, exp_d, exp_e, modulus, r2, result;
  logic [31:0]  rng_init, rng_key, rand_r, op_cycles;
  logic [15:0]  retries;
  logic         done, busy;
  int checks = 0, failures = 0;

  rsa_blinded_top dut (
    .clk(clk), .rst(rst), .start(start), .blind_en(blind_en), .base(base), .exp_d(exp_d),
    .exp_e(exp_e), .modulus(modulus), .r2(r2), .rng_init(rng_init), .rng_key(rng_key),
    .result(result), .done(done), .busy(busy), .rand_r(rand_r), .retries(retries),
    .op_cycles(op_cycles)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] powmod(logic [W-1:0] b, logic [W-1:0] e, logic [W-1:0] m);
    logic [2*W-1:0] acc = 1, x = (2*W)'(b) % (2*W)'(m), mm = (2*W)'(m);
    for (int i = W - 1; i >= 0; i--) begin
      acc = (acc * acc) % mm;
      if (e[i]) acc = (acc * x) % mm;
    end
    return acc[W-1:0];
  endfunction

  task automatic run(logic blind, output int cycles);
    int n = 0;
    blind_en = blind;
    @(negedge clk) start = 1'b1;
    do begin @(negedge clk); start = 1'b0; n++; end while (!done);
    cycles = n - 1;
  endtask

  initial begin
    logic [W-1:0] want;
    int c_blind, c_plain;
    base = W'(251992); exp_d = D; exp_e = W'(65537); modulus = N;
    r2 = W'(((2*W+1)'(1) << (2*W)) % (2*W+1)'(N));
    rng_init = 32'h0000_00EA; rng_key = 32'h0000_0051;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    want = powmod(base, D, N);
    run(1'b1, c_blind);
    checks++;
    if (result !== want) begin failures++; $display("FAIL blinded result"); end
    checks++;
    if (rand_r == 0 || op_cycles != 32'(c_blind)) begin failures++; $display("FAIL blinded status"); end
    run(1'b0, c_plain);
    checks++;
    if (result !== want) begin failures++; $display("FAIL unblinded result"); end
    checks++;
    if (c_blind <= c_plain) begin failures++; $display("FAIL cycle counts"); end
    $display("blinded %0d cycles, unblinded %0d cycles, r=%h", c_blind, c_plain, rand_r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
