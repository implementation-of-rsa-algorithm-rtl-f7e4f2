// tb_rsa_blinded_top: end-to-end test of the blinded RSA unit at a 64-bit key
// size. Two RSA keys are used: an ordinary one, and one whose modulus has the
// factor 3, so that about one random number in three is not invertible and
// has to be redrawn. Every operation's result is compared with base^d mod N
// computed in the testbench. Counted and required at least once each:
// blinded operations, unblinded (bypass) operations, redraws of the random
// number. Also checked: consecutive blinded operations use different random
// numbers, op_cycles equals the measured start-to-done time, and an
// unblinded operation takes exactly (3 + W + popcount(d)) * (W + 3) + 3 cycles.
module tb_rsa_blinded_top;
  localparam int W = 64;
  localparam logic [W-1:0] E = 64'd65537;
  localparam logic [W-1:0] N_K [2] = '{64'h846039af8ee4b6f1, 64'h81952da42b5ce2a9};
  localparam logic [W-1:0] D_K [2] = '{64'h13d4be8f60560801, 64'h22605aed547b9dbd};

  logic clk = 1'b0, rst = 1'b1, start = 1'b0, blind_en = 1'b0;
  logic [W-1:0] base, exp_d, exp_e, modulus, r2, result;
  logic [31:0]  rng_init, rng_key, rand_r, op_cycles;
  logic [15:0]  retries;
  logic         done, busy;
  int checks = 0, failures = 0;
  int n_blind = 0, n_plain = 0, n_redraw = 0;

  rsa_blinded_top #(.W(W)) dut (
    .clk(clk), .rst(rst), .start(start), .blind_en(blind_en), .base(base), .exp_d(exp_d),
    .exp_e(exp_e), .modulus(modulus), .r2(r2), .rng_init(rng_init), .rng_key(rng_key),
    .result(result), .done(done), .busy(busy), .rand_r(rand_r), .retries(retries),
    .op_cycles(op_cycles)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] powmod(logic [W-1:0] b, logic [W-1:0] e, logic [W-1:0] m);
    logic [2*W-1:0] acc = 1, x = 128'(b) % 128'(m), mm = 128'(m);
    for (int i = W - 1; i >= 0; i--) begin
      acc = (acc * acc) % mm;
      if (e[i]) acc = (acc * x) % mm;
    end
    return acc[W-1:0];
  endfunction

  task automatic run(int k, logic [W-1:0] b, logic blind);
    int n = 0;
    logic [3*W-1:0] r2w;
    logic [W-1:0] want;
    base = b; exp_d = D_K[k]; exp_e = E; modulus = N_K[k];
    r2w = (192'(1) << (2 * W)) % 192'(N_K[k]);
    r2 = r2w[W-1:0];
    blind_en = blind;
    @(negedge clk) start = 1'b1;
    do begin @(negedge clk); start = 1'b0; n++; end while (!done);
    want = powmod(b, D_K[k], N_K[k]);
    checks++;
    if (result !== want) begin
      failures++;
      $display("FAIL key%0d blind=%b base=%h got %h want %h", k, blind, b, result, want);
    end
    checks++;
    if (op_cycles != 32'(n - 1)) begin
      failures++;
      $display("FAIL op_cycles %0d measured %0d", op_cycles, n - 1);
    end
    if (blind) begin
      n_blind++;
      if (retries != 0) n_redraw++;
    end else begin
      n_plain++;
      checks++;
      if (n - 1 != (3 + W + $countones(D_K[k])) * (W + 3) + 3) begin
        failures++;
        $display("FAIL unblinded cycles %0d", n - 1);
      end
    end
  endtask

  initial begin
    logic [31:0] prev_r;
    base = '0; exp_d = '0; exp_e = '0; modulus = 64'd1; r2 = '0;
    rng_init = 32'h0000_00EA; rng_key = 32'h0000_0051;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    // base values of the published RSA timing tables
    run(0, 64'd251992, 1'b0);
    run(0, 64'd251992, 1'b1);
    prev_r = rand_r;
    run(0, 64'd161984, 1'b1);
    checks++;
    if (rand_r == prev_r) begin failures++; $display("FAIL same random number twice"); end
    run(0, 64'd236789, 1'b0);
    run(0, 64'd975310, 1'b1);
    run(0, 64'd194023, 1'b1);
    for (int i = 0; i < 12; i++) begin
      rng_init = $urandom; rng_key = $urandom;
      run(1, {$urandom, $urandom} % N_K[1], 1'b1);
    end
    run(1, 64'd12345, 1'b0);
    $display("blinded=%0d unblinded=%0d with_redraw=%0d", n_blind, n_plain, n_redraw);
    checks++;
    if (n_blind == 0 || n_plain == 0 || n_redraw == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
