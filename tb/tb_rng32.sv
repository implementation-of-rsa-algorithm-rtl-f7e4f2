// tb_rng32: checks the 32-bit random number generator against a reference
// model of its round written in the testbench, that every generation takes
// exactly 40 cycles whatever the seed, that done stays high until the next
// start, and that repeated requests with the same seed return new numbers.
// The seeds are those of the generator's published test table.
module tb_rng32;
  logic        clk = 1'b0, rst = 1'b1, enable = 1'b0, done;
  logic [31:0] iv, key, rout;
  int checks = 0, failures = 0;

  rng32 dut (.clk(clk), .rst(rst), .enable(enable), .initial_value(iv), .key(key),
             .rand_out(rout), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rotl(logic [31:0] x, int s);
    return (s == 0) ? x : ((x << s) | (x >> (32 - s)));
  endfunction

  function automatic logic [31:0] model(logic [31:0] i0, logic [31:0] k0, logic [31:0] prev);
    logic [31:0] s = i0 ^ prev, k = k0 ^ prev, t;
    for (int r = 0; r < 39; r++) begin
      t = rotl(s, int'(k[4:0]));
      s = (t ^ k) + s;
      k = k + (t ^ 32'h9E37_79B9);
    end
    return s ^ k;
  endfunction

  logic [31:0] seeds_iv  [11] = '{32'hEA, 32'h2654, 32'h1987, 32'h6DD61, 32'h48FFEAE, 32'hBC6146,
                                  32'h3C413, 32'h9C4800, 32'h8180209, 32'h48FA533, 32'h499602D};
  logic [31:0] seeds_key [11] = '{32'h51, 32'hB3, 32'h80, 32'h30, 32'h23BA, 32'h96B,
                                  32'hCF3, 32'h6400, 32'hECAA, 32'h5B38, 32'h49960};

  // Raise enable on a falling edge and count falling edges until done is
  // seen; done set by rising edge L after the start edge is seen on falling
  // edge L+1.
  task automatic generate_one(output int lat);
    int n = 0;
    @(negedge clk) enable = 1'b1;
    do begin
      @(negedge clk);
      enable = 1'b0;
      n++;
    end while (!done);
    lat = n - 1;
  endtask

  initial begin
    logic [31:0] prev, want;
    logic [31:0] seen [$];
    int lat;
    iv = '0; key = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    prev = '0;
    for (int i = 0; i < 11; i++) begin
      iv = seeds_iv[i]; key = seeds_key[i];
      for (int rep = 0; rep < 3; rep++) begin
        want = model(iv, key, prev);
        generate_one(lat);
        checks++;
        if (rout !== want) begin
          failures++;
          $display("FAIL value iv=%h key=%h got %h want %h", iv, key, rout, want);
        end
        checks++;
        if (lat != 40) begin
          failures++;
          $display("FAIL latency %0d cycles, want 40", lat);
        end
        checks++;
        if (rout == prev) begin
          failures++;
          $display("FAIL repeated number %h", rout);
        end
        repeat (5) @(posedge clk);
        checks++;
        if (!done || rout !== want) begin
          failures++;
          $display("FAIL done/out not held");
        end
        seen.push_back(rout);
        prev = rout;
      end
    end
    // all 33 numbers distinct
    foreach (seen[i]) for (int j = i + 1; j < seen.size(); j++) begin
      checks++;
      if (seen[i] == seen[j]) begin failures++; $display("FAIL duplicate %h", seen[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
