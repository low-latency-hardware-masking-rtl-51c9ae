// tb_lmdpl_prng: compares lmdpl_prng cycle by cycle with a model of its
// xorshift32 lanes written here: reset state, seed loading, stepping only
// while en is high, and the output bit order. Also checks that no lane is
// stuck at zero and that two lanes never give the same word.
module tb_lmdpl_prng;
  localparam int unsigned W = 720;
  localparam int unsigned L = (W + 31) / 32;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic           rst_n, seed_load, en;
  logic [127:0]   seed;
  logic [W-1:0]   rnd;

  lmdpl_prng u_dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] mdl [L];

  function automatic logic [31:0] xs(logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  function automatic logic [31:0] sd(logic [127:0] s, int i);
    logic [31:0] v;
    v = s[32*(i%4) +: 32] ^ (32'(i + 1) * 32'h9E3779B9);
    return v == 0 ? 32'd1 : v;
  endfunction

  task automatic compare(int c);
    logic [L*32-1:0] flat;
    for (int i = 0; i < L; i++) flat[32*i +: 32] = mdl[i];
    checks++;
    if (rnd != flat[W-1:0]) begin
      failures++;
      $display("cycle %0d: output differs from model", c);
    end
    for (int i = 0; i < L; i++) begin
      if (32*i + 32 > W) continue;
      checks++;
      if (rnd[32*i +: 32] == 0) begin failures++; $display("lane %0d is zero", i); end
      if (i > 0 && rnd[32*i +: 32] == rnd[32*(i-1) +: 32]) begin
        failures++;
        $display("lanes %0d and %0d equal", i - 1, i);
      end
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; seed_load = 1'b0; en = 1'b0; seed = '0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < L; i++) mdl[i] = sd('0, i);
    compare(0);
    for (int c = 1; c < 200; c++) begin
      en = ($urandom() % 4) != 0;
      seed_load = (c % 50) == 25;
      seed = {$urandom(), $urandom(), $urandom(), $urandom()};
      if (c == 75) seed = 128'h9E3779B9_9E3779B9_9E3779B9_9E3779B9 ^ 128'h0000_0000_0000_0000_0000_0000_0000_0000;
      @(negedge clk);
      for (int i = 0; i < L; i++) begin
        if (seed_load) mdl[i] = sd(seed, i);
        else if (en)   mdl[i] = xs(mdl[i]);
      end
      compare(c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
