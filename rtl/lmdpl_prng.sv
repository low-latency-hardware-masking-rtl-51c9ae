// lmdpl_prng: entropy engine feeding the mask-table generators.
//
// Gives OUT_W fresh bits per cycle while `en` is high. The document names a
// PRNG and its area but not its construction; this one is a bank of
// ceil(OUT_W/32) xorshift32 generators (x ^= x<<13; x ^= x>>17; x ^= x<<5),
// lane i seeded with word i%4 of `seed` XOR (i+1)*0x9E3779B9, a zero lane
// seed replaced by 1. It is a functional stand-in, not a vetted
// cryptographic generator. Timing: `seed_load` loads the state at the next
// edge; rnd is the registered state, so it changes one cycle after an edge
// with en = 1. Reset loads the all-zero seed.
module lmdpl_prng #(
  parameter int unsigned OUT_W = 720
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             seed_load,
  input  logic [127:0]     seed,
  input  logic             en,
  output logic [OUT_W-1:0] rnd
);
  localparam int unsigned LANES = (OUT_W + 31) / 32;

  logic [31:0] lane [LANES];

  function automatic logic [31:0] step(logic [31:0] x);
    x ^= x << 13;
    x ^= x >> 17;
    x ^= x << 5;
    return x;
  endfunction

  function automatic logic [31:0] lane_seed(logic [127:0] s, int unsigned i);
    logic [31:0] v;
    v = s[32*(i%4) +: 32] ^ (32'(i + 1) * 32'h9E37_79B9);
    return (v == '0) ? 32'h1 : v;
  endfunction

  always_ff @(posedge clk) begin
    for (int i = 0; i < LANES; i++) begin
      if (!rst_n)         lane[i] <= lane_seed('0, i);
      else if (seed_load) lane[i] <= lane_seed(seed, i);
      else if (en)        lane[i] <= step(lane[i]);
    end
  end

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      for (int b = 0; b < 32; b++) if (32*i + b < OUT_W) rnd[32*i + b] = lane[i][b];
    end
  end
endmodule
