// xoroshiro128p: xoroshiro128+ pseudo-random number generator.
//
// 128 bits of state in two 64-bit words s0 and s1. Each cycle with next=1
// the output s0 + s1 is produced and the state advances:
//   t  = s0 ^ s1
//   s0 = rotl(s0, 24) ^ t ^ (t << 16)
//   s1 = rotl(t, 37)
// (the 24/16/37 constants of the generator's published 2018 form).
// reseed loads s0 = seed[63:0], s1 = seed[127:64]; an all-zero seed, which
// would lock the generator at zero, is replaced by a fixed non-zero one.
// The output is registered: rnd is valid one cycle after reset or reseed and
// changes one cycle after each next.
//
// The choice of xoroshiro128+ for the L2 replacement policy follows the
// document; the reseed format and the rotation constants are this design's.
module xoroshiro128p #(
  parameter logic [127:0] DEFAULT_SEED = 128'h0123_4567_89ab_cdef_fedc_ba98_7654_3210
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         reseed,
  input  logic [127:0] seed,
  input  logic         next,
  output logic [63:0]  rnd
);
  logic [63:0] s0_q, s1_q, t;
  logic [127:0] seed_use;

  assign t        = s0_q ^ s1_q;
  assign seed_use = (seed == '0) ? DEFAULT_SEED : seed;
  assign rnd      = s0_q + s1_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s0_q <= DEFAULT_SEED[63:0];
      s1_q <= DEFAULT_SEED[127:64];
    end else if (reseed) begin
      s0_q <= seed_use[63:0];
      s1_q <= seed_use[127:64];
    end else if (next) begin
      s0_q <= {s0_q[39:0], s0_q[63:40]} ^ t ^ (t << 16);
      s1_q <= {t[26:0], t[63:27]};
    end
  end
endmodule
