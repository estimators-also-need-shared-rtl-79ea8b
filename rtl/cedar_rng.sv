// cedar_rng: 32-bit pseudo-random source for the CEDAR probabilistic update.
//
// The algorithm needs one fresh uniform random number per packet to decide
// whether the flow pointer moves up. The published design does not say how
// its random numbers are made; this block uses a xorshift32 generator
// (x ^= x<<13; x ^= x>>17; x ^= x<<5), which is cheap in logic and has
// period 2^32-1 over the non-zero states.
//
// Interface: `value` is the current 32-bit number; it advances to the next
// one on a clock edge where `next` is high. Reset loads SEED (a zero seed
// would lock the generator, so it is replaced by 1).
module cedar_rng #(
  parameter logic [31:0] SEED = 32'h2545_F491
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        next,
  output logic [31:0] value
);

  logic [31:0] state_q;
  logic [31:0] s1, s2, s3;

  always_comb begin
    s1 = state_q ^ (state_q << 13);
    s2 = s1 ^ (s1 >> 17);
    s3 = s2 ^ (s2 << 5);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state_q <= (SEED == 32'd0) ? 32'd1 : SEED;
    else if (next) state_q <= s3;
  end

  assign value = state_q;

endmodule
