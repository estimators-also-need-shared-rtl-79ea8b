// cedar_prob_inc: the CEDAR probabilistic increment decision.
//
// A flow whose pointer is i moves to i+1 with probability 1/D_i, where
// D_i = A_{i+1} - A_i is the gap between the two successive estimator values.
// Estimator values are stored as fixed-point numbers scaled by SCALE (1000 in
// the published FPGA design), so the probability is SCALE / (a_hi - a_lo).
//
// With a uniform 32-bit random number r, the test
//     r * (a_hi - a_lo) < SCALE * 2^32
// is true with probability min(1, SCALE / (a_hi - a_lo)) (up to the 2^-32
// granularity), with one multiplier and no divider. That test is this
// design's own choice; the document gives only the probability.
//
// `allow` is cleared when the pointer is already at the last estimator or
// the gap is not positive; `inc` is then 0. Purely combinational.
module cedar_prob_inc #(
  parameter int unsigned EST_W = 32,
  parameter int unsigned SCALE = 1000
) (
  input  logic [EST_W-1:0] a_lo,   // A_i
  input  logic [EST_W-1:0] a_hi,   // A_{i+1}
  input  logic [31:0]      rnd,    // uniform random number
  input  logic             allow,  // pointer below the last estimator
  output logic             inc     // move the pointer up
);

  localparam int unsigned PW = EST_W + 32;
  localparam logic [PW-1:0] LIMIT = PW'(SCALE) << 32;

  logic [EST_W-1:0] gap;
  logic [PW-1:0]    prod;

  always_comb begin
    gap  = a_hi - a_lo;
    prod = PW'(rnd) * PW'(gap);
    inc  = allow && (a_hi > a_lo) && (prod < LIMIT);
  end

endmodule
