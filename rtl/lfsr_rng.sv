// lfsr_rng: free-running pseudo-random number source for the mapper.
//
// A 16-bit Galois linear feedback shift register with the maximal-length
// polynomial x^16 + x^14 + x^13 + x^11 + 1 (feedback mask 16'hB400), period
// 65535. It runs on every clock whether or not a number is used, so the value
// a decision sees depends on when the event arrived. Because consecutive
// states of a shift register are shifted copies of each other, the register
// is advanced STEPS times per clock (a leap-forward unrolled in
// combinational logic) and the low RND_W bits of the new state are the
// random number: with STEPS >= RND_W two numbers read in consecutive clocks
// share no bits. A free-running LFSR is what the mapper is specified with;
// the width, polynomial, seed and leap-forward are this design's choices.
//
// Interface: rnd is registered and changes every clock; state is the full
// register, brought out for testing. Reset loads SEED (must be nonzero).
module lfsr_rng #(
  parameter int unsigned  LFSR_W = 16,
  parameter logic [15:0]  POLY   = 16'hB400,
  parameter logic [15:0]  SEED   = 16'hACE1,
  parameter int unsigned  RND_W  = aer_pkg::RND_W,
  parameter int unsigned  STEPS  = RND_W
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [RND_W-1:0]  rnd,
  output logic [LFSR_W-1:0] state
);

  logic [LFSR_W-1:0] next;

  always_comb begin
    next = state;
    for (int i = 0; i < int'(STEPS); i++) begin
      next = next[0] ? ((next >> 1) ^ POLY[LFSR_W-1:0]) : (next >> 1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= SEED[LFSR_W-1:0];
    else        state <= next;
  end

  assign rnd = state[RND_W-1:0];

  a_never_zero: assert property (@(posedge clk) disable iff (!rst_n) state != '0);

endmodule
