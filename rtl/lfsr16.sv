// lfsr16: 16-bit maximal-length Galois LFSR used as the uniform random
// source of the randomized weighted voter.
//
// Feedback polynomial x^16 + x^14 + x^13 + x^11 + 1 (mask 16'hB400), period
// 2^16-1. The state loads SEED on reset (SEED must be non-zero) and advances
// one step on every clock edge with step high. rnd is the current state, so a
// value is available combinationally in the cycle it is consumed. The random
// generator itself is this design's choice; the scheme only asks for a
// uniform random selection.
module lfsr16 #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        step,
  output logic [15:0] rnd
);

  logic [15:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (step) state <= state[0] ? ((state >> 1) ^ 16'hB400) : (state >> 1);
  end

  assign rnd = state;

endmodule
