// rand_voter_bit: randomized weighted voting circuit for one output bit.
//
// Each of the three IP cores delivers the same bit x[i]; the circuit keeps one
// trust weight per core, all 1 after reset. When vote_en is high:
//   * one core is picked at random with probability w[i]/W, W = sum of the
//     weights, and its bit becomes the voted output y;
//   * every core whose bit equals y gains 1 (saturating at 2^WEIGHT_W-1);
//   * every core whose bit differs has its weight shifted right by one;
//   * the new weights are used by the next vote.
// The random pick scales a 16-bit LFSR value r to the range [0, W) as
// (r*W) >> 16 and compares it with the running sums of the weights. The core
// that was picked always agrees with y, so its weight grows and W never
// becomes 0.
//
// Timing: y, sel, mismatch and the selection probability p0_num/p0_den are
// combinational from x and the current weights, valid in the cycle vote_en is
// high; the weights and the LFSR update on that cycle's rising clock edge.
// mismatch[i] flags that core i disagreed with the voted bit: the run-time
// Trojan alarm.
//
// The algorithm (initial weights 1, pick with probability w/W, increase on
// agreement, right shift on disagreement) follows the published randomized
// weighted voting; the increment of 1, the saturation, the weight width and
// the LFSR are this design's choices.
module rand_voter_bit
  import slp_pkg::*;
#(
  parameter int unsigned W_W  = WEIGHT_W,
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      vote_en,
  input  logic [N_IP-1:0]           x,
  output logic                      y,
  output logic [1:0]                sel,
  output logic [N_IP-1:0]           mismatch,
  output logic [N_IP-1:0][W_W-1:0]  weight,
  output logic [W_W-1:0]            p0_num,
  output logic [W_W+1:0]            p0_den
);

  localparam logic [W_W-1:0] W_MAX = '1;

  logic [N_IP-1:0][W_W-1:0] w_q, w_d;
  logic [RAND_W-1:0]        rnd;
  logic [W_W+1:0]           w_sum;
  logic [W_W+1:0]           pick;
  logic [RAND_W+W_W+1:0]    prod;

  lfsr16 #(.SEED(SEED)) u_rng (.clk(clk), .rst_n(rst_n), .step(vote_en), .rnd(rnd));

  always_comb begin
    w_sum = '0;
    for (int i = 0; i < N_IP; i++) w_sum += (W_W+2)'(w_q[i]);
    prod = (RAND_W+W_W+2)'(rnd) * (RAND_W+W_W+2)'(w_sum);
    pick = prod[RAND_W +: W_W+2];           // uniform in [0, w_sum)

    if (pick < (W_W+2)'(w_q[0]))                           sel = 2'd0;
    else if (pick < (W_W+2)'(w_q[0]) + (W_W+2)'(w_q[1]))   sel = 2'd1;
    else                                                   sel = 2'd2;

    y      = x[sel];
    p0_num = w_q[sel];
    p0_den = w_sum;

    for (int i = 0; i < N_IP; i++) begin
      mismatch[i] = (x[i] != y);
      if (mismatch[i])         w_d[i] = w_q[i] >> 1;
      else if (w_q[i] != W_MAX) w_d[i] = w_q[i] + 1'b1;
      else                     w_d[i] = w_q[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_IP; i++) w_q[i] <= W_W'(1);
    end else if (vote_en) begin
      w_q <= w_d;
    end
  end

  assign weight = w_q;

endmodule
