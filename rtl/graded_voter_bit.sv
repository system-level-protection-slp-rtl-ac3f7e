// graded_voter_bit: graded reward/penalty weighted voting circuit for one
// output bit.
//
// The circuit keeps, for each of the three IP cores, a weight in unsigned
// fixed point with FRAC_BITS fractional bits (reset value 1.0), a reward
// counter and a mistake (penalty) counter (both reset to 0). When vote_en
// is high:
//   1. Decision. If the summed weight of the cores that deliver 1 is larger
//      than that of the cores that deliver 0, y = 1. Otherwise the cores are
//      counted: y = 1 if more cores deliver 1 than 0, else y = 0
//      (fallback = 1 marks this second path).
//   2. Bookkeeping. A core that disagrees with y has its mistake counter
//      incremented; a core that agrees has its reward counter incremented.
//   3. Weight update, per core, using the updated counters.
//      Graded mode (mistakes below MISTAKE_THRESHOLD): an agreeing core gains
//      0.25 x reward count, a disagreeing one loses 0.25 x mistake count,
//      the count capped at 3 (steps 0.25, 0.5, 0.75); the weight never falls
//      below 0.
//      Weighted mode (mistakes have reached MISTAKE_THRESHOLD): an agreeing
//      core gains 1.0, a disagreeing one has its weight halved, as in plain
//      weighted voting.
// Weights saturate at their largest value; counters saturate.
//
// Timing: y, fallback and mismatch are combinational from x and the current
// state, valid in the cycle vote_en is high; weights and counters update on
// that cycle's rising clock edge. weighted_mode[i] shows that core i has
// reached the mistake threshold.
//
// The decision order, the graded steps of 0.25/0.5/0.75, the threshold of
// four and the weighted-mode rules (+1, divide by 2) follow the published
// graded voter. The reset weight of 1.0, the saturation of the counters and
// the reading of "threshold reached" as mistakes >= 4 are this design's
// choices.
module graded_voter_bit
  import slp_pkg::*;
#(
  parameter int unsigned W_W       = WEIGHT_W,
  parameter int unsigned FRAC      = FRAC_BITS,
  parameter int unsigned THRESHOLD = MISTAKE_THRESHOLD
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      vote_en,
  input  logic [N_IP-1:0]           x,
  output logic                      y,
  output logic                      fallback,
  output logic [N_IP-1:0]           mismatch,
  output logic [N_IP-1:0]           weighted_mode,
  output logic [N_IP-1:0][W_W-1:0]  weight
);

  localparam int unsigned CNT_W = $clog2(THRESHOLD + 1);
  localparam logic [W_W-1:0]   W_MAX   = '1;
  localparam logic [W_W-1:0]   W_ONE   = W_W'(1) << FRAC;
  localparam logic [CNT_W-1:0] CNT_MAX = CNT_W'(THRESHOLD);
  localparam logic [1:0]       GMAX    = 2'(GRADE_MAX);

  logic [N_IP-1:0][W_W-1:0]   w_q, w_d;
  logic [N_IP-1:0][1:0]       rew_q, rew_d;
  logic [N_IP-1:0][CNT_W-1:0] mis_q, mis_d;

  logic [W_W+1:0] sum1, sum0;
  logic [1:0]     n1, n0;

  // Saturating add of a weight step.
  function automatic logic [W_W-1:0] sat_add(logic [W_W-1:0] w, logic [W_W-1:0] inc);
    logic [W_W:0] s;
    s = {1'b0, w} + {1'b0, inc};
    return s[W_W] ? W_MAX : s[W_W-1:0];
  endfunction

  // Subtraction floored at zero.
  function automatic logic [W_W-1:0] floor_sub(logic [W_W-1:0] w, logic [W_W-1:0] dec);
    return (w > dec) ? w - dec : '0;
  endfunction

  always_comb begin
    sum1 = '0;
    sum0 = '0;
    n1   = '0;
    n0   = '0;
    for (int i = 0; i < N_IP; i++) begin
      if (x[i]) begin
        sum1 += (W_W+2)'(w_q[i]);
        n1   += 2'd1;
      end else begin
        sum0 += (W_W+2)'(w_q[i]);
        n0   += 2'd1;
      end
    end

    if (sum1 > sum0) begin
      y        = 1'b1;
      fallback = 1'b0;
    end else begin
      y        = (n1 > n0);
      fallback = 1'b1;
    end

    for (int i = 0; i < N_IP; i++) begin
      logic [1:0]     grade;
      logic [W_W-1:0] step;
      mismatch[i] = (x[i] != y);
      rew_d[i]    = rew_q[i];
      mis_d[i]    = mis_q[i];
      if (mismatch[i]) begin
        if (mis_q[i] != CNT_MAX) mis_d[i] = mis_q[i] + 1'b1;
      end else begin
        if (rew_q[i] != GMAX) rew_d[i] = rew_q[i] + 1'b1;
      end

      if (mismatch[i]) grade = (mis_d[i] > CNT_W'(GRADE_MAX)) ? GMAX : 2'(mis_d[i]);
      else             grade = rew_d[i];
      step = W_W'(grade) << (FRAC - 2);     // grade x 0.25

      if (mis_d[i] >= CNT_MAX) begin
        // weighted mode
        w_d[i] = mismatch[i] ? (w_q[i] >> 1) : sat_add(w_q[i], W_ONE);
      end else begin
        // graded mode
        w_d[i] = mismatch[i] ? floor_sub(w_q[i], step) : sat_add(w_q[i], step);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_IP; i++) begin
        w_q[i]   <= W_ONE;
        rew_q[i] <= '0;
        mis_q[i] <= '0;
      end
    end else if (vote_en) begin
      w_q   <= w_d;
      rew_q <= rew_d;
      mis_q <= mis_d;
    end
  end

  always_comb begin
    for (int i = 0; i < N_IP; i++) weighted_mode[i] = (mis_q[i] >= CNT_MAX);
  end

  assign weight = w_q;

endmodule
