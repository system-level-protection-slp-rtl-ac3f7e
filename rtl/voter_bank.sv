// voter_bank: one voting circuit per output bit (vb0..vb3).
//
// Voting circuit b receives bit b of IP1, IP2 and IP3 and produces bit b of
// the voted output, so every bit learns its own three trust weights. KIND
// selects the algorithm of all circuits of the bank: randomized weighted
// voting (rand_voter_bit, each bit with its own LFSR seed derived from SEED)
// or graded reward/penalty voting (graded_voter_bit).
//
// Interface: ip_y[i] is the 4-bit result of IP core i+1; voted is the voted
// result. mismatch[b][i] flags that core i disagreed on bit b; alarm[i] is
// the OR over all bits, qualified by vote_en: core i was outvoted this
// cycle, the run-time Trojan alarm. weight[b][i] is the weight of core i in
// the circuit for bit b (integer for the randomized kind, fixed point with
// FRAC_BITS fraction bits for the graded kind). weighted_mode and fallback
// are status of the graded kind and read 0 in a randomized bank.
// outlier[b][i] marks core i as the least trusted for bit b: its weight is
// strictly below both others (no core is marked on a tie). In a randomized
// bank, sel[b] is the core picked for bit b and p0_num[b]/p0_den[b] the
// probability with which it was picked; they read 0 in a graded bank.
// Timing as in the per-bit circuits: outputs combinational in the cycle
// vote_en is high, state updated at its rising clock edge.
//
// One voter per bit fed by the same bit of the three cores follows the
// published structure; reading the lowest weight as the suspected core
// follows the scheme's use of the weights, while the alarm output is this
// design's reading of "the IP
// core output is checked for detection".
module voter_bank
  import slp_pkg::*;
#(
  parameter vote_kind_e  KIND = VOTE_RANDOMIZED,
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 vote_en,
  input  logic [N_IP-1:0][DATA_W-1:0]          ip_y,
  output logic [DATA_W-1:0]                    voted,
  output logic [DATA_W-1:0][N_IP-1:0]          mismatch,
  output logic [N_IP-1:0]                      alarm,
  output logic [DATA_W-1:0][N_IP-1:0][WEIGHT_W-1:0] weight,
  output logic [DATA_W-1:0][N_IP-1:0]          weighted_mode,
  output logic [DATA_W-1:0]                    fallback,
  output logic [DATA_W-1:0][N_IP-1:0]          outlier,
  output logic [DATA_W-1:0][1:0]               sel,
  output logic [DATA_W-1:0][WEIGHT_W-1:0]      p0_num,
  output logic [DATA_W-1:0][WEIGHT_W+1:0]      p0_den
);

  for (genvar b = 0; b < DATA_W; b++) begin : g_bit
    logic [N_IP-1:0] x;
    for (genvar i = 0; i < N_IP; i++) begin : g_ip
      assign x[i] = ip_y[i][b];
    end

    if (KIND == VOTE_RANDOMIZED) begin : g_rand
      rand_voter_bit #(
        .SEED(SEED ^ 16'(b * 16'h1357))
      ) u_voter (
        .clk(clk), .rst_n(rst_n), .vote_en(vote_en), .x(x),
        .y(voted[b]), .sel(sel[b]), .mismatch(mismatch[b]), .weight(weight[b]),
        .p0_num(p0_num[b]), .p0_den(p0_den[b])
      );
      assign weighted_mode[b] = '0;
      assign fallback[b]      = 1'b0;
    end else begin : g_graded
      graded_voter_bit u_voter (
        .clk(clk), .rst_n(rst_n), .vote_en(vote_en), .x(x),
        .y(voted[b]), .fallback(fallback[b]), .mismatch(mismatch[b]),
        .weighted_mode(weighted_mode[b]), .weight(weight[b])
      );
      assign sel[b]    = '0;
      assign p0_num[b] = '0;
      assign p0_den[b] = '0;
    end
  end

  always_comb begin
    alarm = '0;
    for (int b = 0; b < DATA_W; b++) alarm |= mismatch[b];
    if (!vote_en) alarm = '0;
  end

  always_comb begin
    for (int b = 0; b < DATA_W; b++)
      for (int i = 0; i < N_IP; i++) begin
        outlier[b][i] = 1'b1;
        for (int j = 0; j < N_IP; j++)
          if (j != i && weight[b][i] >= weight[b][j]) outlier[b][i] = 1'b0;
      end
  end

endmodule
