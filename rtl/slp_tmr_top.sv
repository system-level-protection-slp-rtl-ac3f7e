// slp_tmr_top: system-level protection of a 4-bit ALU built from three
// untrusted third-party IP cores.
//
// The same opcode and operands go to three IP cores (trojan_ip), each an ALU
// carrying a stuck-at-zero Trojan on output bit TROJAN_BIT_IPn that fires
// while trigger[n-1] is high. The three results feed two voter banks side by
// side: one using randomized weighted voting, one using graded
// reward/penalty weighted voting. Either voted output masks a single
// misbehaving core; the per-core alarms show which core disagreed with the
// vote (mismatch names the bits), the learned weights show how far each core
// is trusted, and outlier marks, per bit, the core whose weight is lowest:
// the suspected Trojan carrier. rand_sel and rand_p0_num/rand_p0_den give,
// per bit, the core the randomized voter picked and the probability of that
// pick (P0 = weight of the picked core / sum of the weights).
//
// Interface: op/a/b are the ALU inputs, trigger[i] the Trojan trigger of
// core i+1 (an external signal here; in a deployed system it would come
// from the Trojan's own hidden logic). vote_en marks a cycle whose results
// are voted and learned from. ip_y brings out the raw core results for
// observation. Timing: the cores and voted outputs are combinational from
// the inputs in the vote_en cycle; weights and counters update on that
// cycle's rising clock edge. Reset is asynchronous, active low, and sets
// all weights to 1.
//
// The TMR structure, per-bit voters and SAZ Trojans follow the published
// system; running both voting algorithms side by side, the Trojan bit
// positions and the LFSR seed are this design's choices.
module slp_tmr_top
  import slp_pkg::*;
#(
  parameter int unsigned TROJAN_BIT_IP1 = 0,
  parameter int unsigned TROJAN_BIT_IP2 = 0,
  parameter int unsigned TROJAN_BIT_IP3 = 0,
  parameter logic [15:0] RAND_SEED      = 16'hACE1
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  input  logic                                      vote_en,
  input  alu_op_e                                   op,
  input  logic [DATA_W-1:0]                         a,
  input  logic [DATA_W-1:0]                         b,
  input  logic [N_IP-1:0]                           trigger,
  output logic [N_IP-1:0][DATA_W-1:0]               ip_y,
  output logic [DATA_W-1:0]                         rand_voted,
  output logic [DATA_W-1:0][N_IP-1:0]               rand_mismatch,
  output logic [N_IP-1:0]                           rand_alarm,
  output logic [DATA_W-1:0][N_IP-1:0][WEIGHT_W-1:0] rand_weight,
  output logic [DATA_W-1:0][N_IP-1:0]               rand_outlier,
  output logic [DATA_W-1:0][1:0]                    rand_sel,
  output logic [DATA_W-1:0][WEIGHT_W-1:0]           rand_p0_num,
  output logic [DATA_W-1:0][WEIGHT_W+1:0]           rand_p0_den,
  output logic [DATA_W-1:0]                         graded_voted,
  output logic [DATA_W-1:0][N_IP-1:0]               graded_mismatch,
  output logic [N_IP-1:0]                           graded_alarm,
  output logic [DATA_W-1:0][N_IP-1:0][WEIGHT_W-1:0] graded_weight,
  output logic [DATA_W-1:0][N_IP-1:0]               graded_weighted_mode,
  output logic [DATA_W-1:0]                         graded_fallback,
  output logic [DATA_W-1:0][N_IP-1:0]               graded_outlier
);

  trojan_ip #(.TARGET_BIT(TROJAN_BIT_IP1)) u_ip1 (
    .op(op), .a(a), .b(b), .trigger(trigger[0]), .y(ip_y[0]));
  trojan_ip #(.TARGET_BIT(TROJAN_BIT_IP2)) u_ip2 (
    .op(op), .a(a), .b(b), .trigger(trigger[1]), .y(ip_y[1]));
  trojan_ip #(.TARGET_BIT(TROJAN_BIT_IP3)) u_ip3 (
    .op(op), .a(a), .b(b), .trigger(trigger[2]), .y(ip_y[2]));

  logic [DATA_W-1:0][N_IP-1:0] rand_wmode_unused;
  logic [DATA_W-1:0]           rand_fallback_unused;
  logic [DATA_W-1:0][1:0]          graded_sel_unused;
  logic [DATA_W-1:0][WEIGHT_W-1:0] graded_p0_num_unused;
  logic [DATA_W-1:0][WEIGHT_W+1:0] graded_p0_den_unused;

  voter_bank #(.KIND(VOTE_RANDOMIZED), .SEED(RAND_SEED)) u_rand_bank (
    .clk(clk), .rst_n(rst_n), .vote_en(vote_en), .ip_y(ip_y),
    .voted(rand_voted), .mismatch(rand_mismatch), .alarm(rand_alarm),
    .weight(rand_weight), .weighted_mode(rand_wmode_unused),
    .fallback(rand_fallback_unused), .outlier(rand_outlier),
    .sel(rand_sel), .p0_num(rand_p0_num), .p0_den(rand_p0_den)
  );

  voter_bank #(.KIND(VOTE_GRADED)) u_graded_bank (
    .clk(clk), .rst_n(rst_n), .vote_en(vote_en), .ip_y(ip_y),
    .voted(graded_voted), .mismatch(graded_mismatch), .alarm(graded_alarm),
    .weight(graded_weight), .weighted_mode(graded_weighted_mode),
    .fallback(graded_fallback), .outlier(graded_outlier),
    .sel(graded_sel_unused), .p0_num(graded_p0_num_unused), .p0_den(graded_p0_den_unused)
  );

endmodule
