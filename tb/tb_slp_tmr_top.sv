// tb_slp_tmr_top: end-to-end run of the protected TMR ALU, at the default
// parameters.
//
// The run repeats the trust experiment for eleven combinations of the three
// cores' trust levels (HHH, LLL, LLM, LLH, LMH, MML, MMM, MMH, HHL, HLL,
// HHM), each from reset for VOTES votes with random opcodes and operands.
// Trust level sets a core's Trojan trigger probability per vote:
// H 0 %, M 1 %, L 10 %. At most one Trojan fires in any vote.
//
// Checks, every vote:
//  * each core's result equals an ALU model, with its attacked bit cleared
//    while its Trojan fires;
//  * graded voter: voted result equals the clean result, and the alarm
//    names exactly the core whose Trojan changed its result;
//  * randomized voter: voted result is the clean one or the faulty core's,
//    and its alarms name exactly the cores that differ from its vote.
// Per combination it prints detection rate (alarm on the triggered core
// when its Trojan changed the result), false positives (alarms on a core
// whose Trojan did not fire) and false negatives (voted result differs from
// the clean result) for both voters. Every mechanism (each core's Trojan,
// a Trojan that changes a result, detection by both voters, a wrong
// randomized vote, both decision paths and the weighted mode of the graded
// voter) must occur at least once over the run. After the HHL combination,
// both voters must mark IP3 as the outlier of bit 0.
module tb_slp_tmr_top;
  import slp_pkg::*;

  localparam int VOTES = 10000;
  localparam int N_CFG = 11;
  // trust levels of IP1, IP2, IP3 per combination: 0 = H, 1 = M, 2 = L
  localparam int CFG[N_CFG][3] = '{
    '{0,0,0}, '{2,2,2}, '{2,2,1}, '{2,2,0}, '{2,1,0}, '{1,1,2},
    '{1,1,1}, '{1,1,0}, '{0,0,2}, '{0,2,2}, '{0,0,1}};
  localparam int PERMILLE[3] = '{0, 10, 100};

  logic clk = 0, rst_n = 0, vote_en = 0;
  alu_op_e op = OP_ADD;
  logic [3:0] a = '0, b = '0;
  logic [2:0] trigger = '0;
  logic [2:0][3:0]      ip_y;
  logic [3:0]           rand_voted, graded_voted;
  logic [2:0]           rand_alarm, graded_alarm;
  logic [3:0][2:0]      rand_mismatch, graded_mismatch;
  logic [3:0][2:0][7:0] rand_weight, graded_weight;
  logic [3:0][2:0]      graded_weighted_mode;
  logic [3:0]           graded_fallback;
  logic [3:0][2:0]      rand_outlier, graded_outlier;
  logic [3:0][1:0]      rand_sel;
  logic [3:0][7:0]      rand_p0_num;
  logic [3:0][9:0]      rand_p0_den;

  int checks = 0, failures = 0, cycles = 0;
  int mech_trig[3] = '{0, 0, 0};
  int mech_effective = 0, mech_rand_detect = 0, mech_graded_detect = 0;
  int mech_outlier = 0, mech_rand_fn = 0, mech_graded_fallback = 0, mech_graded_wsum = 0, mech_wmode = 0;

  slp_tmr_top dut (
    .clk(clk), .rst_n(rst_n), .vote_en(vote_en), .op(op), .a(a), .b(b),
    .trigger(trigger), .ip_y(ip_y), .rand_voted(rand_voted), .rand_mismatch(rand_mismatch), .rand_alarm(rand_alarm),
    .rand_weight(rand_weight), .graded_voted(graded_voted), .graded_mismatch(graded_mismatch), .graded_alarm(graded_alarm),
    .graded_weight(graded_weight), .graded_weighted_mode(graded_weighted_mode),
    .graded_fallback(graded_fallback),
    .rand_outlier(rand_outlier), .rand_sel(rand_sel),
    .rand_p0_num(rand_p0_num), .rand_p0_den(rand_p0_den), .graded_outlier(graded_outlier));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == N_CFG * (VOTES + 10) + 100);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  function automatic logic [3:0] alu_ref(alu_op_e o, logic [3:0] x, logic [3:0] z);
    int r;
    case (o)
      OP_ADD:  r = int'(x) + int'(z);
      OP_SUB:  r = int'(x) - int'(z);
      OP_AND:  r = int'(x & z);
      OP_OR:   r = int'(x | z);
      OP_XOR:  r = int'(x ^ z);
      OP_NOT:  r = 15 - int'(x);
      OP_SHL:  r = 2 * int'(x);
      default: r = int'(x) / 2;
    endcase
    return 4'(r);
  endfunction

  function automatic string trust_name(int c);
    string s = "";
    for (int i = 0; i < 3; i++) s = {s, (CFG[c][i] == 0) ? "H" : (CFG[c][i] == 1) ? "M" : "L"};
    return s;
  endfunction

  initial begin
    $display("trust  Ngt  effective  PDr(%%)  PDg(%%)  FPr  FPg  FNr  FNg");
    for (int c = 0; c < N_CFG; c++) begin
      int ngt, neff, ndr, ndg, fpr, fpg, fnr, fng;
      ngt = 0; neff = 0; ndr = 0; ndg = 0; fpr = 0; fpg = 0; fnr = 0; fng = 0;
      rst_n = 0; vote_en = 0; trigger = '0;
      repeat (2) @(negedge clk);
      rst_n = 1;
      for (int n = 0; n < VOTES; n++) begin
        logic [3:0] clean;
        logic [2:0] eff;
        int r, f;
        @(negedge clk);
        op = alu_op_e'($urandom % 8); a = 4'($urandom); b = 4'($urandom);
        r = $urandom % 1000;
        f = -1;
        if (r < PERMILLE[CFG[c][0]]) f = 0;
        else if (r < PERMILLE[CFG[c][0]] + PERMILLE[CFG[c][1]]) f = 1;
        else if (r < PERMILLE[CFG[c][0]] + PERMILLE[CFG[c][1]] + PERMILLE[CFG[c][2]]) f = 2;
        trigger = '0;
        if (f >= 0) begin trigger[f] = 1'b1; ngt++; mech_trig[f]++; end
        vote_en = 1;
        #1;
        clean = alu_ref(op, a, b);
        eff = '0;
        if (f >= 0 && clean[0]) begin eff[f] = 1'b1; neff++; mech_effective++; end
        for (int i = 0; i < 3; i++)
          check(ip_y[i] == (trigger[i] ? (clean & 4'b1110) : clean), "IP core result");
        // graded voter
        check(graded_voted == clean, "graded voted result");
        check(graded_alarm == eff, "graded alarm");
        check(graded_mismatch == {9'b0, eff}, "graded mismatch on bit 0 only");
        if (graded_voted != clean) fng++;
        if ((graded_alarm & ~trigger) != 0) fpg++;
        if (eff != 0 && (graded_alarm & eff) != 0) begin ndg++; mech_graded_detect++; end
        // randomized voter
        check(rand_voted == clean || (f >= 0 && rand_voted == ip_y[f]), "randomized voted result");
        for (int i = 0; i < 3; i++) check(rand_alarm[i] == (ip_y[i] != rand_voted), "randomized alarm");
        for (int k = 0; k < 4; k++) begin
          check(rand_voted[k] == ip_y[rand_sel[k]][k], "randomized vote is the picked core's bit");
          check(rand_p0_num[k] == rand_weight[k][rand_sel[k]] &&
                int'(rand_p0_den[k]) == int'(rand_weight[k][0]) + int'(rand_weight[k][1]) + int'(rand_weight[k][2]),
                "randomized P0");
        end
        if (rand_voted[0] != clean[0]) begin
          // the randomized voter passed the fault: it must have picked the faulty core
          check(int'(rand_sel[0]) == f, "wrong vote comes from the faulty core");
        end
        if (rand_voted != clean) begin fnr++; mech_rand_fn++; end
        if ((rand_alarm & ~trigger) != 0) fpr++;
        if (eff != 0 && (rand_alarm & eff) != 0) begin ndr++; mech_rand_detect++; end
        // graded voter internals
        mech_graded_fallback += $countones(graded_fallback);
        mech_graded_wsum     += 4 - $countones(graded_fallback);
        if (graded_weighted_mode != '0) mech_wmode++;
      end
      @(negedge clk);
      vote_en = 0; trigger = '0;
      // the only untrusted core of HHL must end up as the outlier of bit 0
      if (trust_name(c) == "HHL") begin
        check(rand_outlier[0] == 3'b100, "HHL: randomized voter singles out IP3");
        check(graded_outlier[0] == 3'b100, "HHL: graded voter singles out IP3");
        mech_outlier++;
      end
      if (c == 0) check(ngt == 0 && fpr == 0 && fpg == 0 && fnr == 0 && fng == 0, "HHH stays clean");
      $display("%s   %4d  %4d     %6.1f  %6.1f  %4d %4d %4d %4d  weights b0 rand %0d/%0d/%0d graded %0.2f/%0.2f/%0.2f",
               trust_name(c), ngt, neff,
               neff ? 100.0 * ndr / neff : 100.0, neff ? 100.0 * ndg / neff : 100.0,
               fpr, fpg, fnr, fng,
               rand_weight[0][0], rand_weight[0][1], rand_weight[0][2],
               graded_weight[0][0] / 4.0, graded_weight[0][1] / 4.0, graded_weight[0][2] / 4.0);
    end
    $display("mechanisms: trojan IP1 %0d IP2 %0d IP3 %0d, changed result %0d, detected rand %0d graded %0d, wrong randomized vote %0d, graded weighted-sum %0d fallback %0d weighted-mode cycles %0d",
             mech_trig[0], mech_trig[1], mech_trig[2], mech_effective, mech_rand_detect,
             mech_graded_detect, mech_rand_fn, mech_graded_wsum, mech_graded_fallback, mech_wmode);
    for (int i = 0; i < 3; i++) check(mech_trig[i] > 0, "each core's Trojan fired");
    check(mech_effective > 0, "a Trojan changed a result");
    check(mech_rand_detect > 0 && mech_graded_detect > 0, "both voters detected a Trojan");
    check(mech_rand_fn > 0, "randomized voter followed a faulty core");
    check(mech_graded_wsum > 0 && mech_graded_fallback > 0, "both graded decision paths");
    check(mech_wmode > 0, "graded voter reached weighted mode");
    check(mech_outlier > 0, "outlier identified");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
