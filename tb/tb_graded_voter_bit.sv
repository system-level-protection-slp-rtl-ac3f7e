// tb_graded_voter_bit: self-check of the graded reward/penalty voter.
//
// The reference model keeps the three weights as real numbers, with the
// reward and mistake counts, and follows the voting rules step by step:
// weighted comparison, then head count; graded steps of 0.25 x count
// (count capped at 3) below the mistake threshold of 4; +1 / halving from
// the threshold on. Weights are compared with the circuit's fixed-point
// value x 0.25 every cycle. Stimulus mixes agreeing inputs, one wrong core
// (core 3 most often) and two wrong cores, so that both decision paths,
// both update modes, the floor at 0 and the saturation all occur; each of
// these is counted (three straight mistakes of core 1 after each reset
// drive its weight to the floor) and must have happened.
module tb_graded_voter_bit;
  import slp_pkg::*;

  logic            clk = 0, rst_n = 0, vote_en = 0;
  logic [2:0]      x = '0;
  logic            y, fallback;
  logic [2:0]      mismatch, weighted_mode;
  logic [2:0][7:0] weight;
  int              checks = 0, failures = 0, cycles = 0;
  real             m_w[3];
  int              m_rew[3], m_mis[3];
  int              n_wsum = 0, n_fallback = 0, n_minority_one = 0, n_graded_pen = 0,
                   n_graded_rew = 0, n_wmode = 0, n_floor = 0, n_sat = 0;

  graded_voter_bit dut (
    .clk(clk), .rst_n(rst_n), .vote_en(vote_en), .x(x), .y(y), .fallback(fallback),
    .mismatch(mismatch), .weighted_mode(weighted_mode), .weight(weight));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 50000);
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

  initial begin
    real s1, s0, st;
    int  n1, ey, efb;
    for (int i = 0; i < 3; i++) begin m_w[i] = 1.0; m_rew[i] = 0; m_mis[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 12000; n++) begin
      int r;
      @(negedge clk);
      if (n == 6000) begin
        // second phase from a fresh reset
        rst_n = 0; #1; rst_n = 1;
        for (int i = 0; i < 3; i++) begin m_w[i] = 1.0; m_rew[i] = 0; m_mis[i] = 0; end
      end
      r = $urandom % 100;
      x = {3{1'($urandom % 2)}};
      if (n % 6000 < 3000) begin
        if (r < 15) x[2] = ~x[2];
        else if (r < 20) x[$urandom % 2] = ~x[0];
        else if (r < 25) x = 3'($urandom);
      end else begin
        if (r < 40) x = 3'($urandom);
      end
      vote_en = ($urandom % 10) != 0;
      if (n % 6000 < 3) begin
        // three straight mistakes of core 1 right after reset: 1.0 - 0.25
        // - 0.5 leaves 0.25, and the step of 0.75 must stop at 0
        x = 3'b110; vote_en = 1;
      end
      #1;
      for (int i = 0; i < 3; i++) check(int'(weight[i]) == int'(m_w[i] * 4.0), "weight");
      for (int i = 0; i < 3; i++) check(weighted_mode[i] == (m_mis[i] >= 4), "weighted_mode");
      s1 = 0; s0 = 0; n1 = 0;
      for (int i = 0; i < 3; i++) if (x[i]) begin s1 += m_w[i]; n1++; end else s0 += m_w[i];
      if (s1 > s0) begin ey = 1; efb = 0; end
      else begin ey = (n1 > 3 - n1) ? 1 : 0; efb = 1; end
      if (vote_en) begin
        check(y == 1'(ey), "y");
        check(fallback == 1'(efb), "fallback");
        if (efb == 0) n_wsum++; else n_fallback++;
        if (ey == 1 && n1 == 1) n_minority_one++;
        for (int i = 0; i < 3; i++) begin
          bit mis;
          mis = (x[i] != 1'(ey));
          check(mismatch[i] == mis, "mismatch");
          if (mis) m_mis[i] = (m_mis[i] < 4) ? m_mis[i] + 1 : 4;
          else     m_rew[i] = (m_rew[i] < 3) ? m_rew[i] + 1 : 3;
          if (m_mis[i] >= 4) begin
            n_wmode++;
            if (mis) m_w[i] = $floor(m_w[i] * 2.0) / 4.0;
            else     m_w[i] = m_w[i] + 1.0;
          end else if (mis) begin
            st = 0.25 * ((m_mis[i] > 3) ? 3 : m_mis[i]);
            m_w[i] = m_w[i] - st;
            n_graded_pen++;
            if (m_w[i] < 0.0) begin m_w[i] = 0.0; n_floor++; end
          end else begin
            m_w[i] = m_w[i] + 0.25 * m_rew[i];
            n_graded_rew++;
          end
          if (m_w[i] > 63.75) begin m_w[i] = 63.75; n_sat++; end
        end
      end
    end
    $display("tb_graded_voter_bit: weighted-sum %0d fallback %0d minority-one %0d graded +%0d -%0d weighted-mode %0d floor %0d saturate %0d",
             n_wsum, n_fallback, n_minority_one, n_graded_rew, n_graded_pen, n_wmode, n_floor, n_sat);
    check(n_wsum > 0 && n_fallback > 0 && n_minority_one > 0, "both decision paths");
    check(n_graded_rew > 0 && n_graded_pen > 0 && n_wmode > 0, "both update modes");
    check(n_floor > 0 && n_sat > 0, "floor and saturation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
