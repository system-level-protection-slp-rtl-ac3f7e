// tb_rand_voter_bit: self-check of the randomized weighted voting circuit.
//
// A reference model in the testbench keeps its own copy of the LFSR and of
// the three weights and predicts, for every vote, the chosen core, the voted
// bit, the mismatch flags, the selection probability and the new weights.
// Stimulus: a random true bit, copied to all three cores, with core 3 wrong
// 20 % of the time and core 2 wrong 5 %; one cycle in eight has vote_en low
// (nothing may change). It also checks the first vote after reset (all
// inputs 0, weights 1,1,1 -> output 0, weights 2,2,2) and that after the
// run the often-wrong core 3 holds a smaller weight than core 1.
module tb_rand_voter_bit;
  import slp_pkg::*;

  localparam logic [15:0] SEED = 16'h1D0F;

  logic                 clk = 0, rst_n = 0, vote_en = 0;
  logic [2:0]           x = '0;
  logic                 y;
  logic [1:0]           sel;
  logic [2:0]           mismatch;
  logic [2:0][7:0]      weight;
  logic [7:0]           p0_num;
  logic [9:0]           p0_den;
  int                   checks = 0, failures = 0, cycles = 0;
  int                   m_w[3];
  logic [15:0]          m_lfsr;
  int                   n_shift = 0, n_pick[3] = '{0, 0, 0};

  rand_voter_bit #(.SEED(SEED)) dut (
    .clk(clk), .rst_n(rst_n), .vote_en(vote_en), .x(x), .y(y), .sel(sel),
    .mismatch(mismatch), .weight(weight), .p0_num(p0_num), .p0_den(p0_den));

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
    int tsum, pick, s, ey;
    m_w = '{1, 1, 1};
    m_lfsr = SEED;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      if (n == 0) begin
        x = 3'b000; vote_en = 1;
      end else begin
        bit t;
        t = 1'($urandom);
        x = {3{t}};
        if ($urandom % 100 < 20) x[2] = ~x[2];
        if ($urandom % 100 < 5)  x[1] = ~x[1];
        vote_en = ($urandom % 8) != 0;
      end
      #1;
      for (int i = 0; i < 3; i++) check(weight[i] == 8'(m_w[i]), "weight");
      tsum = m_w[0] + m_w[1] + m_w[2];
      pick = int'((longint'(m_lfsr) * longint'(tsum)) / 65536);
      s    = (pick < m_w[0]) ? 0 : (pick < m_w[0] + m_w[1]) ? 1 : 2;
      ey   = int'(x[s]);
      if (vote_en) begin
        check(sel == 2'(s), "sel");
        check(y == 1'(ey), "y");
        check(p0_num == 8'(m_w[s]) && p0_den == 10'(tsum), "p0");
        for (int i = 0; i < 3; i++) check(mismatch[i] == (x[i] != 1'(ey)), "mismatch");
        n_pick[s]++;
        for (int i = 0; i < 3; i++)
          if (x[i] != 1'(ey)) begin m_w[i] = m_w[i] / 2; n_shift++; end
          else if (m_w[i] < 255) m_w[i] = m_w[i] + 1;
        m_lfsr = m_lfsr[0] ? ((m_lfsr >> 1) ^ 16'hB400) : (m_lfsr >> 1);
      end
      @(posedge clk); #1;
      if (n == 0) check(weight[0] == 2 && weight[1] == 2 && weight[2] == 2, "first vote 2,2,2");
    end
    check(weight[2] < weight[0], "learned: core 3 less trusted than core 1");
    check(n_shift > 0 && n_pick[0] > 0 && n_pick[1] > 0 && n_pick[2] > 0, "all picks and a shift occurred");
    $display("tb_rand_voter_bit: picks %0d/%0d/%0d shifts %0d final weights %0d %0d %0d",
             n_pick[0], n_pick[1], n_pick[2], n_shift, weight[0], weight[1], weight[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
