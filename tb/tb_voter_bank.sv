// tb_voter_bank: self-check of the per-bit voter banks, one of each kind.
//
// Each cycle a random clean 4-bit word goes to all three cores; in about one
// cycle in four a single core (core 3 most often) has one random bit forced
// to 0, like a stuck-at-zero Trojan. Checks:
//  * graded bank: the voted word equals the clean word (two good cores
//    always win against one stuck-at-zero core);
//  * randomized bank: every voted bit is the clean bit or the bit of the
//    faulty core; its weights follow a per-bit model (+1 on agreement with
//    the voted bit, halving on disagreement);
//  * both banks: alarm[i] is set exactly when core i differs from the voted
//    word in some bit, and mismatch matches bit by bit; outlier marks the
//    core whose weight is strictly the lowest of a bit.
module tb_voter_bank;
  import slp_pkg::*;

  logic clk = 0, rst_n = 0, vote_en = 0;
  logic [2:0][3:0]      ip_y = '0;
  logic [3:0]           rv, gv;
  logic [3:0][2:0]      rmis, gmis, rwm, gwm;
  logic [2:0]           ral, gal;
  logic [3:0][2:0][7:0] rw, gw;
  logic [3:0]           rfb, gfb;
  logic [3:0][2:0]      rol, gol;
  logic [3:0][1:0]      rsel, gsel;
  logic [3:0][7:0]      rp0n, gp0n;
  logic [3:0][9:0]      rp0d, gp0d;
  int checks = 0, failures = 0, cycles = 0;
  int m_rw[4][3];
  int n_outlier = 0, n_fault = 0, n_rand_wrong = 0, n_gfb = 0, n_gwm = 0;

  voter_bank #(.KIND(VOTE_RANDOMIZED), .SEED(16'h2A2A)) dut_r (
    .clk(clk), .rst_n(rst_n), .vote_en(vote_en), .ip_y(ip_y), .voted(rv),
    .mismatch(rmis), .alarm(ral), .weight(rw), .weighted_mode(rwm), .fallback(rfb), .outlier(rol),
    .sel(rsel), .p0_num(rp0n), .p0_den(rp0d));
  voter_bank #(.KIND(VOTE_GRADED)) dut_g (
    .clk(clk), .rst_n(rst_n), .vote_en(vote_en), .ip_y(ip_y), .voted(gv),
    .mismatch(gmis), .alarm(gal), .weight(gw), .weighted_mode(gwm), .fallback(gfb), .outlier(gol),
    .sel(gsel), .p0_num(gp0n), .p0_den(gp0d));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 40000);
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
    for (int b = 0; b < 4; b++) for (int i = 0; i < 3; i++) m_rw[b][i] = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      logic [3:0] clean;
      int f, fb;
      @(negedge clk);
      clean = 4'($urandom);
      ip_y  = {clean, clean, clean};
      f = -1;
      if ($urandom % 4 == 0) begin
        f  = ($urandom % 3 == 0) ? int'($urandom % 3) : 2;
        fb = $urandom % 4;
        ip_y[f][fb] = 1'b0;
        if (clean[fb]) n_fault++;
      end
      vote_en = ($urandom % 8) != 0;
      #1;
      for (int b = 0; b < 4; b++) for (int i = 0; i < 3; i++)
        check(int'(rw[b][i]) == m_rw[b][i], "rand weight");
      if (vote_en) begin
        check(gv == clean, "graded voted");
        if (rv != clean) n_rand_wrong++;
        for (int b = 0; b < 4; b++) begin
          check(rv[b] == clean[b] || (f >= 0 && rv[b] == ip_y[f][b]), "rand voted bit");
          check(rsel[b] <= 2 && rv[b] == ip_y[rsel[b]][b], "rand voted bit is the picked core's");
          check(int'(rp0n[b]) == m_rw[b][rsel[b]] &&
                int'(rp0d[b]) == m_rw[b][0] + m_rw[b][1] + m_rw[b][2], "rand P0");
        end
        for (int i = 0; i < 3; i++) begin
          check(ral[i] == ((ip_y[i] ^ rv) != 0), "rand alarm");
          check(gal[i] == ((ip_y[i] ^ gv) != 0), "graded alarm");
          for (int b = 0; b < 4; b++) begin
            check(rmis[b][i] == (ip_y[i][b] != rv[b]), "rand mismatch");
            check(gmis[b][i] == (ip_y[i][b] != gv[b]), "graded mismatch");
            if (ip_y[i][b] != rv[b]) m_rw[b][i] = m_rw[b][i] / 2;
            else if (m_rw[b][i] < 255) m_rw[b][i]++;
          end
        end
        n_gfb += $countones(gfb);
      end else begin
        check(ral == 3'b000 && gal == 3'b000, "no alarm without vote_en");
      end
      check(rwm == '0 && rfb == '0, "randomized bank has no graded status");
      check(gsel == '0 && gp0n == '0 && gp0d == '0, "graded bank has no pick");
      for (int b = 0; b < 4; b++)
        for (int i = 0; i < 3; i++) begin
          bit eo_r, eo_g;
          eo_r = 1; eo_g = 1;
          for (int j = 0; j < 3; j++) if (j != i) begin
            if (!(rw[b][i] < rw[b][j])) eo_r = 0;
            if (!(gw[b][i] < gw[b][j])) eo_g = 0;
          end
          check(rol[b][i] == eo_r && gol[b][i] == eo_g, "outlier");
          if (gol[b][i]) n_outlier++;
        end
      if (gwm != '0) n_gwm++;
    end
    $display("tb_voter_bank: effective faults %0d, randomized voted wrong %0d, graded fallbacks %0d, cycles with weighted mode %0d",
             n_fault, n_rand_wrong, n_gfb, n_gwm);
    check(n_outlier > 0, "an outlier was marked");
    check(n_fault > 0 && n_rand_wrong > 0 && n_gfb > 0 && n_gwm > 0, "mechanisms occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
