// Self-checking testbench for st_threshold (block extractor, IHAs, TE, STA).
// Streams frames of random-looking D(n) (a dark noisy background with a
// bright object that moves and grows) and checks mu_k, Tg and T(n) against a
// reference computed here: per-block histogram, section peaks, Eq. (4.1)
// with the 16-bit reciprocal, Eq. (4.2), three-level quantization and the
// one-level-per-frame step. Frames follow each other without gaps, so the
// histogram read-out overlaps the next frame.
module tb_st_threshold;
  import vos_pkg::*;
  localparam int W = 24, H = 12, M = 4, L = 4, BW = 6, NF = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  geom_t cfg_width = geom_t'(W), cfg_blk_w = geom_t'(BW);
  logic [23:0] cfg_recip = 24'((1 << 24) / (BW * H));
  logic [7:0] cfg_a = 8'd64;
  logic [7:0] cfg_q [3] = '{8'd20, 8'd60, 8'd120};
  logic [15:0] sigma2;
  logic d_valid = 0, d_eof = 0, t_valid, tg_valid;
  logic [7:0] d_pix, t_n, tg;
  logic [1:0] t_level;
  st_threshold #(.M(M), .L(L)) dut (.*);

  int checks = 0, failures = 0;
  int img [NF][H][W];
  int exp_tg [NF], exp_t [NF], exp_mu [NF][M];
  int sig [NF] = '{0, 100, 400, 1000, 0};
  int level = 1;
  int levels_seen [3];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hist [256];
    int sum, lam, best, bestg, tot, tc, q, rcp;
    rcp = (65536 + (M * L + M) / 2) / (M * L + M);
    for (int f = 0; f < NF; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          img[f][y][x] = (x >= 3 + 2 * f && x < 9 + 4 * f && y > 2) ? 150 + ((x + y) % 5) * 20 : (x * 7 + y * 3 + f) % 13;
      tot = 0;
      for (int k = 0; k < M; k++) begin
        for (int i = 0; i < 256; i++) hist[i] = 0;
        sum = 0;
        for (int y = 0; y < H; y++)
          for (int x = k * BW; x < (k + 1) * BW; x++) begin hist[img[f][y][x]]++; sum += img[f][y][x]; end
        exp_mu[f][k] = int'((longint'(sum) * longint'(cfg_recip)) >> 24);
        lam = 0;
        for (int s = 0; s < L; s++) begin
          best = -1; bestg = s * (256 / L);
          for (int g = s * (256 / L); g < (s + 1) * (256 / L); g++)
            if (hist[g] > best) begin best = hist[g]; bestg = g; end
          lam += bestg;
        end
        tot += lam + exp_mu[f][k];
      end
      exp_tg[f] = (tot * rcp) >> 16;
      tc = exp_tg[f] + ((sig[f] * 64) >> 8);
      q = (tc >= 120) ? 2 : (tc >= 60) ? 1 : 0;
      if (q > level) level++; else if (q < level) level--;
      exp_t[f] = (level == 0) ? 20 : (level == 1) ? 60 : 120;
    end
    sigma2 = 16'(sig[0]);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk);
          d_valid = 1; d_pix = 8'(img[f][y][x]); d_eof = (x == W - 1 && y == H - 1);
        end
      @(negedge clk); d_valid = 0; d_eof = 0;
      repeat (10) @(negedge clk);
    end
  end

  initial begin
    for (int f = 0; f < NF; f++) begin
      @(negedge clk iff tg_valid);
      checks++;
      if (int'(tg) != exp_tg[f]) begin failures++; $display("frame %0d Tg %0d expected %0d", f, tg, exp_tg[f]); end
      for (int k = 0; k < M; k++) begin
        checks++;
        if (int'(dut.mu[k]) != exp_mu[f][k]) begin failures++; $display("frame %0d mu%0d %0d expected %0d", f, k, dut.mu[k], exp_mu[f][k]); end
      end
      @(negedge clk iff t_valid);
      checks++;
      if (int'(t_n) != exp_t[f]) begin failures++; $display("frame %0d T %0d expected %0d", f, t_n, exp_t[f]); end
      levels_seen[t_level]++;
      if (f + 1 < NF) sigma2 = 16'(sig[f + 1]);
    end
    checks++;
    if (levels_seen[2] == 0) begin failures++; $display("highest level never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
