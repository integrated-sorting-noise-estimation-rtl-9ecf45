// Full-size end-to-end testbench: vos_top with its default parameters on
// CIF frames (352 x 288), the frame size used in the published results.
// Frames of a noisy background with a rectangle, a right triangle (sloped
// lower edge), a thin stick and a 2x2 speck move over a constant background BK; D(n) = |I(n) -
// BK| (background reference). The testbench plays the external memories:
// it stores D(n) from d_out and returns it on the dprev port, and it models
// the label SRAM. Checks:
//  - sigma^2 and T(n) arrive once per frame; sigma^2 is close to the
//    variance of the background noise;
//  - each chain code frame is well formed and every chain closes at its
//    start;
//  - the filled frame labels every pixel of the rectangle and the triangle
//    and nothing else (the stick is a dead branch, the speck is too short);
//    the last frame runs the 3x3 average and max filters, which dilate the
//    shapes, so there only the shape pixels are checked;
//  - every mechanism of the design happened at least once (the list is
//    printed with its counts).
module tb_vos_top_full;
  import vos_pkg::*;
  localparam int W = 352, H = 288, NF = 3;  // the last frame uses the filters
  localparam int BKV = 50, OBJ = 150, NOISE = 6;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  geom_t cfg_width = geom_t'(W), cfg_height = geom_t'(H), cfg_blk_w = geom_t'(W / 4);
  logic [1:0] cfg_avg_rad = 0, cfg_max_rad = 0;
  logic cfg_ref_bk = 1;
  logic [23:0] cfg_recip = 24'(((1 << 24) + (W / 4) * H / 2) / ((W / 4) * H));
  logic [7:0] cfg_a = 8'd64, cfg_tsig = 8'd24;
  logic [7:0] cfg_q [3] = '{8'd20, 8'd40, 8'd60};
  logic [15:0] cfg_min_len = 16'd8;
  logic in_valid = 0, in_ready, d_valid, d_sof, d_eof, d_ready = 1;
  logic [7:0] in_cur, in_prev, in_bk, d_pix, dprev_pix, t_n;
  logic dprev_valid = 0, dprev_ready, sigma2_valid, t_valid, cc_valid;
  logic [15:0] sigma2, ff_label, sram_wdata, sram_rdata;
  logic [3:0] cc_nib;
  logic ff_valid, ff_sof, ff_eof, sram_we, sram_re;
  logic [19:0] sram_addr;

  vos_top dut (.*);

  logic [15:0] sram [W*H];
  always @(posedge clk) begin
    if (sram_we) sram[sram_addr] <= sram_wdata;
    if (sram_re) sram_rdata <= sram[sram_addr];
  end

  int checks = 0, failures = 0;
  int cur [NF][H][W], obj [NF][H][W];   // obj: 0 none, 1 filled shape, 2 stick/speck
  int dfr [NF][H*W];
  int nd = 0, nd_pix = 0, nff = 0, nff_pix = 0, nsig = 0, nt = 0;
  int ccq [$];
  string names [20] = '{"average filter pixels", "max filter pixels", "noise blocks", "noise selections", "sigma outputs", "sorted keys",
    "D pixels", "IHA results", "T(n) outputs", "edge pixels", "cache writes", "contour starts",
    "dead points", "accepted contours", "rejected contours", "PE-0 seeds", "PE-1 seeds",
    "filled pixels", "chain code nibbles", "filled frames"};
  int cnt [20];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("timeout: D %0d, filled %0d, sigma %0d", nd, nff, nsig);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ mechanism counters
  always @(posedge clk) if (rst_n) begin
    cnt[0]  += int'(dut.u_motion.u_avg.out_valid && dut.u_motion.u_avg.out_ready && dut.u_motion.u_avg.rad_q != 0);
    cnt[1]  += int'(dut.u_motion.u_max.out_valid && dut.u_motion.u_max.out_ready && dut.u_motion.u_max.rad_q != 0);
    cnt[2]  += int'(dut.u_noise.ev_block);
    cnt[3]  += int'(dut.u_noise.ev_select);
    cnt[4]  += int'(sigma2_valid);
    cnt[5]  += int'(dut.u_noise.so_valid);
    cnt[6]  += int'(d_valid && d_ready);
    cnt[7]  += int'(dut.u_thresh.res_valid[0]);
    cnt[8]  += int'(t_valid);
    cnt[9]  += int'(dut.e_valid && dut.e_ready && dut.e_pix);
    cnt[10]  += int'(dut.c_we);
    cnt[11]  += int'(dut.tr_ev_start);
    cnt[12] += int'(dut.tr_ev_dead);
    cnt[13] += int'(dut.tr_ev_accept);
    cnt[14] += int'(dut.tr_ev_reject);
    cnt[15] += int'(dut.fl_seed0);
    cnt[16] += int'(dut.fl_seed1);
    cnt[17] += int'(dut.fl_fill);
    cnt[18] += int'(cc_valid);
    cnt[19] += int'(ff_valid && ff_eof);
  end

  // ------------------------------------------------ result capture
  always @(posedge clk) if (rst_n) begin
    if (sigma2_valid) begin
      nsig++;
      chk(sigma2 >= 1 && sigma2 <= 8, $sformatf("sigma2 %0d near the noise variance 4", sigma2));
    end
    if (t_valid) nt++;
    if (d_valid && d_ready) begin
      chk(d_sof == (nd_pix == 0) && d_eof == (nd_pix == W * H - 1), "D sof/eof");
      dfr[nd][nd_pix] = int'(d_pix);
      nd_pix++;
      if (nd_pix == W * H) begin nd_pix = 0; nd++; end
    end
    if (cc_valid) ccq.push_back(int'(cc_nib));
    if (ff_valid) begin
      int x, y, o;
      x = nff_pix % W; y = nff_pix / W; o = obj[nff][y][x];
      chk(ff_sof == (nff_pix == 0) && ff_eof == (nff_pix == W * H - 1), "filled frame sof/eof");
      // the last frame is dilated by the filters: only the shapes are checked
      if (nff == NF - 1) chk(o != 1 || ff_label != 0, $sformatf("filled frame %0d (%0d,%0d) unlabelled", nff, x, y));
      else chk((ff_label != 0) == (o == 1),
          $sformatf("filled frame %0d (%0d,%0d): label %0d, object %0d", nff, x, y, ff_label, o));
      nff_pix++;
      if (nff_pix == W * H) begin nff_pix = 0; nff++; end
    end
  end

  // ------------------------------------------------ stimulus
  task automatic draw(int f);
    int ox = 30 + 20 * f, oy = 30 + 6 * f;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        obj[f][y][x] = 0;
        if (x >= ox && x < ox + 90 && y >= oy && y < oy + 70) obj[f][y][x] = 1;     // rectangle
        if (x >= 200 && x < 320 && y >= 40 && 2 * (y - 40) <= (x - 200) + 2) obj[f][y][x] = 1;  // triangle
        if (y == 230 && x >= 100 - f && x < 180 - f) obj[f][y][x] = 2;              // stick
        if (y >= 250 && y < 252 && x >= 300 && x < 302) obj[f][y][x] = 2;           // speck
        cur[f][y][x] = (obj[f][y][x] != 0 ? OBJ : BKV) + $urandom_range(0, NOISE);
      end
  endtask

  initial begin
    for (int f = 0; f < NF; f++) draw(f);
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      // current frames with their references
      for (int f = 0; f < NF; f++) begin
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++) begin
            @(negedge clk);
            while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
            in_valid = 1; in_cur = 8'(cur[f][y][x]); in_bk = 8'(BKV);
            cfg_avg_rad = (f == NF - 1) ? 2'd1 : 2'd0;
            cfg_max_rad = (f == NF - 1) ? 2'd1 : 2'd0;
            in_prev = 8'(f == 0 ? BKV : cur[f - 1][y][x]);
            while (!in_ready) @(negedge clk);
          end
        @(negedge clk); in_valid = 0;
      end
      // D(n-1) back from the frame memory
      for (int f = 0; f < NF; f++) begin
        while (nd <= f) @(negedge clk);
        for (int p = 0; p < W * H; p++) begin
          @(negedge clk);
          dprev_valid = 1; dprev_pix = 8'(dfr[f][p]);
          while (!dprev_ready) @(negedge clk);
        end
        @(negedge clk); dprev_valid = 0;
      end
    join
    while (nff < NF || nsig < NF) @(negedge clk);
    repeat (20) @(negedge clk);
    // chain code frames
    for (int f = 0; f < NF; f++) begin
      int n;
      chk(ccq.pop_front() == 8 && ccq.pop_front() == 0, "chain code frame header");
      n = 0;
      while (ccq.size() >= 2 && ccq[0] == 8 && ccq[1] == 2) begin
        int sx, sy, len, px, py;
        void'(ccq.pop_front()); void'(ccq.pop_front());
        sx = 0; sy = 0; len = 0;
        repeat (3) sx = sx * 16 + ccq.pop_front();
        repeat (3) sy = sy * 16 + ccq.pop_front();
        repeat (4) len = len * 16 + ccq.pop_front();
        px = sx; py = sy;
        repeat (len) begin
          int d;
          d = ccq.pop_front();
          px += int'(dir_dx(3'(d)));
          py += int'(dir_dy(3'(d)));
        end
        chk(px == sx && py == sy && len >= 8, $sformatf("frame %0d contour at (%0d,%0d) closes", f, sx, sy));
        chk(ccq.pop_front() == 8 && ccq.pop_front() == 3, "contour tail");
        n++;
      end
      chk(n == 2 || (f == NF - 1 && n >= 1), $sformatf("frame %0d: %0d contours, expected 2", f, n));
      chk(ccq.pop_front() == 8 && ccq.pop_front() == 1, "chain code frame tail");
    end
    chk(nt == NF && nsig == NF, $sformatf("T(n) %0d and sigma %0d outputs for %0d frames", nt, nsig, NF));
    chk(dut.ne_ovf == 0 && dut.fl_ovf == 0, "no FIFO overflow");
    foreach (cnt[k]) begin
      $display("mechanism %-20s %0d", names[k], cnt[k]);
      chk(cnt[k] > 0, $sformatf("mechanism %s never happened", names[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
