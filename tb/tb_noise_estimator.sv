// Self-checking testbench for noise_estimator: streams frames of flat areas
// with random noise of different amplitudes plus structured blocks (ramps
// and edges), and compares sigma_n^2 with a reference model here (same
// blocks, filters, integer variance, stable sort by homogeneity, top 10 %
// with at least three, median reference, log2 test, average). Frames are
// spaced so that the sort (about 8.3K cycles per frame here) keeps up, one
// of them closely, so that the next frame streams while the sort and the
// averaging of the previous one run. The sorted homogeneity stream inside
// the estimator is also checked: every block once per frame, keys in
// non-decreasing order.
module tb_noise_estimator;
  import vos_pkg::*;
  localparam int W = 42, H = 31;            // 8 x 6 blocks, partial edges
  localparam int NBX = W / 5, NBY = H / 5, NB = NBX * NBY;
  localparam int NF = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  geom_t cfg_width = geom_t'(W), cfg_height = geom_t'(H);
  logic [7:0] cfg_tsig = 8'd24;             // 1.5 in log2 units
  logic in_valid = 0;
  logic [7:0] in_pix;
  logic sigma2_valid, ev_block, ev_select, overflow;
  logic [15:0] sigma2;
  noise_estimator #(.MAX_W(64), .N_BLK(64), .KFIFO(64)) dut (.*);

  int checks = 0, failures = 0;
  int img [NF][H][W];
  int exp_s [NF];
  int got = 0, nsel_ev = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("timeout: %0d results, expected %p", got, exp_s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int hpf(int c, int a, int b, int d, int e);
    int s = 4 * c - a - b - d - e;
    return s < 0 ? -s : s;
  endfunction

  function automatic int lg(int v);
    int p = 0;
    if (v == 0) return 0;
    for (int b = 0; b < 16; b++) if (v & (1 << b)) p = b;
    return p * 16 + (((v << (15 - p)) >> 11) & 15);
  endfunction

  function automatic int model(int f);
    int xi [NB], vr [NB], ord [NB], nsel, ref_v, a, b, c, acc, cnt;
    for (int by = 0; by < NBY; by++)
      for (int bx = 0; bx < NBX; bx++) begin
        int p [5][5], s, q, k;
        k = by * NBX + bx;
        s = 0; q = 0;
        for (int r = 0; r < 5; r++) for (int cc = 0; cc < 5; cc++) begin
          p[r][cc] = img[f][by * 5 + r][bx * 5 + cc];
          s += p[r][cc]; q += p[r][cc] * p[r][cc];
        end
        vr[k] = int'((longint'(25 * q - s * s) * 6711) >>> 22);
        xi[k] = hpf(p[2][2], p[2][0], p[2][1], p[2][3], p[2][4]) + hpf(p[2][2], p[3][0], p[3][1], p[1][3], p[1][4])
              + hpf(p[2][2], p[4][0], p[3][1], p[1][3], p[0][4]) + hpf(p[2][2], p[4][1], p[3][1], p[1][3], p[0][3])
              + hpf(p[2][2], p[0][2], p[1][2], p[3][2], p[4][2]) + hpf(p[2][2], p[4][3], p[3][3], p[1][1], p[0][1])
              + hpf(p[2][2], p[0][0], p[1][1], p[3][3], p[4][4]) + hpf(p[2][2], p[1][0], p[1][1], p[3][3], p[3][4]);
      end
    // stable sort by xi
    for (int k = 0; k < NB; k++) ord[k] = k;
    for (int i = 1; i < NB; i++)
      for (int j = i; j > 0 && xi[ord[j - 1]] > xi[ord[j]]; j--) begin
        int t = ord[j]; ord[j] = ord[j - 1]; ord[j - 1] = t;
      end
    nsel = (NB * 6554) >> 16;
    if (nsel < 3) nsel = 3;
    a = vr[ord[0]]; b = vr[ord[1]]; c = vr[ord[2]];
    if ((a >= b && a <= c) || (a <= b && a >= c)) ref_v = a;
    else if ((b >= a && b <= c) || (b <= a && b >= c)) ref_v = b;
    else ref_v = c;
    acc = 0; cnt = 0;
    for (int i = 0; i < nsel; i++) begin
      int d = lg(vr[ord[i]]) - lg(ref_v);
      if (d < 0) d = -d;
      if (d < int'(cfg_tsig)) begin acc += vr[ord[i]]; cnt++; end
    end
    return cnt == 0 ? ref_v : acc / cnt;
  endfunction

  // sorted homogeneity stream inside the estimator: per frame every block
  // index once, keys in non-decreasing order
  int so_n = 0, so_prev = 0;
  bit so_seen [int];
  always @(posedge clk) if (rst_n && dut.so_valid) begin
    checks++;
    if (so_n > 0 && int'(dut.so_key) < so_prev) begin
      failures++; $display("sorted keys out of order: %0d after %0d", dut.so_key, so_prev);
    end
    checks++;
    if (so_seen.exists(int'(dut.so_idx))) begin
      failures++; $display("block index %0d sorted twice", dut.so_idx);
    end
    so_seen[int'(dut.so_idx)] = 1'b1;
    so_prev = int'(dut.so_key);
    so_n++;
    if (dut.so_last) begin
      checks++;
      if (so_n != (W / 5) * (H / 5)) begin
        failures++; $display("sorted %0d blocks, expected %0d", so_n, (W / 5) * (H / 5));
      end
      so_n = 0; so_seen.delete();
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (ev_select) nsel_ev++;
    if (sigma2_valid) begin
      checks++;
      if (got >= NF || int'(sigma2) != exp_s[got]) begin
        failures++;
        $display("frame %0d sigma2 %0d expected %0d", got, sigma2, got < NF ? exp_s[got] : -1);
      end
      got++;
    end
  end

  initial begin
    for (int f = 0; f < NF; f++) begin
      int amp;
      amp = 2 + 5 * f;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          int v;
          v = 100 + $urandom_range(0, amp);
          if (x >= 20 && x < 30) v = 20 + (x - 20) * (x - 20) + 2 * y;       // curved ramp
          if (y >= 20 && y < 25 && x < 15) v = ((x + y) % 3 == 0) ? 240 : 10;  // texture
          if (v > 255) v = 255;
          img[f][y][x] = v;
        end
      exp_s[f] = model(f);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          @(negedge clk); in_valid = 1; in_pix = 8'(img[f][y][x]);
          if ($urandom_range(0, 3) == 0) begin
            @(negedge clk); in_valid = 0;
          end
          if (y == H - 1 && x == W - 1 && f == 1) begin
            // frame 2 follows within the sort time of frame 1 (key FIFO)
            @(negedge clk); in_valid = 0;
            repeat (3000) @(negedge clk);
          end else if (y == H - 1 && x == W - 1) begin
            @(negedge clk); in_valid = 0;
            repeat (9000) @(negedge clk);
          end
        end
    @(negedge clk); in_valid = 0;
    wait (got == NF);
    repeat (10) @(negedge clk);
    checks++;
    if (nsel_ev == 0 || overflow) begin failures++; $display("no selected variance or overflow"); end
    $display("expected %p, selected %0d", exp_s, nsel_ev);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
