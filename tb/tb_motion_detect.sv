// Self-checking testbench for motion_detect (and its win5_filter stages).
// Three small frames with random sizes of both filters, both reference modes,
// random input gaps and random output stalls. The expected D(n) is computed
// here directly from the definition (absolute difference, zero-padded
// centred average with rounding, centred maximum).
module tb_motion_detect;
  import vos_pkg::*;
  localparam int W = 13, H = 9, NF = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  geom_t cfg_width = geom_t'(W), cfg_height = geom_t'(H);
  logic [1:0] cfg_avg_rad, cfg_max_rad;
  logic cfg_ref_bk;
  logic in_valid = 0, in_ready, out_valid, out_sof, out_eof, out_ready;
  logic [7:0] in_cur, in_prev, in_bk, out_d;
  motion_detect #(.MAX_W(32)) dut (.*);

  int checks = 0, failures = 0;
  int cur [H][W], prv [H][W], bk [H][W], ad [H][W], av [H][W], ex [H][W];
  int avg_r [NF] = '{1, 2, 0, 2};
  int max_r [NF] = '{1, 0, 2, 2};
  bit refbk [NF] = '{0, 1, 0, 1};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int filt(input int src [H][W], input int y, input int x, input int r, input bit is_max);
    int s = 0, m = 0, n = (2 * r + 1) * (2 * r + 1);
    for (int dy = -r; dy <= r; dy++)
      for (int dx = -r; dx <= r; dx++)
        if (y + dy >= 0 && y + dy < H && x + dx >= 0 && x + dx < W) begin
          s += src[y + dy][x + dx];
          if (src[y + dy][x + dx] > m) m = src[y + dy][x + dx];
        end
    if (is_max) return m;
    if (r == 0) return s;
    return (s * (r == 1 ? 7282 : 2621) + 32768) >>> 16;
  endfunction

  initial begin
    out_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          cur[y][x] = (f == 3) ? ((x > 4 && x < 9 && y > 2) ? 200 : 10) : $urandom_range(0, 255);
          prv[y][x] = $urandom_range(0, 255);
          bk[y][x]  = (f == 3) ? 10 : $urandom_range(0, 255);
          ad[y][x]  = refbk[f] ? (cur[y][x] > bk[y][x] ? cur[y][x] - bk[y][x] : bk[y][x] - cur[y][x])
                               : (cur[y][x] > prv[y][x] ? cur[y][x] - prv[y][x] : prv[y][x] - cur[y][x]);
        end
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) av[y][x] = filt(ad, y, x, avg_r[f], 0);
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) ex[y][x] = filt(av, y, x, max_r[f], 1);
      fork
        begin
          for (int y = 0; y < H; y++)
            for (int x = 0; x < W; x++) begin
              @(negedge clk);
              while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
              in_valid = 1; in_cur = 8'(cur[y][x]); in_prev = 8'(prv[y][x]); in_bk = 8'(bk[y][x]);
              cfg_avg_rad = 2'(avg_r[f]); cfg_max_rad = 2'(max_r[f]); cfg_ref_bk = refbk[f];
              while (!in_ready) @(negedge clk);
            end
          @(negedge clk); in_valid = 0;
        end
        begin
          for (int y = 0; y < H; y++)
            for (int x = 0; x < W; x++) begin
              do begin
                @(posedge clk);
                #1 out_ready = ($urandom_range(0, 4) != 0);
                @(negedge clk);
              end while (!(out_valid && out_ready));
              checks++;
              if (int'(out_d) != ex[y][x] || out_sof != (x == 0 && y == 0) || out_eof != (x == W - 1 && y == H - 1)) begin
                failures++;
                $display("frame %0d (%0d,%0d): got %0d sof %0d eof %0d expected %0d", f, x, y, out_d, out_sof, out_eof, ex[y][x]);
              end
            end
        end
      join
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
