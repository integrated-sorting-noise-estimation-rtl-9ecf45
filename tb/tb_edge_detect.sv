// Self-checking testbench for edge_detect: frames with random blobs and with
// an object touching the border, random input gaps and output stalls, two
// thresholds. E(n) is checked against a reference that tests every 2x2
// square containing the pixel (squares reaching outside the frame count as
// not all white).
module tb_edge_detect;
  import vos_pkg::*;
  localparam int W = 15, H = 11, NF = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  geom_t cfg_width = geom_t'(W), cfg_height = geom_t'(H);
  logic [7:0] cfg_thr, in_d;
  logic in_valid = 0, in_ready, out_valid, out_e, out_b, out_sof, out_eof, out_ready = 1;
  edge_detect #(.MAX_W(32)) dut (.*);
  int checks = 0, failures = 0;
  int d [H][W];
  int ex [H][W], bb [H][W];
  int thr [NF] = '{100, 50, 128};
  int edges = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bw(input int y, input int x);
    if (y < 0 || y >= H || x < 0 || x >= W) return 0;
    return bb[y][x];
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          if (f == 0) d[y][x] = (x >= 3 && x < 10 && y >= 2 && y < 8) ? 200 : 20;
          else if (f == 1) d[y][x] = $urandom_range(0, 120);
          else d[y][x] = (x < 6 || (y > 4 && x < 12)) ? 250 : 0;
          bb[y][x] = d[y][x] > thr[f];
        end
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          ex[y][x] = 0;
          if (bb[y][x])
            for (int a = y - 1; a <= y; a++)
              for (int b = x - 1; b <= x; b++)
                if (!(bw(a, b) && bw(a + 1, b) && bw(a, b + 1) && bw(a + 1, b + 1))) ex[y][x] = 1;
        end
      fork
        begin
          for (int y = 0; y < H; y++)
            for (int x = 0; x < W; x++) begin
              @(negedge clk);
              while ($urandom_range(0, 4) == 0) begin in_valid = 0; @(negedge clk); end
              in_valid = 1; in_d = 8'(d[y][x]); cfg_thr = 8'(thr[f]);
              while (!in_ready) @(negedge clk);
            end
          @(negedge clk); in_valid = 0;
        end
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++) begin
            do begin
              @(posedge clk); #1 out_ready = ($urandom_range(0, 3) != 0);
              @(negedge clk);
            end while (!(out_valid && out_ready));
            checks++;
            edges += out_e;
            if (int'(out_e) != ex[y][x] || int'(out_b) != bb[y][x] || out_sof != (x == 0 && y == 0) || out_eof != (x == W - 1 && y == H - 1)) begin
              failures++; $display("frame %0d (%0d,%0d): e %0d b %0d expected %0d %0d", f, x, y, out_e, out_b, ex[y][x], bb[y][x]);
            end
          end
      join
      @(negedge clk); in_valid = 0;
    end
    checks++;
    if (edges == 0) begin failures++; $display("no edge seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
