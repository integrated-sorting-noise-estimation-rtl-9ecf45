// Self-checking testbench for hs_cache: fills a frame with random pixels,
// then reads windows and start pixel arrays at random positions (including
// the frame border and outside it) and at every position of a small region,
// comparing with a copy kept here; also checks that a write is seen by the
// next read.
module tb_hs_cache;
  import vos_pkg::*;
  localparam int W = 37, H = 21;
  logic clk = 0;
  always #5 clk = ~clk;
  geom_t cfg_width = geom_t'(W), cfg_height = geom_t'(H);
  logic rd_en = 0, we = 0;
  logic signed [GEOM_W:0] rd_x, rd_y;
  logic [1:0] win [3][3], spa [4], wdata;
  geom_t wx, wy;
  hs_cache #(.X_BITS(6), .DEPTH(512)) dut (.*);
  int checks = 0, failures = 0;
  int img [H][W];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int px(input int y, input int x);
    if (y < 0 || x < 0 || y >= H || x >= W) return 0;
    return img[y][x];
  endfunction

  task automatic check_at(input int x, input int y);
    @(negedge clk); rd_en = 1; rd_x = (GEOM_W+1)'(x); rd_y = (GEOM_W+1)'(y);
    @(negedge clk); rd_en = 0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        checks++;
        if (int'(win[r][c]) != px(y - 1 + r, x - 1 + c)) begin
          failures++; $display("win (%0d,%0d)[%0d][%0d] = %0d expected %0d", x, y, r, c, win[r][c], px(y - 1 + r, x - 1 + c));
        end
      end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (int'(spa[c]) != px(y, x - 1 + c)) begin failures++; $display("spa (%0d,%0d)[%0d]", x, y, c); end
    end
  endtask

  initial begin
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        img[y][x] = $urandom_range(0, 3);
        @(negedge clk); we = 1; wx = geom_t'(x); wy = geom_t'(y); wdata = 2'(img[y][x]);
      end
    @(negedge clk); we = 0;
    for (int i = 0; i < 200; i++) check_at($urandom_range(0, W + 1) - 1, $urandom_range(0, H + 1) - 1);
    for (int y = 0; y < 6; y++) for (int x = 0; x < 6; x++) check_at(x, y);
    // write then read at once
    @(negedge clk); we = 1; wx = 10; wy = 7; wdata = 2'(~img[7][10]); img[7][10] = 3 - img[7][10];
    check_at(11, 8);
    we = 0;
    check_at(10, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
