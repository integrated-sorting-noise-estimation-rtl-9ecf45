// Self-checking testbench for contour_tracer with hs_cache: draws two
// rectangle outlines (one with a diagonal dead branch), a filled square
// (whose nested contours end in a rejected 2x2 contour), a line (a dead
// branch as a whole) and an isolated pixel. Checks the chain code stream
// format, the accepted contours (start, length), that every chain closes at
// its start over white pixels of the original frame, the number of deleted
// points and rejected contours, and what is left in the cache: the isolated
// pixel and the bottom-edge pixel the rightmost-neighbour rule steps around
// after the dead branch is removed.
module tb_contour_tracer;
  import vos_pkg::*;
  localparam int W = 40, H = 24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  geom_t cfg_width = geom_t'(W), cfg_height = geom_t'(H);
  logic [15:0] cfg_min_len = 8;
  logic start = 0, busy, done, cc_valid, ev_start, ev_dead, ev_accept, ev_reject;
  logic [3:0] cc_nib;
  logic c_rd_en, c_we, t_we, l_we;
  logic signed [GEOM_W:0] c_rd_x, c_rd_y, l_rd_x, l_rd_y;
  logic l_rd_en = 0;
  logic [1:0] c_win [3][3], c_spa [4], c_wdata, t_wdata, l_wdata;
  geom_t c_wx, c_wy, t_wx, t_wy, l_wx, l_wy;
  logic t_rd_en;
  logic signed [GEOM_W:0] t_rd_x, t_rd_y;

  // the testbench loads and reads the cache while the tracer is idle
  assign c_rd_en = busy ? t_rd_en : l_rd_en;
  assign c_rd_x  = busy ? t_rd_x  : l_rd_x;
  assign c_rd_y  = busy ? t_rd_y  : l_rd_y;
  assign c_we    = busy ? t_we    : l_we;
  assign c_wx    = busy ? t_wx    : l_wx;
  assign c_wy    = busy ? t_wy    : l_wy;
  assign c_wdata = busy ? t_wdata : l_wdata;

  hs_cache #(.X_BITS(6), .DEPTH(512)) u_cache (
    .clk, .cfg_width, .cfg_height, .rd_en(c_rd_en), .rd_x(c_rd_x), .rd_y(c_rd_y),
    .win(c_win), .spa(c_spa), .we(c_we), .wx(c_wx), .wy(c_wy), .wdata(c_wdata));
  contour_tracer #(.MAX_LEN(256)) dut (
    .clk, .rst_n, .start, .cfg_width, .cfg_height, .cfg_min_len, .busy, .done,
    .c_rd_en(t_rd_en), .c_rd_x(t_rd_x), .c_rd_y(t_rd_y), .c_win, .c_spa,
    .c_we(t_we), .c_wx(t_wx), .c_wy(t_wy), .c_wdata(t_wdata),
    .cc_valid, .cc_nib, .ev_start, .ev_dead, .ev_accept, .ev_reject);

  int checks = 0, failures = 0;
  int img [H][W];
  int nib_q [$];
  int n_dead = 0, n_rej = 0, n_acc = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (cc_valid && rst_n) nib_q.push_back(int'(cc_nib));
    if (ev_dead && rst_n) n_dead++;
    if (ev_reject && rst_n) n_rej++;
    if (ev_accept && rst_n) n_acc++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rect(input int x0, y0, x1, y1, input bit fill);
    for (int y = y0; y <= y1; y++)
      for (int x = x0; x <= x1; x++)
        if (fill || y == y0 || y == y1 || x == x0 || x == x1) img[y][x] = 1;
  endtask

  function automatic int pop();
    if (nib_q.size() == 0) return -1;
    return nib_q.pop_front();
  endfunction

  int exp_x [4] = '{2, 20, 30, 31};
  int exp_y [4] = '{2, 3, 12, 13};
  int exp_l [4] = '{34, 22, 20, 12};

  initial begin
    foreach (img[y, x]) img[y][x] = 0;
    rect(2, 2, 12, 9, 0);
    for (int i = 1; i <= 3; i++) img[9 + i][6 + i] = 1;
    rect(20, 3, 27, 7, 0);
    rect(30, 12, 35, 17, 1);
    for (int x = 15; x <= 25; x++) img[20][x] = 1;
    img[20][5] = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk); l_we = 1; l_wx = geom_t'(x); l_wy = geom_t'(y); l_wdata = 2'(img[y][x]);
      end
    @(negedge clk); l_we = 0; start = 1;
    @(negedge clk); start = 0;
    wait (done);
    repeat (2) @(negedge clk);
    // decode the stream
    chk(pop() == 8 && pop() == 0, "frame header");
    for (int c = 0; c < 4; c++) begin
      int sx, sy, len, px, py, ok;
      chk(pop() == 8 && pop() == 2, $sformatf("contour %0d header", c));
      sx = 0; sy = 0; len = 0;
      repeat (3) sx = sx * 16 + pop();
      repeat (3) sy = sy * 16 + pop();
      repeat (4) len = len * 16 + pop();
      chk(sx == exp_x[c] && sy == exp_y[c] && len == exp_l[c],
          $sformatf("contour %0d at (%0d,%0d) len %0d", c, sx, sy, len));
      px = sx; py = sy; ok = 1;
      for (int i = 0; i < len; i++) begin
        int d;
        d = pop();
        if (d < 0 || d > 7 || img[py][px] != 1) ok = 0;
        px += int'(dir_dx(3'(d)));
        py += int'(dir_dy(3'(d)));
      end
      chk(ok == 1 && px == sx && py == sy, $sformatf("contour %0d chain closes over white pixels", c));
      chk(pop() == 8 && pop() == 3, $sformatf("contour %0d tail", c));
    end
    chk(pop() == 8 && pop() == 1, "frame tail");
    chk(nib_q.size() == 0, "no extra nibbles");
    chk(n_dead == 13, $sformatf("deleted points %0d", n_dead));
    chk(n_rej == 1, $sformatf("rejected contours %0d", n_rej));
    chk(n_acc == 4, $sformatf("accepted contours %0d", n_acc));
    // cache contents after tracing
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk); l_rd_en = 1; l_rd_x = (GEOM_W+1)'(x); l_rd_y = (GEOM_W+1)'(y);
        @(negedge clk); l_rd_en = 0;
        chk(int'(c_win[1][1]) == (((x == 5 && y == 20) || (x == 7 && y == 9)) ? 1 : 0), $sformatf("cache (%0d,%0d) = %0d", x, y, c_win[1][1]));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
