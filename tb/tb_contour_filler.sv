// Self-checking testbench for contour_filler with hs_cache and an SRAM
// model: feeds the chain code stream of a rectangle, a diamond and a
// rectangle nested in the first one, and compares the filled frame read
// out of the SRAM with the expected labels (the SRAM starts with random
// contents, so the clear is checked too). Also checks both seed elements
// fired and the cache is left clean.
module tb_contour_filler;
  import vos_pkg::*;
  localparam int W = 30, H = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  geom_t cfg_width = geom_t'(W), cfg_height = geom_t'(H);
  logic frame_start = 0, cc_valid = 0, hold = 0;
  logic [3:0] cc_nib;
  logic c_rd_en, c_we, sram_we, sram_re, ff_valid, ff_sof, ff_eof, busy, done;
  logic ev_seed0, ev_seed1, ev_fill, ev_contour, fifo_overflow;
  logic signed [GEOM_W:0] c_rd_x, c_rd_y;
  logic [1:0] c_win [3][3], c_spa [4], c_wdata;
  geom_t c_wx, c_wy;
  logic [19:0] sram_addr;
  logic [15:0] sram_wdata, sram_rdata, ff_label;
  logic tb_rd = 0;
  logic signed [GEOM_W:0] tb_x, tb_y;

  hs_cache #(.X_BITS(5), .DEPTH(256)) u_cache (
    .clk, .cfg_width, .cfg_height, .rd_en(c_rd_en | tb_rd),
    .rd_x(tb_rd ? tb_x : c_rd_x), .rd_y(tb_rd ? tb_y : c_rd_y),
    .win(c_win), .spa(c_spa), .we(c_we), .wx(c_wx), .wy(c_wy), .wdata(c_wdata));
  contour_filler #(.MAX_LEN(256), .FIFO_DEPTH(1024)) dut (.*);

  logic [15:0] sram [W*H];
  always @(posedge clk) begin
    if (sram_we) sram[sram_addr] <= sram_wdata;
    if (sram_re) sram_rdata <= sram[sram_addr];
  end

  int checks = 0, failures = 0;
  int expv [H][W];
  int s0 = 0, s1 = 0, nfill = 0, ncont = 0;
  always @(posedge clk) if (rst_n) begin
    s0 += int'(ev_seed0); s1 += int'(ev_seed1); nfill += int'(ev_fill); ncont += int'(ev_contour);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic nib(input int v);
    @(negedge clk); cc_valid = 1; cc_nib = 4'(v);
    @(negedge clk); cc_valid = 0;
  endtask

  task automatic seg(input int x, y, input int codes [$]);
    nib(8); nib(2);
    nib(x >> 8); nib((x >> 4) & 15); nib(x & 15);
    nib(y >> 8); nib((y >> 4) & 15); nib(y & 15);
    for (int k = 3; k >= 0; k--) nib((codes.size() >> (4 * k)) & 15);
    foreach (codes[k]) nib(codes[k]);
    nib(8); nib(3);
  endtask

  function automatic void rect_codes(input int w, h, ref int q [$]);
    q = {};
    repeat (h - 1) q.push_back(6);
    repeat (w - 1) q.push_back(0);
    repeat (h - 1) q.push_back(2);
    repeat (w - 1) q.push_back(4);
  endfunction

  initial begin
    int q [$];
    foreach (sram[a]) sram[a] = 16'($urandom);
    foreach (expv[y, x]) expv[y][x] = 0;
    for (int y = 2; y <= 12; y++) for (int x = 1; x <= 12; x++) expv[y][x] = 1;
    for (int y = 3; y <= 17; y++) for (int x = 14; x <= 28; x++)
      if ((x > 21 ? x - 21 : 21 - x) + (y > 10 ? y - 10 : 10 - y) <= 7) expv[y][x] = 2;
    for (int y = 5; y <= 9; y++) for (int x = 4; x <= 8; x++) expv[y][x] = 3;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); frame_start = 1;
    @(negedge clk); frame_start = 0;
    nib(8); nib(0);
    rect_codes(12, 11, q); seg(1, 2, q);
    q = {};
    repeat (7) q.push_back(5);
    repeat (7) q.push_back(7);
    repeat (7) q.push_back(1);
    repeat (7) q.push_back(3);
    seg(21, 3, q);
    rect_codes(5, 5, q); seg(4, 5, q);
    nib(8); nib(1);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(posedge clk);
        while (!ff_valid) @(posedge clk);
        chk(ff_sof == (x == 0 && y == 0) && ff_eof == (x == W - 1 && y == H - 1), "sof/eof");
        chk(int'(ff_label) == expv[y][x], $sformatf("label (%0d,%0d) = %0d expected %0d", x, y, ff_label, expv[y][x]));
      end
    chk(ncont == 3, "contours");
    chk(s0 > 0 && s1 == 0, $sformatf("seeds PE-0 %0d PE-1 %0d", s0, s1));
    chk(fifo_overflow == 0, "fifo overflow");
    repeat (3) @(negedge clk);
    chk(!busy, "idle after frame");
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        @(negedge clk); tb_rd = 1; tb_x = (GEOM_W+1)'(x); tb_y = (GEOM_W+1)'(y);
        @(negedge clk); tb_rd = 0;
        chk(c_win[1][1] == 2'b00, "cache clean");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
