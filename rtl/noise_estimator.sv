// NOISE ESTIMATOR: homogeneity-based estimate of the noise variance of a
// frame (Eq. 3.1 - 3.4), using the modified counting sort.
//
// How it works:
//  - LINE BUFFERS (four lb_ram) and a 5x5 register window cut the frame
//    into non-overlapping W x W blocks, W = 5 (blocks at the right and bottom
//    that do not fit are skipped, this design's choice).
//  - 2D LOW-PASS FILTER / BLOCK VARIANCE: sum and sum of squares of the
//    block; variance = (25*sum(I^2) - sum(I)^2) / 625 (Eq. 3.2, 3.3),
//    the division done as a multiply by round(2^22/625).
//  - HIGH-PASS FILTERS: eight 5-tap directional filters 4*I(c) minus the
//    other four taps (Eq. 3.1) through the block centre; their absolute
//    values summed give xi. The tap sets of the six oblique directions are
//    this design's choice (the document only shows the horizontal mask).
//  - The variance goes to a double-banked VARIANCE RAM at the block index;
//    xi goes through a key FIFO into counting_sort (KEY_W = 13 bits holds
//    the largest xi, 8160).
//  - The sorted block indexes address the VARIANCE RAM; the variances of
//    the top 10 % (at least three) are kept in a selection RAM. sigma_REF^2
//    is the median of the first three (Eq. 3.4 text).
//  - LOG/SELECT: log2_fx of each selected variance is compared with that
//    of sigma_REF^2; variances with |difference| < cfg_tsig are summed and
//    counted, and a sequential divider gives the average sigma_n^2. With no
//    variance selected the result is sigma_REF^2.
//
// Interface/timing: in_valid/in_pix raster stream, frame size from
// cfg_width/cfg_height, latched at the first pixel of a frame. sigma2_valid
// pulses with sigma2 after the frame's sort finishes (about 2^13 + 2 x
// blocks + 10 % of blocks + 40 cycles after the last block). cfg_tsig is in
// log2 units with FRAC_W = 4 fraction bits.
module noise_estimator
  import vos_pkg::*;
#(
  parameter int unsigned MAX_W  = 2048,
  parameter int unsigned PIX_W  = 8,
  parameter int unsigned N_BLK  = 8192,   // blocks per frame, maximum
  parameter int unsigned VAR_W  = 16,
  parameter int unsigned KFIFO  = 1024,   // key FIFO depth
  localparam int unsigned KEY_W = 13,
  localparam int unsigned IDX_W = $clog2(N_BLK),
  localparam int unsigned LOG_W = $clog2(VAR_W) + 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  geom_t            cfg_width,
  input  geom_t            cfg_height,
  input  logic [LOG_W-1:0] cfg_tsig,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] in_pix,
  output logic             sigma2_valid,
  output logic [VAR_W-1:0] sigma2,
  output logic             ev_block,       // one block measured
  output logic             ev_select,      // one variance passed Eq. 3.4
  output logic             overflow        // key FIFO overflow
);
  localparam int unsigned W = 5;
  localparam int unsigned LAW = $clog2(MAX_W);

  // ---------------------------------------------------------------- blocks
  geom_t x, y, w, h;
  logic [2:0] xm, ym;
  logic [PIX_W-1:0] col [W];          // column entering the window, row y-4 .. y
  logic [PIX_W-1:0] win [W][W];       // [row][col], col 4 newest
  logic [IDX_W:0]   nblk, bidx;

  lb_ram #(.DEPTH(MAX_W), .WIDTH(PIX_W)) u_lb0 (.clk, .we(in_valid), .addr(LAW'(x)), .wdata(in_pix), .rdata(col[3]));
  lb_ram #(.DEPTH(MAX_W), .WIDTH(PIX_W)) u_lb1 (.clk, .we(in_valid), .addr(LAW'(x)), .wdata(col[3]), .rdata(col[2]));
  lb_ram #(.DEPTH(MAX_W), .WIDTH(PIX_W)) u_lb2 (.clk, .we(in_valid), .addr(LAW'(x)), .wdata(col[2]), .rdata(col[1]));
  lb_ram #(.DEPTH(MAX_W), .WIDTH(PIX_W)) u_lb3 (.clk, .we(in_valid), .addr(LAW'(x)), .wdata(col[1]), .rdata(col[0]));
  assign col[4] = in_pix;

  logic  frame0;
  geom_t cur_w, cur_h;
  assign frame0 = (x == 0) && (y == 0);
  assign cur_w  = frame0 ? cfg_width  : w;
  assign cur_h  = frame0 ? cfg_height : h;

  logic blk_done;                      // window holds a full block (next cycle)
  logic blk_last;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {x, y, w, h, xm, ym, nblk, bidx, blk_done, blk_last} <= '0;
      win <= '{default: '0};
    end else begin
      blk_done <= 1'b0;
      if (in_valid) begin
        if (frame0) begin
          w <= cfg_width; h <= cfg_height;
          // number of blocks, division by 5 as multiply by 13108 / 2^16
          nblk <= (IDX_W+1)'(((32'(cfg_width) * 13108) >> 16) * ((32'(cfg_height) * 13108) >> 16));
          bidx <= '0;
        end
        for (int r = 0; r < W; r++) begin
          for (int c = 0; c < W - 1; c++) win[r][c] <= win[r][c+1];
          win[r][W-1] <= col[r];
        end
        if (xm == 3'd4 && ym == 3'd4) begin
          blk_done <= 1'b1;
          blk_last <= (bidx + 1'b1 == nblk);
        end
        if (32'(x) + 1 == 32'(cur_w)) begin
          x  <= '0;
          xm <= '0;
          if (32'(y) + 1 == 32'(cur_h)) begin
            y <= '0; ym <= '0;
          end else begin
            y  <= y + 1'b1;
            ym <= (ym == 3'd4) ? 3'd0 : ym + 1'b1;
          end
        end else begin
          x  <= x + 1'b1;
          xm <= (xm == 3'd4) ? 3'd0 : xm + 1'b1;
        end
      end
      if (blk_done) bidx <= blk_last ? '0 : bidx + 1'b1;
    end
  end

  // ------------------------------------------ block statistics (two stages)
  function automatic logic [PIX_W+3:0] hp(input logic [PIX_W-1:0] c,
      input logic [PIX_W-1:0] a, b, d, e);
    logic signed [PIX_W+3:0] s;
    s = $signed({2'b00, c, 2'b00}) - $signed((PIX_W+4)'(a)) - $signed((PIX_W+4)'(b))
        - $signed((PIX_W+4)'(d)) - $signed((PIX_W+4)'(e));
    return (s < 0) ? (PIX_W+4)'(-s) : (PIX_W+4)'(s);
  endfunction

  logic [PIX_W+4:0]   sum_c;
  logic [2*PIX_W+4:0] sq_c;
  logic [KEY_W-1:0]   xi_c;
  always_comb begin
    logic [PIX_W-1:0] c;
    sum_c = '0;
    sq_c  = '0;
    for (int r = 0; r < W; r++)
      for (int k = 0; k < W; k++) begin
        sum_c = sum_c + (PIX_W+5)'(win[r][k]);
        sq_c  = sq_c + (2*PIX_W+5)'(win[r][k] * win[r][k]);
      end
    c = win[2][2];
    xi_c = KEY_W'(hp(c, win[2][0], win[2][1], win[2][3], win[2][4]))   // 0
         + KEY_W'(hp(c, win[3][0], win[3][1], win[1][3], win[1][4]))   // 22.5
         + KEY_W'(hp(c, win[4][0], win[3][1], win[1][3], win[0][4]))   // 45
         + KEY_W'(hp(c, win[4][1], win[3][1], win[1][3], win[0][3]))   // 67.5
         + KEY_W'(hp(c, win[0][2], win[1][2], win[3][2], win[4][2]))   // 90
         + KEY_W'(hp(c, win[4][3], win[3][3], win[1][1], win[0][1]))   // 112.5
         + KEY_W'(hp(c, win[0][0], win[1][1], win[3][3], win[4][4]))   // 135
         + KEY_W'(hp(c, win[1][0], win[1][1], win[3][3], win[3][4]));  // 157.5
  end

  logic               s1_v, s1_last, s2_v, s2_last;
  logic [PIX_W+4:0]   s1_sum;
  logic [2*PIX_W+4:0] s1_sq;
  logic [KEY_W-1:0]   s1_xi, s2_xi;
  logic [IDX_W-1:0]   s1_idx, s2_idx;
  logic [VAR_W-1:0]   s2_var;
  logic               wbank;             // VARIANCE RAM bank being written

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {s1_v, s1_last, s2_v, s2_last, s1_sum, s1_sq, s1_xi, s2_xi, s1_idx, s2_idx, s2_var, wbank} <= '0;
    end else begin
      s1_v    <= blk_done;
      s1_last <= blk_last;
      s1_sum  <= sum_c;
      s1_sq   <= sq_c;
      s1_xi   <= xi_c;
      s1_idx  <= IDX_W'(bidx);
      s2_v    <= s1_v;
      s2_last <= s1_last;
      s2_xi   <= s1_xi;
      s2_idx  <= s1_idx;
      s2_var  <= VAR_W'(((64'(s1_sq) * 25 - 64'(s1_sum) * 64'(s1_sum)) * 6711) >> 22);
      if (s2_v && s2_last) wbank <= ~wbank;
    end
  end
  assign ev_block = s2_v;

  // ------------------------------------------------------- VARIANCE RAM
  logic             vr_re;
  logic [IDX_W:0]   vr_raddr;
  logic [VAR_W-1:0] vr_rdata;
  sdp_ram #(.DEPTH(2 * N_BLK), .WIDTH(VAR_W)) u_varram (
    .clk, .we(s2_v && rst_n), .waddr({wbank, s2_idx}), .wdata(s2_var),
    .re(vr_re), .raddr(vr_raddr), .rdata(vr_rdata)
  );

  // ------------------------------------------------ key FIFO and SORT
  logic               kf_rd, kf_empty, kf_full, kf_pop_q;
  logic [KEY_W:0]     kf_q;
  logic [$clog2(KFIFO):0] kf_count;
  sync_fifo #(.DEPTH(KFIFO), .WIDTH(KEY_W + 1)) u_keyfifo (
    .clk, .rst_n, .wr_en(s2_v), .wr_data({s2_last, s2_xi}), .rd_en(kf_rd),
    .rd_data(kf_q), .empty(kf_empty), .full(kf_full), .count(kf_count),
    .overflow
  );

  logic             hv, hl, s_ready;
  logic [KEY_W-1:0] hk;
  assign kf_rd = !kf_empty && !hv && !kf_pop_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {hv, hl, hk, kf_pop_q} <= '0;
    end else begin
      kf_pop_q <= kf_rd;
      if (kf_pop_q)          {hv, hl, hk} <= {1'b1, kf_q};
      else if (hv && s_ready) hv <= 1'b0;
    end
  end

  logic               so_valid, so_last, so_idle;
  logic [KEY_W-1:0]   so_key;
  logic [IDX_W-1:0]   so_idx;
  counting_sort #(.KEY_W(KEY_W), .N_MAX(N_BLK)) u_sort (
    .clk, .rst_n, .in_valid(hv), .in_key(hk), .in_last(hl), .in_ready(s_ready),
    .out_valid(so_valid), .out_key(so_key), .out_idx(so_idx), .out_last(so_last),
    .idle(so_idle)
  );

  // ------------------------------------- selection of the top 10 %
  localparam int unsigned NSEL = N_BLK / 10 + 3;
  localparam int unsigned SW   = $clog2(NSEL + 1);
  logic             rbank;              // bank of the frame leaving the sort
  logic [IDX_W:0]   rank, nsel;
  logic             sel_d, last_d;
  logic [SW-1:0]    sel_wa;
  logic [VAR_W-1:0] v0, v1, v2;
  logic             ev_done;

  assign vr_re    = so_valid;
  assign vr_raddr = {rbank, so_idx};

  logic             sr_we, sr_re;
  logic [SW-1:0]    sr_raddr;
  logic [VAR_W-1:0] sr_rdata;
  sdp_ram #(.DEPTH(NSEL), .WIDTH(VAR_W)) u_selram (
    .clk, .we(sr_we), .waddr(sel_wa), .wdata(vr_rdata),
    .re(sr_re), .raddr(sr_raddr), .rdata(sr_rdata)
  );
  assign sr_we = sel_d && rst_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {rbank, rank, nsel, sel_d, last_d, sel_wa, v0, v1, v2, ev_done} <= '0;
    end else begin
      ev_done <= 1'b0;
      sel_d   <= 1'b0;
      last_d  <= so_valid && so_last;
      if (so_valid) begin
        if (rank == 0) begin
          // 10 % of the blocks, at least three (x 6554 / 2^16)
          nsel <= ((32'(nblk) * 6554) >> 16) < 3 ? (IDX_W+1)'(3)
                                                 : (IDX_W+1)'((32'(nblk) * 6554) >> 16);
        end
        if (rank == 0 || rank < nsel) begin
          sel_d  <= 1'b1;
          sel_wa <= SW'(rank);
        end
        rank <= so_last ? '0 : rank + 1'b1;
        if (so_last) rbank <= ~rbank;
      end
      if (sel_d) begin
        if (sel_wa == 0) v0 <= vr_rdata;
        if (sel_wa == 1) v1 <= vr_rdata;
        if (sel_wa == 2) v2 <= vr_rdata;
      end
      if (last_d) ev_done <= 1'b1;
    end
  end

  // --------------------------------------------- LOG/SELECT, average
  typedef enum logic [2:0] {E_IDLE, E_REF, E_RD, E_CMP, E_DIV, E_OUT} est_e;
  est_e est;
  logic [VAR_W-1:0]     vref;
  logic [LOG_W-1:0]     lref, lv;
  logic [SW-1:0]        j, jn;
  logic [VAR_W+IDX_W:0] acc, quo, rem_v;
  logic [IDX_W:0]       cnt;
  logic [6:0]           dstep;

  log2_fx #(.IN_W(VAR_W), .FRAC_W(4)) u_logr (.v(vref), .y(lref));
  log2_fx #(.IN_W(VAR_W), .FRAC_W(4)) u_logv (.v(sr_rdata), .y(lv));

  assign sr_re    = (est == E_RD);
  assign sr_raddr = j;

  function automatic logic [VAR_W-1:0] med3(input logic [VAR_W-1:0] a, b, c);
    if ((a >= b && a <= c) || (a <= b && a >= c)) return a;
    if ((b >= a && b <= c) || (b <= a && b >= c)) return b;
    return c;
  endfunction

  logic [LOG_W:0] ldiff;
  assign ldiff = (lv > lref) ? (LOG_W+1)'(lv - lref) : (LOG_W+1)'(lref - lv);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      est <= E_IDLE;
      {vref, j, jn, acc, quo, rem_v, cnt, dstep, sigma2, sigma2_valid, ev_select} <= '0;
    end else begin
      sigma2_valid <= 1'b0;
      ev_select    <= 1'b0;
      unique case (est)
        E_IDLE: if (ev_done) begin
          vref <= med3(v0, v1, v2);
          jn   <= SW'(nsel);
          est  <= E_REF;
        end
        E_REF: begin
          j <= '0; acc <= '0; cnt <= '0;
          est <= E_RD;
        end
        E_RD: est <= E_CMP;
        E_CMP: begin
          if (ldiff < (LOG_W+1)'(cfg_tsig)) begin
            acc <= acc + (VAR_W+IDX_W+1)'(sr_rdata);
            cnt <= cnt + 1'b1;
            ev_select <= 1'b1;
          end
          j <= j + 1'b1;
          if (j + 1'b1 == jn) begin
            quo <= '0; rem_v <= '0; dstep <= '0;
            est <= E_DIV;
          end else begin
            est <= E_RD;
          end
        end
        E_DIV: begin
          // restoring division acc / cnt, one quotient bit per cycle
          logic [VAR_W+IDX_W+1:0] r2;
          r2 = {rem_v, acc[VAR_W+IDX_W - int'(dstep)]};
          if (cnt != 0 && r2 >= (VAR_W+IDX_W+2)'(cnt)) begin
            rem_v <= (VAR_W+IDX_W+1)'(r2 - (VAR_W+IDX_W+2)'(cnt));
            quo   <= {quo[VAR_W+IDX_W-1:0], 1'b1};
          end else begin
            rem_v <= (VAR_W+IDX_W+1)'(r2);
            quo   <= {quo[VAR_W+IDX_W-1:0], 1'b0};
          end
          dstep <= dstep + 1'b1;
          if (int'(dstep) == VAR_W + IDX_W) est <= E_OUT;
        end
        E_OUT: begin
          sigma2       <= (cnt == 0) ? vref : ((quo >> VAR_W) != 0 ? '1 : VAR_W'(quo));
          sigma2_valid <= 1'b1;
          est          <= E_IDLE;
        end
        default: est <= E_IDLE;
      endcase
    end
  end
endmodule
