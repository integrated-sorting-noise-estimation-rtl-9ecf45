// VOS_TOP: video object segmentation system on one device: noise
// estimation, object detection (motion detection, spatio-temporal
// thresholding, morphological edge detection), contour tracing and contour
// filling.
//
// How it works (data flow per frame n):
//  - The current frame I(n) arrives as a pixel stream together with the
//    reference pixels I(n-1) and BK(n), which the external memory system
//    (DDR through the DMA, see dma.sv, which is not instantiated here)
//    delivers in step with it.
//  - noise_estimator measures sigma_n^2 of I(n); the latest value feeds the
//    thresholding.
//  - motion_detect produces D(n); D(n) leaves on the d_out port (for the
//    external frame memory) and enters st_threshold, which gives T(n) at the
//    end of the frame.
//  - edge_detect reads D(n-1) back from the external memory (dprev_* port)
//    and binarizes it with the latest T(n), producing E(n-1).
//  - The edge frame is written into hs_cache; contour_tracer then traces it
//    and emits the chain code stream (cc_* port, and into the filler);
//    contour_filler labels and fills the contours in the external SRAM
//    (sram_* port) and streams the filled frame (ff_* port).
// The contour stage runs one frame at a time: load, trace, fill. While it
// traces and fills, the edge stream is held (out_ready low), which in turn
// holds the D(n-1) input. The front end (motion, noise, threshold) does not
// wait for the contour stage.
//
// Interface/timing: all streams are valid/ready with raster order; the
// frame size and the algorithm settings come from cfg_* inputs and are
// taken at frame starts. Configuration registers and the memory
// controllers are outside this design, and dma.sv is not instantiated
// here; their streams are ports instead.
module vos_top
  import vos_pkg::*;
#(
  parameter int unsigned MAX_W       = 2048,   // widest line (line buffers)
  parameter int unsigned PIX_W       = 8,
  parameter int unsigned VAR_W       = 16,
  parameter int unsigned M           = 4,      // vertical blocks (IHA modules)
  parameter int unsigned L           = 4,      // sections per histogram
  parameter int unsigned N_BLK       = 8192,   // noise blocks per frame, max
  parameter int unsigned X_BITS      = 9,      // cache line stride 2**X_BITS
  parameter int unsigned CACHE_DEPTH = 18432,  // words per cache BRAM (18K)
  parameter int unsigned MAX_LEN     = 4096,   // longest contour
  parameter int unsigned FIFO_DEPTH  = 16384,  // chain code FIFO (nibbles)
  parameter int unsigned LABEL_W     = 16,     // SRAM data width
  parameter int unsigned SRAM_AW     = 20      // SRAM address width
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration
  input  geom_t              cfg_width,
  input  geom_t              cfg_height,
  input  logic [1:0]         cfg_avg_rad,
  input  logic [1:0]         cfg_max_rad,
  input  logic               cfg_ref_bk,
  input  geom_t              cfg_blk_w,
  input  logic [23:0]        cfg_recip,
  input  logic [7:0]         cfg_a,
  input  logic [PIX_W-1:0]   cfg_q [3],
  input  logic [7:0]         cfg_tsig,
  input  logic [15:0]        cfg_min_len,
  // current frame with its references
  input  logic               in_valid,
  input  logic [PIX_W-1:0]   in_cur,
  input  logic [PIX_W-1:0]   in_prev,
  input  logic [PIX_W-1:0]   in_bk,
  output logic               in_ready,
  // D(n) to the frame memory
  output logic               d_valid,
  output logic [PIX_W-1:0]   d_pix,
  output logic               d_sof,
  output logic               d_eof,
  input  logic               d_ready,
  // D(n-1) from the frame memory
  input  logic               dprev_valid,
  input  logic [PIX_W-1:0]   dprev_pix,
  output logic               dprev_ready,
  // results
  output logic               sigma2_valid,
  output logic [VAR_W-1:0]   sigma2,
  output logic               t_valid,
  output logic [PIX_W-1:0]   t_n,
  output logic               cc_valid,
  output logic [3:0]         cc_nib,
  output logic               ff_valid,
  output logic [LABEL_W-1:0] ff_label,
  output logic               ff_sof,
  output logic               ff_eof,
  // external SRAM
  output logic               sram_we,
  output logic               sram_re,
  output logic [SRAM_AW-1:0] sram_addr,
  output logic [LABEL_W-1:0] sram_wdata,
  input  logic [LABEL_W-1:0] sram_rdata
);
  // ------------------------------------------------------ noise estimation
  logic [VAR_W-1:0] sigma2_q;
  logic             ne_block, ne_select, ne_ovf;
  noise_estimator #(.MAX_W(MAX_W), .PIX_W(PIX_W), .N_BLK(N_BLK), .VAR_W(VAR_W)) u_noise (
    .clk, .rst_n, .cfg_width, .cfg_height, .cfg_tsig(cfg_tsig[$clog2(VAR_W)+3:0]),
    .in_valid(in_valid && in_ready), .in_pix(in_cur),
    .sigma2_valid, .sigma2, .ev_block(ne_block), .ev_select(ne_select), .overflow(ne_ovf)
  );
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            sigma2_q <= '0;
    else if (sigma2_valid) sigma2_q <= sigma2;
  end

  // ------------------------------------------------------ object detection
  motion_detect #(.MAX_W(MAX_W), .PIX_W(PIX_W)) u_motion (
    .clk, .rst_n, .cfg_width, .cfg_height, .cfg_avg_rad, .cfg_max_rad, .cfg_ref_bk,
    .in_valid, .in_cur, .in_prev, .in_bk, .in_ready,
    .out_valid(d_valid), .out_d(d_pix), .out_sof(d_sof), .out_eof(d_eof), .out_ready(d_ready)
  );

  logic [1:0]       t_level;
  logic             tg_valid;
  logic [PIX_W-1:0] tg, thr_q;
  st_threshold #(.M(M), .L(L), .PIX_W(PIX_W), .VAR_W(VAR_W)) u_thresh (
    .clk, .rst_n, .cfg_width, .cfg_blk_w, .cfg_recip, .cfg_a, .cfg_q, .sigma2(sigma2_q),
    .d_valid(d_valid && d_ready), .d_pix, .d_eof(d_eof && d_valid && d_ready),
    .t_valid, .t_n, .t_level, .tg_valid, .tg
  );
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       thr_q <= cfg_q[1];
    else if (t_valid) thr_q <= t_n;
  end

  logic e_valid, e_pix, e_b, e_sof, e_eof, e_ready;
  edge_detect #(.MAX_W(MAX_W), .PIX_W(PIX_W)) u_edge (
    .clk, .rst_n, .cfg_width, .cfg_height, .cfg_thr(thr_q),
    .in_valid(dprev_valid), .in_d(dprev_pix), .in_ready(dprev_ready),
    .out_valid(e_valid), .out_e(e_pix), .out_b(e_b), .out_sof(e_sof), .out_eof(e_eof),
    .out_ready(e_ready)
  );

  // ------------------------------------------------ contour stage control
  typedef enum logic [1:0] {CT_LOAD, CT_TRACE, CT_FILL} ct_e;
  ct_e   ct;
  geom_t ex, ey;
  logic  tr_start, tr_busy, tr_done, fl_busy, fl_done;

  assign e_ready = (ct == CT_LOAD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ct <= CT_LOAD;
      ex <= '0;
      ey <= '0;
      tr_start <= 1'b0;
    end else begin
      tr_start <= 1'b0;
      unique case (ct)
        CT_LOAD: if (e_valid) begin
          if (e_sof) begin
            ex <= 1;
            ey <= '0;
          end else if (32'(ex) + 1 == 32'(cfg_width)) begin
            ex <= '0;
            ey <= ey + 1'b1;
          end else begin
            ex <= ex + 1'b1;
          end
          if (e_eof) begin
            tr_start <= 1'b1;
            ct <= CT_TRACE;
          end
        end
        CT_TRACE: if (tr_done) ct <= CT_FILL;
        CT_FILL:  if (fl_done) ct <= CT_LOAD;
        default:  ct <= CT_LOAD;
      endcase
    end
  end

  // --------------------------------------------------- high-speed cache
  logic                   c_rd_en, c_we;
  logic signed [GEOM_W:0] c_rd_x, c_rd_y;
  logic [1:0]             c_win [3][3], c_spa [4], c_wdata;
  geom_t                  c_wx, c_wy;
  logic                   t_rd_en, t_we, f_rd_en, f_we;
  logic signed [GEOM_W:0] t_rd_x, t_rd_y, f_rd_x, f_rd_y;
  logic [1:0]             t_wdata, f_wdata;
  geom_t                  t_wx, t_wy, f_wx, f_wy;

  always_comb begin
    unique case (ct)
      CT_LOAD: begin
        c_rd_en = 1'b0; c_rd_x = '0; c_rd_y = '0;
        c_we    = e_valid;
        c_wx    = e_sof ? '0 : ex;
        c_wy    = e_sof ? '0 : ey;
        c_wdata = {1'b0, e_pix};
      end
      CT_TRACE: begin
        c_rd_en = t_rd_en; c_rd_x = t_rd_x; c_rd_y = t_rd_y;
        c_we = t_we; c_wx = t_wx; c_wy = t_wy; c_wdata = t_wdata;
      end
      default: begin
        c_rd_en = f_rd_en; c_rd_x = f_rd_x; c_rd_y = f_rd_y;
        c_we = f_we; c_wx = f_wx; c_wy = f_wy; c_wdata = f_wdata;
      end
    endcase
  end

  hs_cache #(.X_BITS(X_BITS), .DEPTH(CACHE_DEPTH), .PIX_W(2)) u_cache (
    .clk, .cfg_width, .cfg_height, .rd_en(c_rd_en), .rd_x(c_rd_x), .rd_y(c_rd_y),
    .win(c_win), .spa(c_spa), .we(c_we), .wx(c_wx), .wy(c_wy), .wdata(c_wdata)
  );

  // ------------------------------------------------ contour tracing
  logic tr_ev_start, tr_ev_dead, tr_ev_accept, tr_ev_reject;
  contour_tracer #(.MAX_LEN(MAX_LEN)) u_tracer (
    .clk, .rst_n, .start(tr_start), .cfg_width, .cfg_height, .cfg_min_len,
    .busy(tr_busy), .done(tr_done),
    .c_rd_en(t_rd_en), .c_rd_x(t_rd_x), .c_rd_y(t_rd_y), .c_win, .c_spa,
    .c_we(t_we), .c_wx(t_wx), .c_wy(t_wy), .c_wdata(t_wdata),
    .cc_valid, .cc_nib,
    .ev_start(tr_ev_start), .ev_dead(tr_ev_dead), .ev_accept(tr_ev_accept), .ev_reject(tr_ev_reject)
  );

  // ------------------------------------------------ contour filling
  logic fl_seed0, fl_seed1, fl_fill, fl_contour, fl_ovf;
  contour_filler #(.MAX_LEN(MAX_LEN), .FIFO_DEPTH(FIFO_DEPTH), .LABEL_W(LABEL_W),
                   .SRAM_AW(SRAM_AW)) u_filler (
    .clk, .rst_n, .cfg_width, .cfg_height, .frame_start(tr_start), .hold(ct != CT_FILL),
    .cc_valid, .cc_nib,
    .c_rd_en(f_rd_en), .c_rd_x(f_rd_x), .c_rd_y(f_rd_y), .c_win,
    .c_we(f_we), .c_wx(f_wx), .c_wy(f_wy), .c_wdata(f_wdata),
    .sram_we, .sram_re, .sram_addr, .sram_wdata, .sram_rdata,
    .ff_valid, .ff_label, .ff_sof, .ff_eof, .busy(fl_busy), .done(fl_done),
    .ev_seed0(fl_seed0), .ev_seed1(fl_seed1), .ev_fill(fl_fill), .ev_contour(fl_contour),
    .fifo_overflow(fl_ovf)
  );
endmodule
