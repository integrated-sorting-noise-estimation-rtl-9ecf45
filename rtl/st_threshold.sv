// Spatio-temporal thresholding: computes the global threshold T(n) of the
// motion frame D(n).
// The BLOCK EXTRACTOR (BE) splits each line of the streamed frame into M
// vertical blocks of cfg_blk_w pixels (block k holds columns
// k*cfg_blk_w .. (k+1)*cfg_blk_w-1 of every line, so no frame memory is
// needed) and steers every pixel to the IHA of its block. At the end of the
// frame all M IHAs analyse their histograms in parallel, the THRESHOLD
// ESTIMATOR combines the M pairs (mu_k, lambda_k) into Tg, and the STA turns Tg
// and the noise variance into T(n). Here K = M blocks per frame: the document
// names both K blocks and M vertical blocks and this design takes them to be
// the same. Columns right of M*cfg_blk_w are not part of any block.
//
// Interface: pixel stream (valid, pixel, eof on the frame's last pixel);
// cfg_width is the line length, cfg_recip = 2**24 / (pixels per block).
// t_valid pulses with T(n) about 2**PIX_W + M + 8 cycles after eof.
module st_threshold
  import vos_pkg::*;
#(
  parameter int unsigned M     = 4,
  parameter int unsigned L     = 4,
  parameter int unsigned PIX_W = 8,
  parameter int unsigned VAR_W = 16,
  localparam int unsigned LAM_W = PIX_W + $clog2(L)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  geom_t            cfg_width,
  input  geom_t            cfg_blk_w,
  input  logic [23:0]      cfg_recip,
  input  logic [7:0]       cfg_a,
  input  logic [PIX_W-1:0] cfg_q [3],
  input  logic [VAR_W-1:0] sigma2,
  input  logic             d_valid,
  input  logic [PIX_W-1:0] d_pix,
  input  logic             d_eof,
  output logic             t_valid,
  output logic [PIX_W-1:0] t_n,
  output logic [1:0]       t_level,
  output logic             tg_valid,
  output logic [PIX_W-1:0] tg
);
  localparam int unsigned MW = (M > 1) ? $clog2(M + 1) : 1;

  // ---------------- block extractor ----------------
  geom_t         x, xin;
  logic [MW-1:0] blk;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; xin <= '0; blk <= '0;
    end else if (d_valid) begin
      if (d_eof || x == cfg_width - 1'b1) begin
        x <= '0; xin <= '0; blk <= '0;
      end else begin
        x <= x + 1'b1;
        if (xin == cfg_blk_w - 1'b1) begin
          xin <= '0;
          if (blk != MW'(M)) blk <= blk + 1'b1;
        end else begin
          xin <= xin + 1'b1;
        end
      end
    end
  end

  // ---------------- M intensity histogram analysers ----------------
  logic [M-1:0]     res_valid;
  logic [PIX_W-1:0] mu     [M];
  logic [LAM_W-1:0] lambda [M];
  for (genvar k = 0; k < M; k++) begin : g_iha
    iha #(.PIX_W(PIX_W), .L(L)) u_iha (
      .clk, .rst_n,
      .pix_valid(d_valid && blk == MW'(k)), .pix(d_pix),
      .block_end(d_valid && d_eof), .cfg_recip,
      .res_valid(res_valid[k]), .mu(mu[k]), .lambda(lambda[k])
    );
  end

  // ---------------- threshold estimator and adaptation ----------------
  threshold_estimator #(.K(M), .L(L), .PIX_W(PIX_W)) u_te (
    .clk, .rst_n, .start(res_valid[0]), .mu, .lambda, .tg_valid, .tg
  );

  sta #(.PIX_W(PIX_W), .VAR_W(VAR_W)) u_sta (
    .clk, .rst_n, .tg_valid, .tg, .sigma2, .cfg_a, .cfg_q, .t_valid, .t_n, .t_level
  );

  logic unused;
  assign unused = ^res_valid[M-1:0];
endmodule
