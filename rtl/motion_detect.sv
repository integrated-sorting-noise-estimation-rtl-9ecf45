// Motion detection: D(n) = max filter( average filter( |I(n) - R(n)| ) ).
// R(n) is selected per frame by cfg_ref_bk between the background frame BK(n)
// and the previous frame I(n-1), both delivered by the frame memory alongside
// I(n) (the reference multiplexer of the document's object detection). The
// absolute difference AD(n) is formed by a subtractor and a sign fix and then
// passes the SPATIAL AVERAGE FILTER and the SPATIAL MAX FILTER, whose sizes
// (1x1, 3x3 or 5x5) and the frame geometry are set at run time.
//
// Interface: valid/ready stream of pixel triples in, valid/ready stream of
// D(n) out with out_sof/out_eof. Latency: about four lines and four pixels.
module motion_detect
  import vos_pkg::*;
#(
  parameter int unsigned MAX_W = 2048,
  parameter int unsigned PIX_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  geom_t            cfg_width,
  input  geom_t            cfg_height,
  input  logic [1:0]       cfg_avg_rad,
  input  logic [1:0]       cfg_max_rad,
  input  logic             cfg_ref_bk,     // 1: background frame, 0: previous frame
  input  logic             in_valid,
  input  logic [PIX_W-1:0] in_cur,         // I(n)
  input  logic [PIX_W-1:0] in_prev,        // I(n-1)
  input  logic [PIX_W-1:0] in_bk,          // BK(n)
  output logic             in_ready,
  output logic             out_valid,
  output logic [PIX_W-1:0] out_d,          // D(n)
  output logic             out_sof,
  output logic             out_eof,
  input  logic             out_ready
);
  logic [PIX_W-1:0] ref_pix, ad;
  assign ref_pix = cfg_ref_bk ? in_bk : in_prev;
  assign ad      = (in_cur >= ref_pix) ? in_cur - ref_pix : ref_pix - in_cur;

  logic             a_valid, a_ready, a_sof, a_eof;
  logic [PIX_W-1:0] a_pix;

  win5_filter #(.MAX_W(MAX_W), .PIX_W(PIX_W), .KIND(FILT_AVG)) u_avg (
    .clk, .rst_n, .cfg_width, .cfg_height, .cfg_rad(cfg_avg_rad),
    .in_valid, .in_pix(ad), .in_ready,
    .out_valid(a_valid), .out_pix(a_pix), .out_sof(a_sof), .out_eof(a_eof), .out_ready(a_ready)
  );

  logic unused_avg_flags;
  assign unused_avg_flags = a_sof ^ a_eof;

  win5_filter #(.MAX_W(MAX_W), .PIX_W(PIX_W), .KIND(FILT_MAX)) u_max (
    .clk, .rst_n, .cfg_width, .cfg_height, .cfg_rad(cfg_max_rad),
    .in_valid(a_valid), .in_pix(a_pix), .in_ready(a_ready),
    .out_valid, .out_pix(out_d), .out_sof, .out_eof, .out_ready
  );
endmodule
