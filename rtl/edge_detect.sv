// Global thresholding and morphological edge detection.
// Thresholds the motion frame D(n) with T(n) into the binary frame B(n)
// (white where D > T) and keeps a white pixel of B(n) as an edge pixel of E(n)
// when at least one 2x2 square containing it is not entirely white. The union
// of the four 2x2 squares around a pixel is its 3x3 neighbourhood, so the
// MORPHOLOGICAL ENGINE (ME) evaluates the AND of the 3x3 neighbourhood; pixels
// outside the frame count as black, so objects touching the border get a
// closed edge there (this border rule is this design's choice).
//
// How it works: two line buffers hold the previous two lines of B(n) (as in
// the document's figure); the frame is walked on a raster one column wider
// and one line taller, whose extra slots are black and generated internally
// (in_ready low), so E(n) leaves as one frame in raster order. The document
// writes E(n) through a dual-port line buffer that the ME updates twice per
// line; this design computes each edge pixel in one step instead, which gives
// the same frame.
//
// Interface: cfg_thr is T(n), sampled at the first pixel of a frame.
// valid/ready streams in and out; latency one line and one pixel.
module edge_detect
  import vos_pkg::*;
#(
  parameter int unsigned MAX_W = 2048,
  parameter int unsigned PIX_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  geom_t            cfg_width,
  input  geom_t            cfg_height,
  input  logic [PIX_W-1:0] cfg_thr,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] in_d,
  output logic             in_ready,
  output logic             out_valid,
  output logic             out_e,
  output logic             out_b,
  output logic             out_sof,
  output logic             out_eof,
  input  logic             out_ready
);
  localparam int unsigned LB_D = MAX_W + 1;
  localparam int unsigned XW   = $clog2(LB_D);

  geom_t           w_q, h_q;
  logic [PIX_W-1:0] thr_q;
  logic [GEOM_W:0] ix, iy;
  logic            pad, adv;
  logic            lb_q [2];
  logic [2:0]      win [3];   // [row 0 = iy-2 .. 2 = iy][bit 0 oldest column]
  logic [2:0]      col;
  logic            b_new;

  wire at_origin = (ix == '0) && (iy == '0);
  geom_t w_c, h_c;
  logic [PIX_W-1:0] thr_c;
  assign w_c   = at_origin ? cfg_width  : w_q;
  assign h_c   = at_origin ? cfg_height : h_q;
  assign thr_c = at_origin ? cfg_thr    : thr_q;

  assign pad      = (ix >= {1'b0, w_c}) || (iy >= {1'b0, h_c});
  assign in_ready = !pad && (!out_valid || out_ready);
  assign adv      = (pad || in_valid) && (!out_valid || out_ready);
  assign b_new    = !pad && (in_d > thr_c);

  always_comb begin
    col[2] = b_new;
    col[1] = (iy >= 1) ? lb_q[0] : 1'b0;
    col[0] = (iy >= 2) ? lb_q[1] : 1'b0;
  end

  for (genvar k = 0; k < 2; k++) begin : g_lb
    lb_ram #(.DEPTH(LB_D), .WIDTH(1)) u_lb (
      .clk, .we(adv), .addr(XW'(ix)), .wdata(k == 0 ? b_new : lb_q[0]), .rdata(lb_q[k])
    );
  end

  // morphological engine on the window after this slot's shift
  logic [2:0] nwin [3];
  logic       all_white, centre;
  always_comb begin
    for (int r = 0; r < 3; r++) nwin[r] = {col[r], win[r][2:1]};
    all_white = &{nwin[0], nwin[1], nwin[2]};
    centre    = nwin[1][1];
  end

  wire [GEOM_W:0] last_x = {1'b0, w_c};
  wire [GEOM_W:0] last_y = {1'b0, h_c};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ix <= '0; iy <= '0; w_q <= '0; h_q <= '0; thr_q <= '0;
      for (int r = 0; r < 3; r++) win[r] <= '0;
      out_valid <= 1'b0; out_e <= 1'b0; out_b <= 1'b0; out_sof <= 1'b0; out_eof <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (at_origin) begin
        w_q <= cfg_width; h_q <= cfg_height; thr_q <= cfg_thr;
      end
      if (adv) begin
        for (int r = 0; r < 3; r++) win[r] <= nwin[r];
        if (ix == last_x) begin
          ix <= '0;
          iy <= (iy == last_y) ? '0 : iy + 1'b1;
        end else begin
          ix <= ix + 1'b1;
        end
        if (ix >= 1 && iy >= 1) begin
          out_valid <= 1'b1;
          out_e     <= centre && !all_white;
          out_b     <= centre;
          out_sof   <= (ix == 1) && (iy == 1);
          out_eof   <= (ix == last_x) && (iy == last_y);
        end
      end
    end
  end
endmodule
