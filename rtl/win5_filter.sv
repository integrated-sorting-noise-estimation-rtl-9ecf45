// Run-time sized 2D spatial filter (average or maximum) over a streamed frame.
// Used twice by the motion detection: the SPATIAL AVERAGE FILTER and the
// SPATIAL MAX FILTER. The filter size is chosen per frame from 1x1, 3x3 and
// 5x5 through cfg_rad (radius 0, 1 or 2); the document allows sizes between
// 1x1 and 5x5 to be changed on-line and gives no other detail.
//
// How it works: the frame (cfg_width x cfg_height, raster order) is walked on
// an extended raster two columns wider and two lines taller. The extra slots
// carry zeros and are generated internally (in_ready is low during them), so
// the 5x5 window, built from four line buffers and a 5-column shift register,
// sees zero padding around the frame. A window centre is output for every real
// pixel, so the output is again exactly one frame in raster order. Averages
// divide by the window area through a multiplication by a 16-bit fraction of
// the reciprocal (the document's intensity-average unit also uses a
// multiplier instead of a divider). Out-of-frame taps count as zeros in the
// average; this border rule is this design's choice.
//
// Interface: valid/ready stream in, valid/ready stream out, out_sof on the
// first and out_eof on the last pixel of a frame. Latency: two lines and two
// pixels plus one register.
module win5_filter
  import vos_pkg::*;
#(
  parameter int unsigned MAX_W = 2048,
  parameter int unsigned PIX_W = 8,
  parameter filt_kind_e  KIND  = FILT_AVG
) (
  input  logic             clk,
  input  logic             rst_n,
  input  geom_t            cfg_width,
  input  geom_t            cfg_height,
  input  logic [1:0]       cfg_rad,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] in_pix,
  output logic             in_ready,
  output logic             out_valid,
  output logic [PIX_W-1:0] out_pix,
  output logic             out_sof,
  output logic             out_eof,
  input  logic             out_ready
);
  localparam int unsigned LB_D = MAX_W + 2;
  localparam int unsigned XW   = $clog2(LB_D);

  geom_t        w_q, h_q;
  logic [1:0]   rad_q;
  logic [GEOM_W:0] ix, iy;       // slot position on the extended raster
  logic         pad;
  logic         adv;

  logic [PIX_W-1:0] lb_q [4];      // line buffer k holds line iy-1-k at column ix
  logic [PIX_W-1:0] win [5][5];   // [row 0 oldest .. 4 newest][col 0 oldest .. 4 newest]
  logic [PIX_W-1:0] col [5];

  wire at_origin = (ix == '0) && (iy == '0);
  geom_t w_c, h_c;
  assign w_c = at_origin ? cfg_width  : w_q;
  assign h_c = at_origin ? cfg_height : h_q;

  assign pad      = (ix >= {1'b0, w_c}) || (iy >= {1'b0, h_c});
  assign in_ready = !pad && (!out_valid || out_ready);
  assign adv      = (pad || in_valid) && (!out_valid || out_ready);

  // new window column: rows iy-4 .. iy
  always_comb begin
    for (int r = 0; r < 4; r++) begin
      col[r] = lb_q[3 - r];
      if (int'(iy) < 4 - r) col[r] = '0;
    end
    col[4] = pad ? '0 : in_pix;
  end

  // window after this slot's shift
  logic [PIX_W-1:0] nwin [5][5];
  always_comb begin
    for (int r = 0; r < 5; r++) begin
      for (int c = 0; c < 4; c++) nwin[r][c] = win[r][c + 1];
      nwin[r][4] = col[r];
    end
  end

  // filter result over the centred (2*rad+1)^2 taps
  logic [PIX_W+4:0]  sum;
  logic [PIX_W-1:0]  mx;
  logic [15:0]       recip;
  logic [PIX_W+20:0] prod;
  logic [PIX_W-1:0]  result;
  always_comb begin
    sum = '0;
    mx  = '0;
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++)
        if ((r - 2) <= int'(rad_q) && (2 - r) <= int'(rad_q) &&
            (c - 2) <= int'(rad_q) && (2 - c) <= int'(rad_q)) begin
          sum = sum + (PIX_W+5)'(nwin[r][c]);
          if (nwin[r][c] > mx) mx = nwin[r][c];
        end
    unique case (rad_q)
      2'd0:    recip = 16'd65535;  // 1/1 (with rounding below gives the pixel)
      2'd1:    recip = 16'd7282;   // round(65536/9)
      default: recip = 16'd2621;   // round(65536/25)
    endcase
    prod = sum * recip + (PIX_W+21)'(32768);
    if (KIND == FILT_MAX)  result = mx;
    else if (rad_q == 2'd0) result = nwin[2][2];
    else                   result = prod[PIX_W+15:16];
  end

  always_ff @(posedge clk) begin
    if (adv) begin
      for (int r = 0; r < 5; r++)
        for (int c = 0; c < 5; c++) win[r][c] <= nwin[r][c];
    end
  end

  // line buffer cascade: each buffer passes its old pixel to the next one
  for (genvar k = 0; k < 4; k++) begin : g_lb
    lb_ram #(.DEPTH(LB_D), .WIDTH(PIX_W)) u_lb (
      .clk, .we(adv), .addr(XW'(ix)), .wdata(k == 0 ? col[4] : lb_q[k - 1]), .rdata(lb_q[k])
    );
  end

  wire [GEOM_W:0] last_x = {1'b0, w_c} + 1'b1;
  wire [GEOM_W:0] last_y = {1'b0, h_c} + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ix <= '0; iy <= '0;
      w_q <= '0; h_q <= '0; rad_q <= '0;
      out_valid <= 1'b0; out_pix <= '0; out_sof <= 1'b0; out_eof <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (at_origin) begin
        w_q <= cfg_width; h_q <= cfg_height; rad_q <= cfg_rad;
      end
      if (adv) begin
        if (ix == last_x) begin
          ix <= '0;
          iy <= (iy == last_y) ? '0 : iy + 1'b1;
        end else begin
          ix <= ix + 1'b1;
        end
        if (ix >= 2 && iy >= 2) begin
          out_valid <= 1'b1;
          out_pix   <= result;
          out_sof   <= (ix == 2) && (iy == 2);
          out_eof   <= (ix == last_x) && (iy == last_y);
        end
      end
    end
  end
endmodule
