// HIGH-SPEED CACHE: a pixel store that returns a whole 3x3 window, and the
// START PIXEL ARRAY, in one clock cycle from any position.
//
// How it works: four HIERARCHICAL MEMORY STACKS (HMS) of four one-pixel-wide
// block RAMs each. Line y goes to stack y mod 4 and, in_f a stack, pixel x
// to RAM x mod 4, at word (y div 4) * 2**(X_BITS-2) + (x div 4). Any 4x4
// group of pixels therefore falls into 16 different RAMs, each of which gets
// its own address, so the group is read in one cycle. From the group whose
// top-left corner is (x-1, y-1) a 16:9 multiplexer picks the 3x3 window
// centred on (x, y) and a 16:4 multiplexer picks the START PIXEL ARRAY, the
// four pixels (x-1 .. x+2, y). Pixels outside the frame read as zero.
// PIX_W is the number of bits stored per pixel: the document stores one; the
// design stores two (edge and visited/contour mark, see contour_tracer).
// Writes are one pixel per cycle (the document's cache writes several pixels
// in one cycle; this design keeps the single-pixel port of its users).
//
// Timing: window and spa are valid one cycle after rd_en. A write is visible
// to reads issued from the next cycle on.
module hs_cache
  import vos_pkg::*;
#(
  parameter int unsigned X_BITS = 9,      // line stride 2**X_BITS pixels
  parameter int unsigned DEPTH  = 18432,  // words per RAM (18K)
  parameter int unsigned PIX_W  = 2,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                    clk,
  input  geom_t                   cfg_width,
  input  geom_t                   cfg_height,
  input  logic                    rd_en,
  input  logic signed [GEOM_W:0]  rd_x,
  input  logic signed [GEOM_W:0]  rd_y,
  output logic [PIX_W-1:0]        win [3][3],   // [row dy+1][col dx+1]
  output logic [PIX_W-1:0]        spa [4],      // (x-1 .. x+2, y)
  input  logic                    we,
  input  geom_t                   wx,
  input  geom_t                   wy,
  input  logic [PIX_W-1:0]        wdata
);
  logic [PIX_W-1:0] q [4][4];        // [stack][ram] read data
  logic [AW-1:0]    raddr [4][4];
  logic             in_f [4][4];   // per RAM: its pixel lies in the frame
  logic             in_q [4][4];
  logic [1:0]       x0m_q, y0m_q;    // (x-1) mod 4, (y-1) mod 4 of the read

  logic signed [GEOM_W+1:0] x0, y0;
  assign x0 = rd_x - 1;
  assign y0 = rd_y - 1;

  // address of the pixel of the 4x4 group held by RAM (s, b)
  always_comb begin
    for (int s = 0; s < 4; s++)
      for (int b = 0; b < 4; b++) begin
        logic signed [GEOM_W+1:0] py, px;
        py = y0 + (GEOM_W+2)'((s - int'(y0[1:0]) + 4) % 4);
        px = x0 + (GEOM_W+2)'((b - int'(x0[1:0]) + 4) % 4);
        in_f[s][b] = (py >= 0) && (px >= 0) &&
                       (py < $signed({2'b00, cfg_height})) && (px < $signed({2'b00, cfg_width}));
        raddr[s][b]  = AW'({py[GEOM_W:2], px[X_BITS-1:2]});
      end
  end

  for (genvar s = 0; s < 4; s++) begin : g_hms
    for (genvar b = 0; b < 4; b++) begin : g_ram
      logic wsel;
      assign wsel = we && (wy[1:0] == 2'(s)) && (wx[1:0] == 2'(b));
      sdp_ram #(.DEPTH(DEPTH), .WIDTH(PIX_W)) u_bram (
        .clk, .we(wsel), .waddr(AW'({wy[GEOM_W-1:2], wx[X_BITS-1:2]})), .wdata,
        .re(rd_en), .raddr(raddr[s][b]), .rdata(q[s][b])
      );
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      x0m_q    <= x0[1:0];
      y0m_q    <= y0[1:0];
      in_q <= in_f;
    end
  end

  // 16:9 and 16:4 multiplexers
  always_comb begin
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        logic [1:0] s, b;
        s = y0m_q + 2'(r);
        b = x0m_q + 2'(c);
        win[r][c] = in_q[s][b] ? q[s][b] : '0;
      end
    for (int c = 0; c < 4; c++) begin
      logic [1:0] s, b;
      s = y0m_q + 2'd1;
      b = x0m_q + 2'(c);
      spa[c] = in_q[s][b] ? q[s][b] : '0;
    end
  end
endmodule
