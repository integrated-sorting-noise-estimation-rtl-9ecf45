// CONTOUR TRACER with CHAIN CODER: traces the closed contours of the edge
// frame E(n) held in hs_cache and emits them as a chain code stream.
//
// How it works: an FSM applies the tracing rules on the cache contents.
//  Rule 1: raster scan for a white pixel with a white neighbour. The START
//          PIXEL ARRAY lets the scan skip three black pixels in one step.
//  Rule 2: from the current point, the rightmost white neighbour is searched
//          starting at direction (ds + 6 + ((ds + 1) mod 2)) mod 8 (Eq. 5.1),
//          five candidates for even ds, six for odd ds, in increasing
//          direction order; the whole 3x3 window comes in one cache read.
//          Each new point is marked visited (pixel bit 1).
//  Rule 3: with no neighbour the current point is deleted (written black)
//          and tracing backs up one step; the steps are kept on a chain code
//          stack (block RAM of MAX_LEN codes).
//  Rule 4: reaching the start point or a visited point closes the contour.
//          All its points are then removed from the cache.
//  Rule 5: only measure 1 (minimum length cfg_min_len) is applied; measures
//          2 and 3 need the previous contour list and are not implemented.
// Only accepted contours are emitted, so the stream needs no dead-branch
// flag. Stream format (nibbles, marker 0x8 as in the document, descriptor
// values are this design's choice): 8,0 frame header; per contour 8,2, start
// x (3 nibbles, MSB first), start y (3), length P (4), P chain codes, 8,3;
// 8,1 frame tail. Freeman codes: 0 east, 2 north (y decreasing), 4 west,
// 6 south. The initial search direction at a start point is 6 (this design's
// choice: the start point's upper and left neighbours are black).
// After a contour the scan resumes right of its start point.
//
// Interface/timing: pulse start when the frame is in the cache; cc_valid /
// cc_nib carry the stream (no back-pressure); done pulses after the frame
// tail. Two cycles per traced point, one or two per scanned position.
module contour_tracer
  import vos_pkg::*;
#(
  parameter int unsigned MAX_LEN = 4096,        // chain code stack depth
  localparam int unsigned LEN_W  = $clog2(MAX_LEN) + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  geom_t                  cfg_width,
  input  geom_t                  cfg_height,
  input  logic [15:0]            cfg_min_len,
  output logic                   busy,
  output logic                   done,
  // cache port
  output logic                   c_rd_en,
  output logic signed [GEOM_W:0] c_rd_x,
  output logic signed [GEOM_W:0] c_rd_y,
  input  logic [1:0]             c_win [3][3],
  input  logic [1:0]             c_spa [4],
  output logic                   c_we,
  output geom_t                  c_wx,
  output geom_t                  c_wy,
  output logic [1:0]             c_wdata,
  // chain code stream
  output logic                   cc_valid,
  output logic [3:0]             cc_nib,
  // events
  output logic                   ev_start,      // Rule 1 found a start point
  output logic                   ev_dead,       // Rule 3 deleted a point
  output logic                   ev_accept,     // Rule 5 accepted a contour
  output logic                   ev_reject      // Rule 5 rejected a contour
);
  typedef enum logic [3:0] {
    S_IDLE, S_FH, S_SCAN_RD, S_SCAN_EV, S_ADV, S_SRCH_RD, S_SRCH_EV, S_POP,
    S_CLOSE, S_HDR, S_WALK_RD, S_WALK, S_TAIL, S_FT
  } state_e;
  state_e state;

  geom_t            w, h, x, y, sx, sy, cx, cy, px, py;
  logic [1:0]       step;
  logic [2:0]       ds, top_d;
  logic [LEN_W-1:0] len, wi;
  logic             accept, ovf, nib1;
  logic [3:0]       hi;

  // chain code stack
  logic             st_we, st_re;
  logic [LEN_W-2:0] st_waddr, st_raddr;
  logic [2:0]       st_wdata, st_rdata;
  sdp_ram #(.DEPTH(MAX_LEN), .WIDTH(3)) u_stack (
    .clk, .we(st_we), .waddr(st_waddr), .wdata(st_wdata),
    .re(st_re), .raddr(st_raddr), .rdata(st_rdata)
  );

  // Rule 2 search on the window (Eq. 5.1)
  logic       found;
  logic [2:0] fd;
  always_comb begin
    logic [2:0] first, dk;
    found = 1'b0;
    fd    = '0;
    first = ds + 3'd6 + {2'b00, ~ds[0]};
    for (int k = 5; k >= 0; k--) begin
      dk = first + 3'(k);
      if ((k < 5 || ds[0]) && c_win[1 + dir_dy(dk)][1 + dir_dx(dk)][0]) begin
        found = 1'b1;
        fd    = dk;
      end
    end
  end

  geom_t nx, ny;
  assign nx = geom_t'($signed({1'b0, cx}) + (GEOM_W+1)'(dir_dx(fd)));
  assign ny = geom_t'($signed({1'b0, cy}) + (GEOM_W+1)'(dir_dy(fd)));
  logic closing;
  assign closing = (nx == sx && ny == sy) || c_win[1 + dir_dy(fd)][1 + dir_dx(fd)][1];

  logic nb_white;
  always_comb begin
    nb_white = 1'b0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        if (!(r == 1 && c == 1) && c_win[r][c][0]) nb_white = 1'b1;
  end

  // header nibbles
  logic [3:0] hdr_nib;
  always_comb begin
    unique case (hi)
      4'd0:    hdr_nib = CC_MARK;
      4'd1:    hdr_nib = CC_D_SEG_H;
      4'd2:    hdr_nib = sx[11:8];
      4'd3:    hdr_nib = sx[7:4];
      4'd4:    hdr_nib = sx[3:0];
      4'd5:    hdr_nib = sy[11:8];
      4'd6:    hdr_nib = sy[7:4];
      4'd7:    hdr_nib = sy[3:0];
      4'd8:    hdr_nib = 4'(16'(len) >> 12);
      4'd9:    hdr_nib = 4'(16'(len) >> 8);
      4'd10:   hdr_nib = 4'(16'(len) >> 4);
      default: hdr_nib = 4'(len);
    endcase
  end

  always_comb begin
    c_rd_en  = 1'b0;
    c_rd_x   = '0;
    c_rd_y   = '0;
    st_re    = 1'b0;
    st_raddr = '0;
    unique case (state)
      S_SCAN_RD: begin c_rd_en = 1'b1; c_rd_x = $signed({1'b0, x});  c_rd_y = $signed({1'b0, y}); end
      S_SRCH_RD: begin c_rd_en = 1'b1; c_rd_x = $signed({1'b0, cx}); c_rd_y = $signed({1'b0, cy}); end
      S_WALK_RD: begin st_re = 1'b1; st_raddr = (LEN_W-1)'(wi); end
      S_SRCH_EV: begin st_re = 1'b1; st_raddr = (LEN_W-1)'(len - 2); end
      default: ;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      done      <= 1'b0;
      cc_valid  <= 1'b0;
      cc_nib    <= '0;
      c_we      <= 1'b0;
      c_wx      <= '0;
      c_wy      <= '0;
      c_wdata   <= '0;
      st_we     <= 1'b0;
      st_waddr  <= '0;
      st_wdata  <= '0;
      ev_start  <= 1'b0;
      ev_dead   <= 1'b0;
      ev_accept <= 1'b0;
      ev_reject <= 1'b0;
      {w, h, x, y, sx, sy, cx, cy, px, py} <= '0;
      {step, ds, top_d, len, wi, accept, ovf, nib1, hi} <= '0;
    end else begin
      done      <= 1'b0;
      cc_valid  <= 1'b0;
      c_we      <= 1'b0;
      st_we     <= 1'b0;
      ev_start  <= 1'b0;
      ev_dead   <= 1'b0;
      ev_accept <= 1'b0;
      ev_reject <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          w <= cfg_width; h <= cfg_height;
          x <= '0; y <= '0;
          cc_valid <= 1'b1; cc_nib <= CC_MARK; nib1 <= 1'b0;
          state <= S_FH;
        end
        S_FH: begin
          cc_valid <= 1'b1; cc_nib <= CC_D_FRAME_H;
          state <= S_SCAN_RD;
        end
        S_SCAN_RD: state <= S_SCAN_EV;
        S_SCAN_EV: begin
          if (c_win[1][1][0] && nb_white) begin
            // Rule 1: start point found
            sx <= x; sy <= y; cx <= x; cy <= y;
            len <= '0; ds <= 3'd6; ovf <= 1'b0;
            c_we <= 1'b1; c_wx <= x; c_wy <= y; c_wdata <= 2'b11;
            ev_start <= 1'b1;
            state <= S_SRCH_RD;
          end else begin
            step  <= (!c_spa[1][0] && !c_spa[2][0] && !c_spa[3][0]) ? 2'd3 : 2'd1;
            state <= S_ADV;
          end
        end
        S_ADV: begin
          if (32'(x) + 32'(step) < 32'(w)) begin
            x <= x + geom_t'(step);
            state <= S_SCAN_RD;
          end else if (32'(y) + 1 < 32'(h)) begin
            x <= '0; y <= y + 1'b1;
            state <= S_SCAN_RD;
          end else begin
            cc_valid <= 1'b1; cc_nib <= CC_MARK;
            state <= S_FT;
          end
        end
        S_SRCH_RD: state <= S_SRCH_EV;
        S_SRCH_EV: begin
          if (found) begin
            st_we <= 1'b1; st_waddr <= (LEN_W-1)'(len); st_wdata <= fd;
            len   <= len + 1'b1;
            top_d <= fd;
            if (closing || len == LEN_W'(MAX_LEN - 1)) begin
              // Rule 4: closed (or stack full, which rejects the contour)
              ovf   <= !closing;
              state <= S_CLOSE;
            end else begin
              cx <= nx; cy <= ny; ds <= fd;
              c_we <= 1'b1; c_wx <= nx; c_wy <= ny; c_wdata <= 2'b11;
              state <= S_SRCH_RD;
            end
          end else begin
            // Rule 3: dead branch, delete the current point and back up
            c_we <= 1'b1; c_wx <= cx; c_wy <= cy; c_wdata <= 2'b00;
            ev_dead <= 1'b1;
            if (len == 0) begin
              x <= sx; y <= sy; step <= 2'd1;
              state <= S_ADV;
            end else begin
              cx  <= geom_t'($signed({1'b0, cx}) - (GEOM_W+1)'(dir_dx(top_d)));
              cy  <= geom_t'($signed({1'b0, cy}) - (GEOM_W+1)'(dir_dy(top_d)));
              len <= len - 1'b1;
              state <= S_POP;
            end
          end
        end
        S_POP: begin
          // also gives the deleting write one cycle before the next read
          ds    <= (len == 0) ? 3'd6 : st_rdata;
          top_d <= st_rdata;
          state <= S_SRCH_RD;
        end
        S_CLOSE: begin
          // Rule 5, measure 1
          accept <= !ovf && (16'(len) >= cfg_min_len);
          if (!ovf && (16'(len) >= cfg_min_len)) ev_accept <= 1'b1;
          else                                   ev_reject <= 1'b1;
          hi <= '0; wi <= '0; px <= sx; py <= sy;
          state <= (!ovf && (16'(len) >= cfg_min_len)) ? S_HDR : S_WALK_RD;
        end
        S_HDR: begin
          cc_valid <= 1'b1; cc_nib <= hdr_nib;
          hi <= hi + 1'b1;
          if (hi == 4'd11) state <= S_WALK_RD;
        end
        S_WALK_RD: state <= S_WALK;
        S_WALK: begin
          // remove the point from the cache, emit its chain code
          c_we <= 1'b1; c_wx <= px; c_wy <= py; c_wdata <= 2'b00;
          cc_valid <= accept; cc_nib <= {1'b0, st_rdata};
          px <= geom_t'($signed({1'b0, px}) + (GEOM_W+1)'(dir_dx(st_rdata)));
          py <= geom_t'($signed({1'b0, py}) + (GEOM_W+1)'(dir_dy(st_rdata)));
          wi <= wi + 1'b1;
          if (wi + 1'b1 == len) begin
            if (accept) begin
              state <= S_TAIL; nib1 <= 1'b0;
            end else begin
              x <= sx; y <= sy; step <= 2'd1;
              state <= S_ADV;
            end
          end else begin
            state <= S_WALK_RD;
          end
        end
        S_TAIL: begin
          cc_valid <= 1'b1;
          cc_nib   <= nib1 ? CC_D_SEG_T : CC_MARK;
          nib1     <= 1'b1;
          if (nib1) begin
            x <= sx; y <= sy; step <= 2'd1;
            state <= S_ADV;
          end
        end
        S_FT: begin
          cc_valid <= 1'b1; cc_nib <= CC_D_FRAME_T;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
