// CONTOUR FILLER: turns the chain code stream of a frame into a labelled,
// filled object frame in an external SRAM and streams that frame out.
//
// How it works: the chain code stream is buffered in the CC FIFO. LABEL GEN
// CTRL (an FSM) first clears the SRAM (CLEAR MEMORY), then for every contour
//  - reads its header and chain codes, keeps the codes in a contour buffer,
//    marks the contour points in the cache (pixel bit 1) and writes the
//    contour's label at each point into the SRAM;
//  - walks the chain again with the two seed processing elements:
//      PE-0: cc_i in {5,6,7} and cc_{i+1} > cc_i mod 5,
//      PE-1: cc_i in {0,1} and cc_{i+1} = 7
//    (cc_i is the code into point i, cc_{i+1} the code out of it; as in the
//    document). The OR of both marks the pixel right of point i as a seed;
//    from a seed, pixels are labelled rightwards until a contour point of
//    this contour (read from the cache) or the frame edge is met;
//  - removes the contour marks from the cache again.
// Each contour gets the next label, starting at 1. At the frame tail the
// SRAM is read out in raster order (READ FILLED FRAME).
// Filling internal contours with zero (document) is not implemented: every
// contour, also a nested one, is filled with its own label.
// SRAM: one access per cycle, read data one cycle after the read (this
// design's model of the asynchronous SRAM of the document).
//
// Interface/timing: frame_start begins the SRAM clear (may overlap contour
// tracing); while hold is high no chain code is taken from the FIFO (the
// cache still belongs to the tracer); cc_valid/cc_nib feed the FIFO at any time; ff_* carries the
// filled frame; done pulses with the last pixel. Roughly two cycles per
// contour point per pass plus two cycles per filled pixel.
module contour_filler
  import vos_pkg::*;
#(
  parameter int unsigned MAX_LEN    = 4096,   // contour buffer depth
  parameter int unsigned FIFO_DEPTH = 16384,  // CC FIFO depth (nibbles)
  parameter int unsigned LABEL_W    = 16,     // SRAM data width
  parameter int unsigned SRAM_AW    = 20,     // SRAM address width
  localparam int unsigned LEN_W     = $clog2(MAX_LEN) + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  geom_t                  cfg_width,
  input  geom_t                  cfg_height,
  input  logic                   frame_start,
  input  logic                   hold,          // do not start on contours yet
  input  logic                   cc_valid,
  input  logic [3:0]             cc_nib,
  // cache port
  output logic                   c_rd_en,
  output logic signed [GEOM_W:0] c_rd_x,
  output logic signed [GEOM_W:0] c_rd_y,
  input  logic [1:0]             c_win [3][3],
  output logic                   c_we,
  output geom_t                  c_wx,
  output geom_t                  c_wy,
  output logic [1:0]             c_wdata,
  // external SRAM
  output logic                   sram_we,
  output logic                   sram_re,
  output logic [SRAM_AW-1:0]     sram_addr,
  output logic [LABEL_W-1:0]     sram_wdata,
  input  logic [LABEL_W-1:0]     sram_rdata,
  // filled frame
  output logic                   ff_valid,
  output logic [LABEL_W-1:0]     ff_label,
  output logic                   ff_sof,
  output logic                   ff_eof,
  output logic                   busy,
  output logic                   done,
  // events
  output logic                   ev_seed0,
  output logic                   ev_seed1,
  output logic                   ev_fill,
  output logic                   ev_contour,
  output logic                   fifo_overflow
);
  typedef enum logic [3:0] {
    F_IDLE, F_CLR, F_POP, F_GOT, F_LOAD, F_SEED_RD, F_SEED, F_FILL_RD,
    F_FILL, F_UNMARK_RD, F_UNMARK, F_OUT, F_OUT_LAST
  } state_e;
  state_e state;

  // CC FIFO
  logic       q_rd, q_empty, q_full;
  logic [3:0] q_data;
  logic [$clog2(FIFO_DEPTH):0] q_count;
  sync_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(4)) u_ccfifo (
    .clk, .rst_n, .wr_en(cc_valid), .wr_data(cc_nib), .rd_en(q_rd),
    .rd_data(q_data), .empty(q_empty), .full(q_full), .count(q_count),
    .overflow(fifo_overflow)
  );

  // contour buffer
  logic             b_we, b_re;
  logic [LEN_W-2:0] b_waddr, b_raddr;
  logic [2:0]       b_wdata, b_rdata;
  sdp_ram #(.DEPTH(MAX_LEN), .WIDTH(3)) u_cbuf (
    .clk, .we(b_we), .waddr(b_waddr), .wdata(b_wdata),
    .re(b_re), .raddr(b_raddr), .rdata(b_rdata)
  );

  geom_t               w, h, px, py, fx, sx, sy;
  logic [SRAM_AW-1:0]  npix, addr_cnt;
  logic [LABEL_W-1:0]  label;
  logic [15:0]         len, i;
  logic [3:0]          hcnt;            // header nibble counter
  logic                marker, in_seg, loading;
  logic [2:0]          prev, cur;

  // seed processing elements (cc_i = prev, cc_{i+1} = b_rdata)
  logic pe0, pe1;
  assign pe0 = (prev >= 3'd5) && (b_rdata > 3'(prev - 3'd5));
  assign pe1 = (prev <= 3'd1) && (b_rdata == 3'd7);

  function automatic logic [SRAM_AW-1:0] addr_of(input geom_t ax, input geom_t ay, input geom_t aw);
    return SRAM_AW'(ay * aw) + SRAM_AW'(ax);
  endfunction

  function automatic geom_t step_x(input geom_t v, input logic [2:0] d);
    return geom_t'($signed({1'b0, v}) + (GEOM_W+1)'(dir_dx(d)));
  endfunction
  function automatic geom_t step_y(input geom_t v, input logic [2:0] d);
    return geom_t'($signed({1'b0, v}) + (GEOM_W+1)'(dir_dy(d)));
  endfunction

  always_comb begin
    q_rd    = (state == F_POP) && !q_empty && !hold;
    b_re    = (state == F_SEED_RD) || (state == F_UNMARK_RD);
    b_raddr = (LEN_W-1)'(i);
    c_rd_en = (state == F_FILL_RD);
    c_rd_x  = $signed({1'b0, fx});
    c_rd_y  = $signed({1'b0, py});
  end

  assign busy     = (state != F_IDLE);
  assign ff_label = sram_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= F_IDLE;
      {c_we, c_wx, c_wy, c_wdata} <= '0;
      {sram_we, sram_re, sram_addr, sram_wdata} <= '0;
      {ff_valid, ff_sof, ff_eof, done} <= '0;
      {ev_seed0, ev_seed1, ev_fill, ev_contour} <= '0;
      {b_we, b_waddr, b_wdata} <= '0;
      {w, h, px, py, fx, sx, sy, npix, addr_cnt, label, len, i, hcnt} <= '0;
      {marker, in_seg, loading, prev, cur} <= '0;
    end else begin
      c_we       <= 1'b0;
      sram_we    <= 1'b0;
      sram_re    <= 1'b0;
      b_we       <= 1'b0;
      done       <= 1'b0;
      ev_seed0   <= 1'b0;
      ev_seed1   <= 1'b0;
      ev_fill    <= 1'b0;
      ev_contour <= 1'b0;
      // the filled frame follows the SRAM read by one cycle
      ff_valid <= sram_re;
      ff_sof   <= sram_re && (sram_addr == '0);
      ff_eof   <= sram_re && (sram_addr == npix - 1'b1);
      unique case (state)
        F_IDLE: if (frame_start) begin
          w <= cfg_width; h <= cfg_height;
          npix <= SRAM_AW'(cfg_width * cfg_height);
          addr_cnt <= '0;
          label <= '0;
          marker <= 1'b0; in_seg <= 1'b0; loading <= 1'b0;
          state <= F_CLR;
        end
        F_CLR: begin                      // CLEAR MEMORY
          sram_we <= 1'b1; sram_addr <= addr_cnt; sram_wdata <= '0;
          addr_cnt <= addr_cnt + 1'b1;
          if (addr_cnt == npix - 1'b1) state <= F_POP;
        end
        F_POP: if (!q_empty && !hold) state <= F_GOT;
        F_GOT: begin
          state <= F_POP;
          if (loading) begin
            // one chain code: keep it, mark the point, write its label
            b_we <= 1'b1; b_waddr <= (LEN_W-1)'(i); b_wdata <= q_data[2:0];
            c_we <= 1'b1; c_wx <= px; c_wy <= py; c_wdata <= 2'b10;
            sram_we <= 1'b1; sram_addr <= addr_of(px, py, w); sram_wdata <= label;
            prev <= q_data[2:0];
            px <= step_x(px, q_data[2:0]);
            py <= step_y(py, q_data[2:0]);
            i  <= i + 1'b1;
            if (i + 1'b1 == len) begin
              loading <= 1'b0;
              i <= '0; px <= sx; py <= sy;
              state <= F_SEED_RD;
            end
          end else if (in_seg) begin
            // segment header: x (3), y (3), length (4) nibbles
            hcnt <= hcnt + 1'b1;
            if (hcnt < 4'd3)      sx  <= {sx[GEOM_W-5:0], q_data};
            else if (hcnt < 4'd6) sy  <= {sy[GEOM_W-5:0], q_data};
            else                  len <= {len[11:0], q_data};
            if (hcnt == 4'd9) begin
              in_seg <= 1'b0;
              loading <= 1'b1;
              px <= sx; py <= sy; i <= '0;
              label <= label + 1'b1;
              ev_contour <= 1'b1;
            end
          end else if (marker) begin
            marker <= 1'b0;
            if (q_data == CC_D_SEG_H) begin
              in_seg <= 1'b1; hcnt <= '0; sx <= '0; sy <= '0; len <= '0;
            end else if (q_data == CC_D_FRAME_T) begin
              addr_cnt <= '0;
              state <= F_OUT;
            end
          end else if (q_data == CC_MARK) begin
            marker <= 1'b1;
          end
        end
        F_SEED_RD: state <= F_SEED;
        F_SEED: begin
          ev_seed0 <= pe0;
          ev_seed1 <= pe1;
          cur <= b_rdata;
          if ((pe0 || pe1) && 32'(px) + 1 < 32'(w)) begin
            fx <= px + 1'b1;
            state <= F_FILL_RD;
          end else begin
            prev <= b_rdata;
            px <= step_x(px, b_rdata);
            py <= step_y(py, b_rdata);
            i  <= i + 1'b1;
            if (i + 1'b1 == len) begin
              i <= '0; px <= sx; py <= sy;
              state <= F_UNMARK_RD;
            end else begin
              state <= F_SEED_RD;
            end
          end
        end
        F_FILL_RD: state <= F_FILL;
        F_FILL: begin
          if (!c_win[1][1][1]) begin
            sram_we <= 1'b1; sram_addr <= addr_of(fx, py, w); sram_wdata <= label;
            ev_fill <= 1'b1;
            fx <= fx + 1'b1;
          end
          if (!c_win[1][1][1] && 32'(fx) + 1 < 32'(w)) begin
            state <= F_FILL_RD;
          end else begin
            // seed done, continue along the chain
            prev <= cur;
            px <= step_x(px, cur);
            py <= step_y(py, cur);
            i  <= i + 1'b1;
            if (i + 1'b1 == len) begin
              i <= '0; px <= sx; py <= sy;
              state <= F_UNMARK_RD;
            end else begin
              state <= F_SEED_RD;
            end
          end
        end
        F_UNMARK_RD: state <= F_UNMARK;
        F_UNMARK: begin
          c_we <= 1'b1; c_wx <= px; c_wy <= py; c_wdata <= 2'b00;
          px <= step_x(px, b_rdata);
          py <= step_y(py, b_rdata);
          i  <= i + 1'b1;
          state <= (i + 1'b1 == len) ? F_POP : F_UNMARK_RD;
        end
        F_OUT: begin                      // READ FILLED FRAME
          sram_re <= 1'b1; sram_addr <= addr_cnt;
          addr_cnt <= addr_cnt + 1'b1;
          if (addr_cnt == npix - 1'b1) state <= F_OUT_LAST;
        end
        F_OUT_LAST: begin
          done  <= 1'b1;
          state <= F_IDLE;
        end
        default: state <= F_IDLE;
      endcase
    end
  end
endmodule
