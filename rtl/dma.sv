// DMA: multi-channel direct memory access between pixel streams and one
// external frame memory port (the DDR memory controller sits behind it).
//
// How it works: NR read channels and NW write channels, each with its own
// FIFO of FIFO_DEPTH words (4 KB deep as in the document) and a transfer
// description (base address, length in words) loaded with a start pulse;
// the descriptions are kept in registers of the DMA controller.
//  - A write channel raises a request when its FIFO holds a full burst
//    (BURST words, at most 2 KB as in the document) or the rest of its
//    transfer.
//  - A read channel raises a request automatically when its FIFO has room
//    for a burst (half empty with the default BURST = FIFO_DEPTH / 2, as in
//    the document) and words remain to be read.
//  - A round-robin arbiter picks one requesting channel (document); the
//    controller then serves that channel for one burst and moves on.
// The memory port is this design's choice: one word per accepted mem_req
// (mem_gnt); read data returns in order on mem_rvalid/mem_rdata with any
// latency and is always accepted (FIFO room is reserved before the burst).
// Random single-word accesses for processing units (document, contour
// headers) are not provided.
//
// Interface/timing: cfg_base/cfg_len are taken on start[ch]; busy[ch] stays
// high until the whole transfer has passed through memory (for a write
// channel) or into the FIFO (read channel). Channel c < NR is read channel
// c, channel NR + w is write channel w. Streams are valid/ready; a write
// burst moves one word per two cycles (FIFO read then memory write), a read
// burst one word per granted cycle. Read streams deliver up to one word per
// cycle through a two-entry output buffer.
module dma #(
  parameter int unsigned NR         = 3,      // read channels (BK or I(n-1), D(n-1), spare)
  parameter int unsigned NW         = 2,      // write channels (I(n) or BK, D(n))
  parameter int unsigned DW         = 8,      // word width (one pixel)
  parameter int unsigned AW         = 24,     // memory word address width
  parameter int unsigned FIFO_DEPTH = 4096,   // words per channel FIFO
  parameter int unsigned BURST      = 2048,   // words per memory burst
  localparam int unsigned NC  = NR + NW,
  localparam int unsigned CW  = (NC > 1) ? $clog2(NC) : 1,
  localparam int unsigned FAW = $clog2(FIFO_DEPTH)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // transfer descriptions
  input  logic [NC-1:0]        start,
  input  logic [AW-1:0]        cfg_base [NC],
  input  logic [AW-1:0]        cfg_len  [NC],
  output logic [NC-1:0]        busy,
  // read channel streams (memory to processing)
  output logic [NR-1:0]        rd_valid,
  output logic [DW-1:0]        rd_data [NR],
  input  logic [NR-1:0]        rd_ready,
  // write channel streams (processing to memory)
  input  logic [NW-1:0]        wr_valid,
  input  logic [DW-1:0]        wr_data [NW],
  output logic [NW-1:0]        wr_ready,
  // memory port
  output logic                 mem_req,
  output logic                 mem_we,
  output logic [AW-1:0]        mem_addr,
  output logic [DW-1:0]        mem_wdata,
  input  logic                 mem_gnt,
  input  logic                 mem_rvalid,
  input  logic [DW-1:0]        mem_rdata
);

  // ---------------------------------------------------------------- FIFOs
  logic [NC-1:0]  f_we, f_re, f_empty, f_full, f_ovf;
  logic [DW-1:0]  f_wd [NC];
  logic [DW-1:0]  f_rd [NC];
  logic [FAW:0]   f_cnt [NC];

  for (genvar c = 0; c < NC; c++) begin : g_fifo
    sync_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(DW)) u_fifo (
      .clk, .rst_n, .wr_en(f_we[c]), .wr_data(f_wd[c]), .rd_en(f_re[c]),
      .rd_data(f_rd[c]), .empty(f_empty[c]), .full(f_full[c]),
      .count(f_cnt[c]), .overflow(f_ovf[c]));
  end

  // ------------------------------------------------------- descriptions
  logic [AW-1:0] addr [NC];     // next memory address
  logic [AW-1:0] left [NC];     // words not yet requested from / written to memory
  logic [AW-1:0] pend [NC];     // read: words still to arrive; write: unused

  // --------------------------------------------------------- controller
  typedef enum logic [1:0] {D_IDLE, D_RD, D_WR_FETCH, D_WR_MEM} dstate_e;
  dstate_e       st;
  logic [CW-1:0] cur, rr;       // served channel, round-robin pointer
  logic [AW-1:0] n_issue;       // words left to issue in this burst
  logic [NC-1:0] req;

  function automatic logic [AW-1:0] min_burst(input logic [AW-1:0] l);
    return (l < AW'(BURST)) ? l : AW'(BURST);
  endfunction

  always_comb begin
    for (int c = 0; c < NC; c++) begin
      if (c < NR)
        req[c] = (left[c] != '0) &&
                 (32'(FIFO_DEPTH) - 32'(f_cnt[c]) - 32'(pend[c]) >= 32'(min_burst(left[c])));
      else
        req[c] = (left[c] != '0) && (32'(f_cnt[c]) >= 32'(min_burst(left[c])));
    end
  end

  // round-robin pick: first requester after rr
  logic          pick_v;
  logic [CW-1:0] pick;
  always_comb begin
    pick_v = 1'b0; pick = '0;
    for (int k = 1; k <= NC; k++) begin
      int c;
      c = (int'(rr) + k) % NC;
      if (!pick_v && req[c]) begin pick_v = 1'b1; pick = CW'(c); end
    end
  end

  assign mem_req   = (st == D_RD) || (st == D_WR_MEM);
  assign mem_we    = (st == D_WR_MEM);
  assign mem_addr  = addr[cur];
  assign mem_wdata = f_rd[cur];

  // which read channel receives returning data: the burst's channel, kept
  // until all its words have arrived
  logic [CW-1:0] rcv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= D_IDLE; cur <= '0; rr <= CW'(NC - 1); n_issue <= '0; rcv <= '0;
      for (int c = 0; c < NC; c++) begin addr[c] <= '0; left[c] <= '0; pend[c] <= '0; end
    end else begin
      for (int c = 0; c < NC; c++)
        if (start[c]) begin addr[c] <= cfg_base[c]; left[c] <= cfg_len[c]; end
      if (mem_rvalid) pend[rcv] <= pend[rcv] - 1'b1;
      unique case (st)
        D_IDLE:
          // a new read burst waits until the last one has fully arrived
          if (pick_v && (pend[rcv] == '0 || (mem_rvalid && pend[rcv] == AW'(1)))) begin
            cur     <= pick;
            rr      <= pick;
            n_issue <= min_burst(left[pick]);
            if (32'(pick) < NR) begin
              st  <= D_RD;
              rcv <= pick;
              pend[pick] <= min_burst(left[pick]);
            end else
              st <= D_WR_FETCH;
          end
        D_RD:
          if (mem_gnt) begin
            addr[cur] <= addr[cur] + 1'b1;
            left[cur] <= left[cur] - 1'b1;
            n_issue   <= n_issue - 1'b1;
            if (n_issue == AW'(1)) st <= D_IDLE;
          end
        D_WR_FETCH:
          st <= D_WR_MEM;                       // FIFO data valid next cycle
        D_WR_MEM:
          if (mem_gnt) begin
            addr[cur] <= addr[cur] + 1'b1;
            left[cur] <= left[cur] - 1'b1;
            n_issue   <= n_issue - 1'b1;
            st        <= (n_issue == AW'(1)) ? D_IDLE : D_WR_FETCH;
          end
        default: st <= D_IDLE;
      endcase
    end
  end

  for (genvar c = 0; c < NC; c++) begin : g_busy
    if (c < NR) begin : g_r
      assign busy[c] = (left[c] != '0) || (pend[c] != '0);
    end else begin : g_w
      assign busy[c] = (left[c] != '0);
    end
  end

  // ------------------------------------------------------ write channels
  for (genvar w = 0; w < NW; w++) begin : g_wr
    localparam int unsigned C = NR + w;
    assign wr_ready[w] = !f_full[C];
    assign f_we[C]     = wr_valid[w] && !f_full[C];
    assign f_wd[C]     = wr_data[w];
    assign f_re[C]     = (st == D_WR_FETCH) && (cur == CW'(C));
  end

  // ------------------------------------------------------- read channels
  for (genvar r = 0; r < NR; r++) begin : g_rd
    logic [DW-1:0] ob [2];      // two-entry output buffer
    logic [1:0]    on;
    logic          pop_q, take;
    assign f_we[r]  = mem_rvalid && (rcv == CW'(r));
    assign f_wd[r]  = mem_rdata;
    assign take     = rd_valid[r] && rd_ready[r];
    assign f_re[r]  = !f_empty[r] && (32'(on) - 32'(take) + 32'(pop_q) <= 1);
    assign rd_valid[r] = (on != '0);
    assign rd_data[r]  = ob[0];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        on <= '0; pop_q <= 1'b0; ob[0] <= '0; ob[1] <= '0;
      end else begin
        pop_q <= f_re[r];
        unique case ({take, pop_q})
          2'b10: begin ob[0] <= ob[1]; on <= on - 1'b1; end
          2'b01: begin ob[on[0]] <= f_rd[r]; on <= on + 1'b1; end
          2'b11: begin
            if (on == 2'd1) ob[0] <= f_rd[r];
            else begin ob[0] <= ob[1]; ob[1] <= f_rd[r]; end
          end
          default: ;
        endcase
      end
    end
  end

endmodule
