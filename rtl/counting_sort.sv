// Stable counting sorter (modified counting sort) for streams of KEY_W-bit keys.
//
// A sequence of up to N_MAX keys is streamed in (in_valid/in_key, in_last on
// its final key). While it arrives, each key is written to a TEMPORAL KEY
// BUFFER and counted by the HISTOGRAM UNIT. The histogram is then read out
// into the INITIAL ADDRESS CONTROL, which turns it into the first output
// position of every key value. The DMA sequencer then re-reads the buffered
// keys in arrival order (first in, first out), asks for each key's output
// position and writes key and arrival index into the INDEXING RAM. Finally the
// OUTPUT CONTROLLER reads the INDEXING RAM front to back, presenting the keys
// in ascending, stable order, and clears each word it has read.
//
// The key buffer has two banks, so the next sequence can be loaded and
// counted while the previous one is scattered and output (the overlap the
// document asks of its DMA). Loading stops (in_ready low) only while the
// histogram of a finished sequence waits for, or is copied into, the INIT
// ADDR RAM. Carrying each key's arrival index to the output is this design's
// addition: it lets a user sort records by key (the noise estimator sorts
// block indices by homogeneity this way).
//
// Timing per sequence of N keys: N load cycles, 2**KEY_W + 3 cycles of
// histogram transfer, N + 2 scatter cycles, then out_valid for N consecutive
// cycles (out_last on the final key). The output stream has no back-pressure.
module counting_sort #(
  parameter int unsigned KEY_W = 12,
  parameter int unsigned N_MAX = 16384,
  localparam int unsigned IDX_W = $clog2(N_MAX),
  localparam int unsigned CNT_W = $clog2(N_MAX) + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [KEY_W-1:0] in_key,
  input  logic             in_last,
  output logic             in_ready,
  output logic             out_valid,
  output logic [KEY_W-1:0] out_key,
  output logic [IDX_W-1:0] out_idx,
  output logic             out_last,
  output logic             idle
);
  typedef enum logic [1:0] {F_LOAD, F_WAIT, F_HREAD, F_HAND} front_t;
  typedef enum logic [1:0] {B_IDLE, B_SCATTER, B_OUTPUT} back_t;

  front_t fst;
  back_t  bst;

  logic             wbank;        // bank being loaded
  logic [IDX_W-1:0] wcnt;         // keys loaded so far, minus one after last
  logic [IDX_W:0]   seq_len;      // length handed to the back end
  logic             rbank;

  // ---------------- temporal key buffers (two banks) ----------------
  logic             kb_we, kb_re;
  logic [IDX_W:0]   kb_waddr, kb_raddr;
  logic [KEY_W-1:0] kb_rdata;

  sdp_ram #(.DEPTH(2 * N_MAX), .WIDTH(KEY_W)) u_key_buf (
    .clk, .we(kb_we), .waddr(kb_waddr), .wdata(in_key),
    .re(kb_re), .raddr(kb_raddr), .rdata(kb_rdata)
  );

  logic accept;
  assign in_ready = (fst == F_LOAD);
  assign accept   = in_valid && in_ready;
  assign kb_we    = accept;
  assign kb_waddr = {wbank, wcnt};

  // ---------------- histogram unit ----------------
  logic             h_start, h_busy, h_valid, h_last;
  logic [KEY_W-1:0] h_bin;
  logic [CNT_W-1:0] h_cnt;

  sort_hist_unit #(.KEY_W(KEY_W), .CNT_W(CNT_W)) u_hist (
    .clk, .rst_n, .key_valid(accept), .key_in(in_key),
    .readout_start(h_start), .busy(h_busy),
    .hist_valid(h_valid), .hist_bin(h_bin), .hist_cnt(h_cnt), .hist_last(h_last)
  );

  // ---------------- initial address control ----------------
  logic             ia_done, lk_valid, lk_addr_valid;
  logic [IDX_W-1:0] lk_addr;
  logic [KEY_W-1:0] lk_key;

  sort_init_addr #(.KEY_W(KEY_W), .CNT_W(CNT_W), .ADDR_W(IDX_W)) u_init (
    .clk, .rst_n, .hist_valid(h_valid), .hist_cnt(h_cnt), .hist_last(h_last),
    .build_done(ia_done), .lk_valid(lk_valid), .lk_key(lk_key),
    .lk_addr_valid(lk_addr_valid), .lk_addr(lk_addr)
  );

  // ---------------- front end: load and histogram transfer ----------------
  logic hand_req;   // front has a finished INIT ADDR RAM for the back end
  logic last_seen;  // a delayed copy: the key of in_last has been counted

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fst       <= F_LOAD;
      wbank     <= 1'b0;
      wcnt      <= '0;
      seq_len   <= '0;
      h_start   <= 1'b0;
      last_seen <= 1'b0;
    end else begin
      h_start   <= 1'b0;
      last_seen <= 1'b0;
      unique case (fst)
        F_LOAD: if (accept) begin
          if (in_last || wcnt == IDX_W'(N_MAX - 1)) begin
            seq_len   <= {1'b0, wcnt} + 1'b1;
            wcnt      <= '0;
            fst       <= F_WAIT;
            last_seen <= 1'b1;
          end else begin
            wcnt <= wcnt + 1'b1;
          end
        end
        // the INIT ADDR RAM is free once the back end is no longer scattering
        F_WAIT: if (!last_seen && bst != B_SCATTER) begin
          h_start <= 1'b1;
          fst     <= F_HREAD;
        end
        F_HREAD: if (ia_done) fst <= F_HAND;
        F_HAND: if (bst == B_IDLE) begin
          fst   <= F_LOAD;
          wbank <= ~wbank;
        end
        default: fst <= F_LOAD;
      endcase
    end
  end
  assign hand_req = (fst == F_HAND) && (bst == B_IDLE);

  // ---------------- back end: DMA scatter and output controller ----------------
  logic [IDX_W:0]   rptr;
  logic [IDX_W:0]   blen;
  logic             s1_valid;       // key buffer read data valid
  logic [IDX_W-1:0] s1_idx;
  logic [IDX_W-1:0] s2_idx;
  logic [KEY_W-1:0] s2_key;
  logic             sc_done;

  assign kb_re    = (bst == B_SCATTER) && (rptr < blen);
  assign kb_raddr = {rbank, rptr[IDX_W-1:0]};
  assign lk_valid = s1_valid;
  assign lk_key   = kb_rdata;

  // indexing RAM
  localparam int unsigned IW = KEY_W + IDX_W;
  logic          ix_we, ix_re;
  logic [IDX_W-1:0] ix_waddr, ix_raddr;
  logic [IW-1:0] ix_wdata, ix_rdata;

  sdp_ram #(.DEPTH(N_MAX), .WIDTH(IW)) u_indexing_ram (
    .clk, .we(ix_we), .waddr(ix_waddr), .wdata(ix_wdata),
    .re(ix_re), .raddr(ix_raddr), .rdata(ix_rdata)
  );

  logic [IDX_W:0] optr;
  logic           o1_valid, o1_last;
  logic [IDX_W-1:0] o1_addr;

  always_comb begin
    ix_re    = (bst == B_OUTPUT) && (optr < blen);
    ix_raddr = optr[IDX_W-1:0];
    if (bst == B_OUTPUT) begin
      // output controller clears each word behind its read
      ix_we    = o1_valid;
      ix_waddr = o1_addr;
      ix_wdata = '0;
    end else begin
      ix_we    = lk_addr_valid;
      ix_waddr = lk_addr;
      ix_wdata = {s2_key, s2_idx};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bst      <= B_IDLE;
      rbank    <= 1'b0;
      rptr     <= '0;
      optr     <= '0;
      blen     <= '0;
      s1_valid <= 1'b0;
      s1_idx   <= '0;
      s2_idx   <= '0;
      s2_key   <= '0;
      sc_done  <= 1'b0;
      o1_valid <= 1'b0;
      o1_last  <= 1'b0;
      o1_addr  <= '0;
      out_valid <= 1'b0;
      out_key  <= '0;
      out_idx  <= '0;
      out_last <= 1'b0;
    end else begin
      s1_valid <= kb_re;
      s1_idx   <= rptr[IDX_W-1:0];
      s2_idx   <= s1_idx;
      s2_key   <= kb_rdata;
      o1_valid <= ix_re;
      o1_addr  <= optr[IDX_W-1:0];
      o1_last  <= ix_re && (optr == blen - 1'b1);
      out_valid <= o1_valid;
      out_last  <= o1_last;
      {out_key, out_idx} <= ix_rdata;
      unique case (bst)
        B_IDLE: if (hand_req) begin
          bst   <= B_SCATTER;
          rbank <= wbank;
          blen  <= seq_len;
          rptr  <= '0;
        end
        B_SCATTER: begin
          if (kb_re) rptr <= rptr + 1'b1;
          // the last write to the indexing RAM leaves two cycles after the last read
          sc_done <= (rptr == blen) && !s1_valid && !lk_addr_valid;
          if (sc_done) begin
            bst     <= B_OUTPUT;
            optr    <= '0;
            sc_done <= 1'b0;
          end
        end
        B_OUTPUT: begin
          if (ix_re) optr <= optr + 1'b1;
          if (out_last) bst <= B_IDLE;
        end
        default: bst <= B_IDLE;
      endcase
    end
  end

  assign idle = (fst == F_LOAD) && (wcnt == '0) && (bst == B_IDLE) && !h_busy;
endmodule
