// INITIAL ADDRESS CONTROL of the counting sorter.
// Build phase: takes the histogram bins in ascending key order and stores in
// the INIT ADDR RAM, for every key value, the position in the sorted output
// where the first key of that value goes (the running sum of all smaller
// bins). Lookup phase: for every key presented in arrival order it returns the
// stored position and advances it by one, so equal keys land in consecutive
// positions in arrival order, which makes the sort stable.
//
// The document's algorithm table uses inclusive sums with an increment and its
// prose speaks of subtracting one; both describe the same placement up to an
// offset, and this block uses exclusive sums with an increment, which reads
// the keys front to back as the document requires.
//
// Interface: hist_valid/hist_cnt (build, bins 0..2**KEY_W-1 in order; the
// bin index is implied by the order, hist_last ends the build). lk_valid/lk_key
// request a lookup, lk_addr is valid one cycle later with lk_addr_valid.
// Back-to-back lookups of the same key are forwarded internally.
module sort_init_addr #(
  parameter int unsigned KEY_W  = 12,
  parameter int unsigned CNT_W  = 15,
  parameter int unsigned ADDR_W = 14
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              hist_valid,
  input  logic [CNT_W-1:0]  hist_cnt,
  input  logic              hist_last,
  output logic              build_done,
  input  logic              lk_valid,
  input  logic [KEY_W-1:0]  lk_key,
  output logic              lk_addr_valid,
  output logic [ADDR_W-1:0] lk_addr
);
  localparam int unsigned BINS = 1 << KEY_W;

  logic [ADDR_W-1:0] run_sum;
  logic [KEY_W-1:0]  build_idx;

  logic              rd_en, wr_en;
  logic [KEY_W-1:0]  rd_addr, wr_addr;
  logic [ADDR_W-1:0] rd_data, wr_data;

  logic              s1_valid;
  logic [KEY_W-1:0]  s1_key;
  logic              lw_valid;
  logic [KEY_W-1:0]  lw_key;
  logic [ADDR_W-1:0] lw_data;
  logic [ADDR_W-1:0] cur;

  sdp_ram #(.DEPTH(BINS), .WIDTH(ADDR_W)) u_init_addr_ram (
    .clk, .we(wr_en), .waddr(wr_addr), .wdata(wr_data),
    .re(rd_en), .raddr(rd_addr), .rdata(rd_data)
  );

  always_comb begin
    rd_en   = lk_valid;
    rd_addr = lk_key;
    cur     = (lw_valid && lw_key == s1_key) ? lw_data : rd_data;
    if (hist_valid) begin
      wr_en   = 1'b1;
      wr_addr = build_idx;
      wr_data = run_sum;
    end else begin
      wr_en   = s1_valid;
      wr_addr = s1_key;
      wr_data = cur + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_sum    <= '0;
      build_idx  <= '0;
      build_done <= 1'b0;
      s1_valid   <= 1'b0;
      s1_key     <= '0;
      lw_valid   <= 1'b0;
      lw_key     <= '0;
      lw_data    <= '0;
    end else begin
      build_done <= hist_valid && hist_last;
      if (hist_valid) begin
        run_sum   <= hist_last ? '0 : run_sum + ADDR_W'(hist_cnt);
        build_idx <= hist_last ? '0 : build_idx + 1'b1;
      end
      s1_valid <= lk_valid;
      s1_key   <= lk_key;
      lw_valid <= wr_en;
      lw_key   <= wr_addr;
      lw_data  <= wr_data;
    end
  end

  assign lk_addr_valid = s1_valid;
  assign lk_addr       = cur;

  a_no_lookup_in_build: assert property (@(posedge clk) disable iff (!rst_n)
    !(hist_valid && (lk_valid || s1_valid)));
endmodule
