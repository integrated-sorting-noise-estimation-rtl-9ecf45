// HISTOGRAM UNIT of the counting sorter.
// Counts how often each KEY_W-bit key occurs in a sequence (step 5 of the
// modified counting sort) and later reads the bins out in ascending key order
// while clearing them, so the unit is ready for the next sequence.
//
// How it works: one dual-port bin RAM. In count mode the read port fetches the
// bin of the arriving key, one cycle later the incremented count is written
// back through the write port. A key equal to the one in the write stage
// would read a stale count, so the freshly written value is forwarded
// (this is what the document's shift-and-count stage achieves; the forwarding
// register is this design's own way of doing it). In read-out mode an address
// counter drives the read port and the write port writes zero behind it.
//
// Interface: key_valid/key_in stream keys, one per cycle, no back-pressure.
// A pulse on readout_start (only when no key is in flight) starts the read-out:
// hist_valid is high for 2**KEY_W consecutive cycles, starting two cycles
// later, with hist_bin/hist_cnt, and hist_last on the final bin. busy is high
// during the read-out.
module sort_hist_unit #(
  parameter int unsigned KEY_W = 12,
  parameter int unsigned CNT_W = 15
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             key_valid,
  input  logic [KEY_W-1:0] key_in,
  input  logic             readout_start,
  output logic             busy,
  output logic             hist_valid,
  output logic [KEY_W-1:0] hist_bin,
  output logic [CNT_W-1:0] hist_cnt,
  output logic             hist_last
);
  localparam int unsigned BINS = 1 << KEY_W;

  logic             rd_en;
  logic [KEY_W-1:0] rd_addr;
  logic [CNT_W-1:0] rd_data;
  logic             wr_en;
  logic [KEY_W-1:0] wr_addr;
  logic [CNT_W-1:0] wr_data;

  // read-out address counter
  logic             ro_active;
  logic [KEY_W-1:0] ro_addr;

  // stage 1 (read data available)
  logic             s1_valid, s1_ro, s1_last;
  logic [KEY_W-1:0] s1_key;
  // last write, for forwarding
  logic             lw_valid;
  logic [KEY_W-1:0] lw_key;
  logic [CNT_W-1:0] lw_cnt;

  sdp_ram #(.DEPTH(BINS), .WIDTH(CNT_W)) u_bins (
    .clk, .we(wr_en), .waddr(wr_addr), .wdata(wr_data),
    .re(rd_en), .raddr(rd_addr), .rdata(rd_data)
  );

  always_comb begin
    rd_en   = ro_active | key_valid;
    rd_addr = ro_active ? ro_addr : key_in;
  end

  logic [CNT_W-1:0] cur_cnt;
  always_comb begin
    cur_cnt = (lw_valid && lw_key == s1_key) ? lw_cnt : rd_data;
    wr_en   = s1_valid && rst_n;   // no stray count while in reset
    wr_addr = s1_key;
    wr_data = s1_ro ? '0 : cur_cnt + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ro_active <= 1'b0;
      ro_addr   <= '0;
      s1_valid  <= 1'b0;
      s1_ro     <= 1'b0;
      s1_last   <= 1'b0;
      s1_key    <= '0;
      lw_valid  <= 1'b0;
      lw_key    <= '0;
      lw_cnt    <= '0;
      hist_valid <= 1'b0;
      hist_bin  <= '0;
      hist_cnt  <= '0;
      hist_last <= 1'b0;
    end else begin
      if (readout_start && !ro_active) begin
        ro_active <= 1'b1;
        ro_addr   <= '0;
      end else if (ro_active) begin
        ro_addr <= ro_addr + 1'b1;
        if (ro_addr == KEY_W'(BINS - 1)) ro_active <= 1'b0;
      end
      s1_valid <= rd_en;
      s1_ro    <= ro_active;
      s1_key   <= rd_addr;
      s1_last  <= ro_active && (ro_addr == KEY_W'(BINS - 1));
      lw_valid <= wr_en;
      lw_key   <= wr_addr;
      lw_cnt   <= wr_data;
      hist_valid <= s1_valid && s1_ro;
      hist_bin   <= s1_key;
      hist_cnt   <= cur_cnt;
      hist_last  <= s1_valid && s1_ro && s1_last;
    end
  end

  assign busy = ro_active | (s1_valid & s1_ro) | hist_valid;

  // keys must not arrive while the bins are being read out
  a_no_key_in_readout: assert property (@(posedge clk) disable iff (!rst_n)
    !(key_valid && ro_active));
endmodule
