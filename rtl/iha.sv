// Intensity Histogram Analysis (IHA) of one block W_k of the motion frame D(n).
// Produces the block's mean intensity mu_k and lambda_k, the sum over the L
// equal sections of the block's histogram of each section's most frequent
// gray level g_pl.
//
// How it works: INTENSITY AVERAGE accumulates the pixels and, at the end of the
// block, multiplies the sum by a programmed reciprocal of the block's pixel
// count (cfg_recip, 1/npix with RECIP_FRAC fraction bits) into REG1.
// HISTOGRAM ANALYSIS counts pixels into a histogram RAM (a read-modify-write
// counter, the same unit as the sorter's histogram); at the end of the block
// it reads the histogram out in gray-level order while clearing it: REG2
// holds the largest count seen so far in the current section and REG3 its
// gray level (the first gray level wins a tie, and an empty section yields its
// lowest gray level, both this design's choices); at each section end REG3 is
// added to an accumulator, which ends in REG4 as lambda_k. Two histogram banks
// alternate so that the next frame can be counted during the read-out.
//
// Interface: pix_valid/pix, block_end high with the block's last pixel;
// res_valid pulses with mu and lambda 2**PIX_W + 5 cycles after block_end.
module iha #(
  parameter int unsigned PIX_W      = 8,
  parameter int unsigned L          = 4,
  parameter int unsigned SUM_W      = 24,
  parameter int unsigned RECIP_FRAC = 24,
  localparam int unsigned LAM_W     = PIX_W + $clog2(L)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  pix_valid,
  input  logic [PIX_W-1:0]      pix,
  input  logic                  block_end,
  input  logic [RECIP_FRAC-1:0] cfg_recip,
  output logic                  res_valid,
  output logic [PIX_W-1:0]      mu,
  output logic [LAM_W-1:0]      lambda
);
      localparam int unsigned CNT_W = SUM_W - PIX_W + 1;

  // ---------------- intensity average ----------------
  logic [SUM_W-1:0] acc, acc_done;
  logic [SUM_W+RECIP_FRAC-1:0] prod;
  logic [PIX_W-1:0] reg1;
  assign prod = acc_done * cfg_recip;

  // ---------------- histogram analysis ----------------
  logic bank;   // bank counting the current block
  logic [1:0] h_valid, h_last, h_busy, h_start, h_key_valid;
  logic [PIX_W-1:0] h_bin [2];
  logic [CNT_W-1:0] h_cnt [2];

  for (genvar b = 0; b < 2; b++) begin : g_bank
    assign h_key_valid[b] = pix_valid && (bank == b);
    sort_hist_unit #(.KEY_W(PIX_W), .CNT_W(CNT_W)) u_hist (
      .clk, .rst_n, .key_valid(h_key_valid[b]), .key_in(pix),
      .readout_start(h_start[b]), .busy(h_busy[b]),
      .hist_valid(h_valid[b]), .hist_bin(h_bin[b]), .hist_cnt(h_cnt[b]), .hist_last(h_last[b])
    );
  end

  logic             rv;
  logic [PIX_W-1:0] rbin;
  logic [CNT_W-1:0] rcnt;
  logic             rlast;
  assign rv    = |h_valid;
  assign rbin  = h_valid[1] ? h_bin[1] : h_bin[0];
  assign rcnt  = h_valid[1] ? h_cnt[1] : h_cnt[0];
  assign rlast = h_valid[1] ? h_last[1] : h_last[0];

  logic [CNT_W-1:0] reg2;
  logic [PIX_W-1:0] reg3;
  logic [LAM_W-1:0] acc4, reg4;
  logic             end_d;
  logic             sec_first, sec_last;
  localparam int unsigned OFF_W = PIX_W - $clog2(L);   // gray-level offset inside a section
  assign sec_first = (rbin[OFF_W-1:0] == '0);
  assign sec_last  = (&rbin[OFF_W-1:0]);

  // the comparison and REG2/REG3 update as seen for the current bin
  logic [CNT_W-1:0] max_c;
  logic [PIX_W-1:0] max_g;
  always_comb begin
    if (sec_first) begin
      max_c = rcnt;
      max_g = rbin;
    end else if (rcnt > reg2) begin
      max_c = rcnt;
      max_g = rbin;
    end else begin
      max_c = reg2;
      max_g = reg3;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; acc_done <= '0; reg1 <= '0; bank <= 1'b0; h_start <= '0; end_d <= 1'b0;
      reg2 <= '0; reg3 <= '0; acc4 <= '0; reg4 <= '0;
      res_valid <= 1'b0;
    end else begin
      h_start   <= '0;
      end_d     <= block_end;
      res_valid <= 1'b0;
      if (block_end) begin
        acc_done <= acc + (pix_valid ? SUM_W'(pix) : '0);
        acc      <= '0;
        bank     <= ~bank;
      end else if (pix_valid) begin
        acc <= acc + SUM_W'(pix);
      end
      // start the read-out of the finished bank once its last count is written
      if (end_d) begin
        h_start[~bank] <= 1'b1;
        reg1           <= prod[RECIP_FRAC +: PIX_W];
      end
      if (rv) begin
        reg2 <= max_c;
        reg3 <= max_g;
        if (sec_last) acc4 <= rlast ? '0 : acc4 + LAM_W'(max_g);
        if (rlast) begin
          reg4      <= acc4 + LAM_W'(max_g);
          res_valid <= 1'b1;
        end
      end
    end
  end

  assign mu     = reg1;
  assign lambda = reg4;

  logic unused;
  assign unused = ^{h_busy, prod};

  // the bank that starts counting must have finished its read-out
  a_bank_free: assert property (@(posedge clk) disable iff (!rst_n)
    block_end |-> !h_busy[~bank]);
endmodule
