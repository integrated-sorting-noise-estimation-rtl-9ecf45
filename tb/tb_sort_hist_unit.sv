// Self-checking testbench for sort_hist_unit: random key streams with
// back-to-back and alternating repeats, then read-out checked against counts
// kept here; a second sequence checks that read-out cleared the bins, and the
// read-out is checked to take exactly 2**KEY_W consecutive cycles.
module tb_sort_hist_unit;
  localparam int KEY_W = 5, CNT_W = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic key_valid = 0, readout_start = 0, busy, hist_valid, hist_last;
  logic [KEY_W-1:0] key_in = '0, hist_bin;
  logic [CNT_W-1:0] hist_cnt;
  sort_hist_unit #(.KEY_W(KEY_W), .CNT_W(CNT_W)) dut (.*);

  int checks = 0, failures = 0;
  int ref_cnt [1 << KEY_W];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_seq(input int n, input int mode);
    int k;
    for (int i = 0; i < (1 << KEY_W); i++) ref_cnt[i] = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      case (mode)
        0: k = $urandom_range(0, (1 << KEY_W) - 1);
        1: k = (i % 2) ? 3 : 7;      // alternating
        default: k = (i < n / 2) ? 9 : $urandom_range(0, 3); // runs
      endcase
      key_valid = ($urandom_range(0, 3) != 0);
      key_in = KEY_W'(k);
      if (key_valid) ref_cnt[k]++;
    end
    @(negedge clk); key_valid = 0;
    @(negedge clk); readout_start = 1;
    @(negedge clk); readout_start = 0;
    for (int b = 0; b < (1 << KEY_W); b++) begin
      int wait_cycles = 0;
      @(negedge clk);
      while (!hist_valid && wait_cycles < 5) begin @(negedge clk); wait_cycles++; end
      checks++;
      if (b > 0 && wait_cycles != 0) begin failures++; $display("gap in read-out at bin %0d", b); end
      if (!hist_valid || int'(hist_bin) != b || int'(hist_cnt) != ref_cnt[b] || hist_last != (b == (1 << KEY_W) - 1)) begin
        failures++;
        $display("bin %0d: valid %0d bin %0d cnt %0d last %0d exp %0d", b, hist_valid, hist_bin, hist_cnt, hist_last, ref_cnt[b]);
      end
    end
    @(negedge clk);
    checks++;
    if (hist_valid || busy) begin failures++; $display("read-out did not stop"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_seq(300, 0);
    run_seq(200, 1);
    run_seq(150, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
