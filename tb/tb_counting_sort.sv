// Self-checking testbench for counting_sort.
// Streams several sequences back to back (random keys, long runs of equal
// keys, a full-length sequence) and compares the output with a stable
// reference ordering computed here by selection over (key, arrival index).
// Also checks that every sequence is done within 3N + 2**KEY_W + 16 cycles
// of its first key, and that loading of a new sequence overlaps the output
// of the previous one.
module tb_counting_sort;
  localparam int KEY_W = 6;
  localparam int N_MAX = 128;
  localparam int IDX_W = $clog2(N_MAX);
  localparam int NSEQ  = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_last, in_ready, out_valid, out_last, idle;
  logic [KEY_W-1:0] in_key, out_key;
  logic [IDX_W-1:0] out_idx;

  counting_sort #(.KEY_W(KEY_W), .N_MAX(N_MAX)) dut (.*);

  int checks = 0, failures = 0;
  int seq_len [NSEQ];
  int keys [NSEQ][N_MAX];
  int t_first [NSEQ];
  int cycle = 0;
  int overlap_seen = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus
  initial begin
    seq_len = '{37, N_MAX, 1, 100, 64, 90};
    for (int s = 0; s < NSEQ; s++)
      for (int i = 0; i < seq_len[s]; i++)
        keys[s][i] = (s == 3) ? (i / 20) % 3 : (s == 4) ? 5 : int'($urandom_range(0, (1 << KEY_W) - 1));
    in_valid = 0; in_last = 0; in_key = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < NSEQ; s++) begin
      for (int i = 0; i < seq_len[s]; i++) begin
        @(negedge clk);
        in_valid = 1; in_key = KEY_W'(keys[s][i]); in_last = (i == seq_len[s] - 1) && (s != 1);
        while (!in_ready) @(negedge clk);
        if (i == 0) t_first[s] = cycle;
        if (out_valid) overlap_seen++;
      end
      @(negedge clk);
      in_valid = 0; in_last = 0;
      if (s == 2) repeat (50) @(negedge clk);   // a gap between sequences
    end
  end

  // checker
  initial begin
    int used [N_MAX];
    int exp_i, n;
    for (int s = 0; s < NSEQ; s++) begin
      n = seq_len[s];
      for (int i = 0; i < N_MAX; i++) used[i] = 0;
      for (int r = 0; r < n; r++) begin
        // reference: smallest unused key, earliest arrival among equals
        exp_i = -1;
        for (int i = 0; i < n; i++)
          if (!used[i] && (exp_i < 0 || keys[s][i] < keys[s][exp_i])) exp_i = i;
        used[exp_i] = 1;
        do @(negedge clk); while (!out_valid);
        checks++;
        if (int'(out_key) != keys[s][exp_i] || int'(out_idx) != exp_i || out_last != (r == n - 1)) begin
          failures++;
          $display("seq %0d rank %0d: got key %0d idx %0d last %0d, expected key %0d idx %0d",
                   s, r, out_key, out_idx, out_last, keys[s][exp_i], exp_i);
        end
      end
      checks++;
      if (cycle - t_first[s] > 3 * n + (1 << KEY_W) + 16 + (s > 0 ? 3 * N_MAX : 0)) begin
        failures++;
        $display("seq %0d took %0d cycles", s, cycle - t_first[s]);
      end
    end
    checks++;
    if (overlap_seen == 0) begin failures++; $display("no overlap of load and output"); end
    repeat (5) @(posedge clk);
    checks++;
    if (!idle) begin failures++; $display("not idle at end"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
