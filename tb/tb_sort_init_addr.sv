// Self-checking testbench for sort_init_addr: builds the start positions from
// a histogram, then looks up a key sequence with that histogram (including
// back-to-back equal keys) and checks each returned position against a
// reference computed here; repeats with a second histogram.
module tb_sort_init_addr;
  localparam int KEY_W = 4, CNT_W = 8, ADDR_W = 7;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic hist_valid = 0, hist_last = 0, build_done, lk_valid = 0, lk_addr_valid;
  logic [CNT_W-1:0] hist_cnt = '0;
  logic [KEY_W-1:0] lk_key = '0;
  logic [ADDR_W-1:0] lk_addr;
  sort_init_addr #(.KEY_W(KEY_W), .CNT_W(CNT_W), .ADDR_W(ADDR_W)) dut (.*);

  int checks = 0, failures = 0;
  int keys [100];
  int hist [16];
  int nextpos [16];
  int expq [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (lk_addr_valid) begin
    int e;
    e = expq.pop_front();
    checks++;
    if (int'(lk_addr) != e) begin failures++; $display("lookup got %0d expected %0d", lk_addr, e); end
  end

  task automatic run_seq(input int n, input bit runs);
    int s;
    for (int i = 0; i < 16; i++) hist[i] = 0;
    for (int i = 0; i < n; i++) begin
      keys[i] = runs ? (i / 7) % 5 : $urandom_range(0, 15);
      hist[keys[i]]++;
    end
    s = 0;
    for (int i = 0; i < 16; i++) begin nextpos[i] = s; s += hist[i]; end
    for (int b = 0; b < 16; b++) begin
      @(negedge clk); hist_valid = 1; hist_cnt = CNT_W'(hist[b]); hist_last = (b == 15);
    end
    @(negedge clk); hist_valid = 0; hist_last = 0;
    checks++;
    if (!build_done) begin failures++; $display("build_done missing"); end
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      lk_valid = 1; lk_key = KEY_W'(keys[i]);
      expq.push_back(nextpos[keys[i]]);
      nextpos[keys[i]]++;
    end
    @(negedge clk); lk_valid = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_seq(100, 0);
    run_seq(90, 1);
    checks++;
    if (expq.size() != 0) begin failures++; $display("missing lookups"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
