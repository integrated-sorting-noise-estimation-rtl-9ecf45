// Self-checking testbench for threshold_estimator: random mu/lambda sets,
// Tg compared with Eq. (4.1) evaluated here with the same 16-bit reciprocal
// of K*L + K, and the K + 2 cycle latency checked.
module tb_threshold_estimator;
  localparam int K = 5, L = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, tg_valid;
  logic [7:0] mu [K];
  logic [9:0] lambda [K];
  logic [7:0] tg;
  threshold_estimator #(.K(K), .L(L)) dut (.*);
  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tot, expv, rcp, n;
    rcp = (65536 + (K * L + K) / 2) / (K * L + K);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      tot = 0;
      for (int k = 0; k < K; k++) begin
        mu[k] = 8'($urandom_range(0, 255));
        lambda[k] = (t == 0) ? 10'd1020 : 10'($urandom_range(0, 1020));
        tot += int'(mu[k]) + int'(lambda[k]);
      end
      expv = (tot * rcp) >> 16;
      if (expv > 255) expv = 255;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      n = 1;
      while (!tg_valid) begin @(negedge clk); n++; end
      checks += 2;
      if (int'(tg) != expv) begin failures++; $display("Tg %0d expected %0d", tg, expv); end
      if (n != K + 2) begin failures++; $display("latency %0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
