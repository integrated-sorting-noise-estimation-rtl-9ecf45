// Self-checking testbench for sta: a sequence of Tg and noise values drives
// the quantized level up and down; T(n) is compared with a reference of
// Eq. (4.2), the three-level quantizer and the one-step-per-frame rule.
module tb_sta;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic tg_valid = 0, t_valid;
  logic [7:0] tg, t_n, cfg_a = 8'd128;
  logic [7:0] cfg_q [3] = '{8'd30, 8'd80, 8'd150};
  logic [15:0] sigma2;
  logic [1:0] t_level;
  sta dut (.*);
  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lvl = 1, tc, q;
    int tgs [10] = '{200, 200, 200, 10, 10, 10, 90, 20, 20, 100};
    int sgs [10] = '{0, 0, 0, 0, 0, 0, 0, 300, 0, 60};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 10; i++) begin
      tc = tgs[i] + ((sgs[i] * 128) >> 8);
      q = (tc >= 150) ? 2 : (tc >= 80) ? 1 : 0;
      if (q > lvl) lvl++; else if (q < lvl) lvl--;
      @(negedge clk); tg_valid = 1; tg = 8'(tgs[i]); sigma2 = 16'(sgs[i]);
      @(negedge clk); tg_valid = 0;
      @(negedge clk);
      checks++;
      if (!t_valid || int'(t_level) != lvl || int'(t_n) != int'(cfg_q[lvl])) begin
        failures++; $display("step %0d: valid %0d level %0d T %0d expected level %0d", i, t_valid, t_level, t_n, lvl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
