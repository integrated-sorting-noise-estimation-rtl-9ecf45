// Self-checking testbench for iha: several blocks of pixels with known
// histograms (including ties and empty sections) are streamed back to back;
// mu and lambda are compared with a reference computed here, and the result
// latency after block_end is checked to be 2**8 + 5 cycles.
module tb_iha;
  localparam int L = 4, NPIX = 300, NB = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic pix_valid = 0, block_end = 0, res_valid;
  logic [7:0] pix, mu;
  logic [9:0] lambda;
  logic [23:0] cfg_recip = 24'((1 << 24) / NPIX);
  iha #(.L(L)) dut (.*);

  int checks = 0, failures = 0;
  int data [NB][NPIX];
  int exp_mu [NB], exp_lam [NB];
  int t_end [NB];
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hist [256];
    int sum, best, bg;
    for (int b = 0; b < NB; b++) begin
      for (int i = 0; i < 256; i++) hist[i] = 0;
      sum = 0;
      for (int i = 0; i < NPIX; i++) begin
        case (b)
          0: data[b][i] = $urandom_range(0, 255);
          1: data[b][i] = (i % 2) ? 70 : 75;          // tie in section 1, others empty
          2: data[b][i] = (i < 100) ? 200 : $urandom_range(0, 40);
          default: data[b][i] = 255 - (i % 60);
        endcase
        hist[data[b][i]]++; sum += data[b][i];
      end
      exp_mu[b] = int'((longint'(sum) * longint'(cfg_recip)) >> 24);
      exp_lam[b] = 0;
      for (int s = 0; s < L; s++) begin
        best = -1; bg = 0;
        for (int g = s * 64; g < s * 64 + 64; g++) if (hist[g] > best) begin best = hist[g]; bg = g; end
        exp_lam[b] += bg;
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < NPIX; i++) begin
        @(negedge clk);
        pix_valid = 1; pix = 8'(data[b][i]); block_end = (i == NPIX - 1);
        if (block_end) t_end[b] = cyc;
      end
    @(negedge clk); pix_valid = 0; block_end = 0;
  end

  initial begin
    for (int b = 0; b < NB; b++) begin
      @(negedge clk iff res_valid);
      checks += 3;
      if (int'(mu) != exp_mu[b]) begin failures++; $display("block %0d mu %0d expected %0d", b, mu, exp_mu[b]); end
      if (int'(lambda) != exp_lam[b]) begin failures++; $display("block %0d lambda %0d expected %0d", b, lambda, exp_lam[b]); end
      if (cyc - t_end[b] != 256 + 5) begin failures++; $display("block %0d latency %0d", b, cyc - t_end[b]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
