// Threshold Estimator (TE): Tg = sum_k (lambda_k + mu_k) / (K*L + K).
// The K block results arrive together; two K:1 multiplexers present one
// block's mu_k and lambda_k per cycle to an adder and accumulator, and the
// final sum is multiplied by the constant 1/(K*L + K) (16 fraction bits,
// rounded) into REG1, as in the document's TE diagram.
//
// Interface: start pulses when mu/lambda of all K blocks are valid; tg_valid
// pulses K + 2 cycles later with tg.
module threshold_estimator #(
  parameter int unsigned K     = 4,
  parameter int unsigned L     = 4,
  parameter int unsigned PIX_W = 8,
  localparam int unsigned LAM_W = PIX_W + $clog2(L)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [PIX_W-1:0] mu     [K],
  input  logic [LAM_W-1:0] lambda [K],
  output logic             tg_valid,
  output logic [PIX_W-1:0] tg
);
  localparam int unsigned ACC_W = LAM_W + $clog2(K) + 2;
  localparam int unsigned DIV   = K * L + K;
  localparam logic [15:0] RECIP = 16'((65536 + DIV / 2) / DIV);
  localparam int unsigned KW    = (K > 1) ? $clog2(K) : 1;

  logic          busy, fin;
  logic [KW-1:0] sel;
  logic [ACC_W-1:0] acc;
  logic [ACC_W+15:0] prod;
  assign prod = acc * RECIP;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; fin <= 1'b0; sel <= '0; acc <= '0; tg_valid <= 1'b0; tg <= '0;
    end else begin
      tg_valid <= 1'b0;
      fin      <= 1'b0;
      if (start) begin
        busy <= 1'b1; sel <= '0; acc <= '0;
      end else if (busy) begin
        acc <= acc + ACC_W'(mu[sel]) + ACC_W'(lambda[sel]);
        if (sel == KW'(K - 1)) begin
          busy <= 1'b0;
          fin  <= 1'b1;
        end else begin
          sel <= sel + 1'b1;
        end
      end
      if (fin) begin
        tg       <= (prod[ACC_W+15:16] > ACC_W'({PIX_W{1'b1}})) ? '1 : PIX_W'(prod[ACC_W+15:16]);
        tg_valid <= 1'b1;
      end
    end
  end
endmodule
