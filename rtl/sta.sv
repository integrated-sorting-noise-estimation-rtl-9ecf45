// Spatio-Temporal Adaptation (STA) of the object detection threshold.
// An adder forms the noise-adapted threshold Tc = Tg + a*sigma^2, with the
// noise weight a (0 < a < 1) given as cfg_a/256. A first priority encoder
// quantizes Tc to one of three programmable levels cfg_q[0] < cfg_q[1] <
// cfg_q[2] (the highest level not above Tc, level 0 if Tc is below all). A
// second priority encoder chooses T(n) from the quantized level and the
// previous frame's T(n-1), held in a register: T(n) moves at most one level
// per frame towards the new level. That stepping rule, the level rule of the
// first encoder and the start at the middle level after reset are this
// design's own choices; the document only says that T(n) depends on both
// the quantized level and T(n-1).
//
// Interface: tg_valid/tg in; t_valid pulses two cycles later with t_n and
// its level index t_level.
module sta #(
  parameter int unsigned PIX_W = 8,
  parameter int unsigned VAR_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             tg_valid,
  input  logic [PIX_W-1:0] tg,
  input  logic [VAR_W-1:0] sigma2,
  input  logic [7:0]       cfg_a,
  input  logic [PIX_W-1:0] cfg_q [3],
  output logic             t_valid,
  output logic [PIX_W-1:0] t_n,
  output logic [1:0]       t_level
);
  logic [VAR_W+PIX_W:0] tc;
  logic [VAR_W+7:0]     wsig;
  logic [1:0]           q_idx, prev_idx;
  logic                 s1;

  assign wsig = sigma2 * cfg_a;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tc <= '0; s1 <= 1'b0; prev_idx <= 2'd1; t_valid <= 1'b0;
    end else begin
      s1      <= tg_valid;
      t_valid <= s1;
      if (tg_valid) tc <= (VAR_W+PIX_W+1)'(tg) + (VAR_W+PIX_W+1)'(wsig[VAR_W+7:8]);
      if (s1) begin
        if (q_idx > prev_idx)      prev_idx <= prev_idx + 1'b1;
        else if (q_idx < prev_idx) prev_idx <= prev_idx - 1'b1;
      end
    end
  end

  // first priority encoder: quantization of Tc
  always_comb begin
    if (tc >= (VAR_W+PIX_W+1)'(cfg_q[2]))      q_idx = 2'd2;
    else if (tc >= (VAR_W+PIX_W+1)'(cfg_q[1])) q_idx = 2'd1;
    else                                       q_idx = 2'd0;
  end

  assign t_level = prev_idx;
  assign t_n     = cfg_q[prev_idx];
endmodule
