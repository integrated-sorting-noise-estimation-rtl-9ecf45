// Fixed-point base-2 logarithm, combinational.
//
// How it works: the integer part is the position of the leading one; the
// fraction is the FRAC_W bits below it (linear interpolation between powers
// of two, error below 0.09). log2(0) is returned as 0. The document uses a
// logarithm circuit with two multipliers; this simpler form is this design's
// choice, good enough for comparing two logarithms against a threshold.
//
// Interface: v (IN_W bits) -> y in Q(IW).FRAC_W, IW = clog2(IN_W).
module log2_fx #(
  parameter int unsigned IN_W   = 16,
  parameter int unsigned FRAC_W = 4,
  localparam int unsigned IW    = $clog2(IN_W)
) (
  input  logic [IN_W-1:0]        v,
  output logic [IW+FRAC_W-1:0]   y
);
  always_comb begin
    logic [IW-1:0]   p;
    logic [IN_W-1:0] n;
    p = '0;
    for (int b = 0; b < IN_W; b++)
      if (v[b]) p = IW'(b);
    n = v << (IN_W - 1 - int'(p));     // leading one moved to the MSB
    y = {p, n[IN_W-2 -: FRAC_W]};
  end
endmodule
