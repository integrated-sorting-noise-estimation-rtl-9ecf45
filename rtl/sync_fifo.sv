// Synchronous FIFO on one block RAM (sdp_ram).
//
// How it works: write and read pointers with one extra wrap bit; the RAM
// read is synchronous, so rd_data is valid the cycle after rd_en. Writing
// into a full FIFO drops the word and pulses overflow. All choices here are
// this design's own (the document only names its FIFOs).
//
// Interface/timing: wr_en/wr_data push; rd_en (only while !empty) pops and
// rd_data follows one cycle later. count is the fill level.
module sync_fifo #(
  parameter int unsigned DEPTH = 16384,   // power of two
  parameter int unsigned WIDTH = 4,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      count,
  output logic             overflow
);
  logic [AW:0] wp, rp;
  logic        do_wr;

  assign count = wp - rp;
  assign empty = (wp == rp);
  assign full  = (count == (AW+1)'(DEPTH));
  assign do_wr = wr_en && !full && rst_n;

  sdp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_mem (
    .clk, .we(do_wr), .waddr(wp[AW-1:0]), .wdata(wr_data),
    .re(rd_en), .raddr(rp[AW-1:0]), .rdata(rd_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr_en && full;
      if (do_wr) wp <= wp + 1'b1;
      if (rd_en && !empty) rp <= rp + 1'b1;
    end
  end
endmodule
