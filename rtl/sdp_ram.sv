// Simple dual-port RAM: one synchronous write port, one synchronous read port.
// Models an FPGA block RAM. The read port returns the word addressed in the
// previous cycle (one clock latency); a read of the address being written in
// the same cycle returns the old contents (read-before-write), so users that
// need the new value must bypass it themselves.
// Contents are cleared by the optional INIT_ZERO initial block so that the
// block can be used without an explicit clearing pass in simulation; the
// designs that use it clear the memory themselves where the algorithm needs it.
module sdp_ram #(
  parameter int unsigned DEPTH     = 1024,
  parameter int unsigned WIDTH     = 8,
  parameter bit          INIT_ZERO = 1'b1,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    if (INIT_ZERO) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
