// Line buffer RAM: one synchronous write port and one asynchronous read port
// (an FPGA distributed or LUT RAM). Used for the line buffers of the 2D
// window generators, where the window needs the stored pixel in the same
// cycle as its address is known.
module lb_ram #(
  parameter int unsigned DEPTH = 2050,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];
  always_ff @(posedge clk) if (we) mem[addr] <= wdata;
  assign rdata = mem[addr];
endmodule
