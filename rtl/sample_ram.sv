// sample_ram: one RAM block of the mixer, DEPTH words of WIDTH bits with one
// write port and one read port (simple dual port), both synchronous to clk.
// Read data appears one cycle after raddr (registered read), which maps onto
// FPGA block RAM. A read of the address being written returns the old word.
// Depth 2048 follows the intended size of each RAM block; the port structure
// and read latency are this design's choices. Contents are not reset.
module sample_ram #(
  parameter int DEPTH = dj_pkg::FFT_N,
  parameter int WIDTH = dj_pkg::SAMPLE_W
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
