// pingpong_ram: a pair of RAM blocks that a writer and a reader switch
// between, so one frame can be filled while the previous one is consumed.
// The write port goes to bank wsel. Read port 0 reads bank rsel, read port 1
// reads the other bank (!rsel); each bank therefore sees exactly one read
// address, so the pair maps onto two simple-dual-port RAM blocks.
// Read latency is one cycle on both read ports (bank choice is registered
// with the data). The pairing of RAM blocks follows the resource budget of
// the design; the two-read-port arrangement is this design's own choice.
module pingpong_ram #(
  parameter int DEPTH = dj_pkg::FFT_N,
  parameter int WIDTH = dj_pkg::SAMPLE_W
) (
  input  logic                     clk,
  input  logic                     wsel,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     rsel,
  input  logic [$clog2(DEPTH)-1:0] raddr0,
  output logic [WIDTH-1:0]         rdata0,
  input  logic [$clog2(DEPTH)-1:0] raddr1,
  output logic [WIDTH-1:0]         rdata1
);
  localparam int AW = $clog2(DEPTH);

  logic [AW-1:0]    ra   [2];
  logic [WIDTH-1:0] rd   [2];
  logic             rsel_q;

  assign ra[0] = rsel ? raddr1 : raddr0;
  assign ra[1] = rsel ? raddr0 : raddr1;

  for (genvar k = 0; k < 2; k++) begin : g_bank
    sample_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_ram (
      .clk  (clk),
      .we   (we && (wsel == 1'(k))),
      .waddr(waddr),
      .wdata(wdata),
      .raddr(ra[k]),
      .rdata(rd[k])
    );
  end

  always_ff @(posedge clk) rsel_q <= rsel;

  assign rdata0 = rsel_q ? rd[1] : rd[0];
  assign rdata1 = rsel_q ? rd[0] : rd[1];
endmodule
