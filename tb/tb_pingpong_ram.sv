// tb_pingpong_ram: fills the two banks with different patterns through the
// bank-selected write port, then reads both banks through both read ports for
// both values of rsel and checks each word (port 0 = bank rsel, port 1 = the
// other bank, one cycle latency).
module tb_pingpong_ram;
  localparam int DEPTH = 32, WIDTH = 16;
  logic clk = 0, wsel = 0, we = 0, rsel = 0;
  logic [4:0] waddr = 0, raddr0 = 0, raddr1 = 0;
  logic [WIDTH-1:0] wdata = 0, rdata0, rdata1;
  int checks = 0, failures = 0;

  function automatic logic [WIDTH-1:0] pat(int bank, int a);
    return WIDTH'(bank * 16'h5000 + a * 37 + 1);
  endfunction

  pingpong_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = !clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < DEPTH; i++) begin
        @(negedge clk); wsel = 1'(b); we = 1; waddr = 5'(i); wdata = pat(b, i);
      end
    @(negedge clk); we = 0;
    for (int r = 0; r < 2; r++)
      for (int i = 0; i < DEPTH; i++) begin
        @(negedge clk); rsel = 1'(r); raddr0 = 5'(i); raddr1 = 5'(DEPTH - 1 - i);
        @(posedge clk); #1;
        checks += 2;
        if (rdata0 !== pat(r, i))              begin failures++; $display("port0 r=%0d a=%0d got %h", r, i, rdata0); end
        if (rdata1 !== pat(1 - r, DEPTH-1-i)) begin failures++; $display("port1 r=%0d a=%0d got %h", r, i, rdata1); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
