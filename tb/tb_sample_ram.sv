// tb_sample_ram: writes random words to random addresses of one RAM block and
// checks every read against a reference array, including the one-cycle read
// latency and read-before-write behaviour on a colliding address.
module tb_sample_ram;
  localparam int DEPTH = 64, WIDTH = 16;
  logic clk = 0, we = 0;
  logic [5:0] waddr = 0, raddr = 0;
  logic [WIDTH-1:0] wdata = 0, rdata;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  sample_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);
  always #5 clk = !clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk); we = 1; waddr = 6'(i); wdata = WIDTH'($urandom); ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 400; n++) begin
      logic [WIDTH-1:0] expv;
      @(negedge clk);
      raddr = 6'($urandom); we = 1'($urandom); waddr = ($urandom % 4 == 0) ? raddr : 6'($urandom);
      wdata = WIDTH'($urandom);
      expv = ref_mem[raddr];
      @(posedge clk); #1;
      if (we) ref_mem[waddr] = wdata;
      checks++;
      if (rdata !== expv) begin failures++; $display("mismatch addr %0d: %h vs %h", raddr, rdata, expv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
