// tb_dj_avalon_regs: Avalon-MM transactions against the register block:
// sample writes must reach the song A/B RAM ports with the right address and
// data, effect registers must reset to unity gain / pass-all and read back
// what was written, STATUS must show BUSY, a commit must pulse only while not
// BUSY, and spectrum reads must return the spectrum RAM word one cycle later.
module tb_dj_avalon_regs;
  import dj_pkg::*;
  localparam int N = 2048;
  logic clk = 0, rst_n = 0;
  logic [AVS_AW-1:0] avs_address = 0;
  logic avs_chipselect = 0, avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = 0, avs_readdata;
  logic samp_we_a, samp_we_b, commit, busy = 0;
  logic [10:0] samp_addr, spec_raddr;
  logic [15:0] samp_data;
  effect_cfg_t cfg;
  logic [31:0] spec_rdata;
  int checks = 0, failures = 0, commits = 0;

  dj_avalon_regs #(.N(N)) dut (.*);
  always #5 clk = !clk;
  // spectrum RAM model: word k = k * 0x00010003, one cycle latency
  always_ff @(posedge clk) spec_rdata <= 32'(spec_raddr) * 32'h0001_0003;
  always_ff @(posedge clk) if (commit) commits++;
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(string nm, longint got, longint expv);
    checks++;
    if (got != expv) begin failures++; $display("%s: got %h expected %h", nm, got, expv); end
  endtask

  task automatic wr(int addr, int data, output bit wa, output bit wb, output int sa, output int sd);
    @(negedge clk);
    avs_address = AVS_AW'(addr); avs_writedata = 32'(data); avs_write = 1; avs_chipselect = 1;
    #1; wa = samp_we_a; wb = samp_we_b; sa = samp_addr; sd = samp_data;
    @(negedge clk);
    avs_write = 0; avs_chipselect = 0;
  endtask

  task automatic rd(int addr, output int data);
    @(negedge clk);
    avs_address = AVS_AW'(addr); avs_read = 1; avs_chipselect = 1;
    @(negedge clk);
    avs_read = 0; avs_chipselect = 0;
    data = avs_readdata;
  endtask

  initial begin
    bit wa, wb; int sa, sd, d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    rd(32'h1801, d); chk("reset gain A", d, 128);
    rd(32'h1804, d); chk("reset cutoff B", d, N);
    wr(32'h0005, 32'hFFFF_8001, wa, wb, sa, sd);
    chk("we_a", wa, 1); chk("we_b", wb, 0); chk("addr", sa, 5); chk("data", sd, 16'h8001);
    wr(32'h07FF, 32'h1234, wa, wb, sa, sd);
    chk("we_a", wa, 1); chk("addr", sa, 2047);
    wr(32'h0800 + 100, 32'h00004321, wa, wb, sa, sd);
    chk("we_a", wa, 0); chk("we_b", wb, 1); chk("addr", sa, 100); chk("data", sd, 16'h4321);
    wr(32'h1801, 200, wa, wb, sa, sd); chk("no ram write", wa | wb, 0);
    wr(32'h1802, 64, wa, wb, sa, sd);
    wr(32'h1803, 300, wa, wb, sa, sd);
    wr(32'h1804, 12, wa, wb, sa, sd);
    chk("cfg gain a", cfg.gain_a, 200); chk("cfg gain b", cfg.gain_b, 64);
    chk("cfg cut a", cfg.cutoff_a, 300); chk("cfg cut b", cfg.cutoff_b, 12);
    rd(32'h1803, d); chk("read cutoff A", d, 300);
    rd(32'h1800, d); chk("status idle", d, 0);
    busy = 1;
    rd(32'h1800, d); chk("status busy", d, 1);
    wr(32'h1800, 1, wa, wb, sa, sd);
    chk("commit ignored while busy", commits, 0);
    busy = 0;
    wr(32'h1800, 1, wa, wb, sa, sd);
    chk("commit accepted", commits, 1);
    for (int k = 0; k < 20; k++) begin
      int kk;
      kk = $urandom_range(0, N - 1);
      rd(32'h1000 + kk, d); chk("spectrum read", d, kk * 32'h0001_0003);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
