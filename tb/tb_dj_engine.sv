// tb_dj_engine: runs one frame through the processing core with RAM models
// around it (N = 16). Song A is passed at gain 1.0 with the filter open,
// song B at gain 0.75 with a low-pass cutoff of 3 bins. Checks, against
// transforms computed in real arithmetic in the testbench:
//   - each song's frequency RAM holds DFT(x)/N,
//   - the mix RAM holds the gained, filtered sum of the spectra,
//   - the output RAM holds the inverse transform of the mix,
//   - busy is high for exactly 7*N + 3*log2(N) + 9 cycles, and a start
//     while busy does not restart the frame.
module tb_dj_engine;
  import dj_pkg::*;
  localparam int N = 16, LOGN = 4, W = 16;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, start = 0, busy, frame_done;
  effect_cfg_t cfg;
  logic [LOGN-1:0] in_raddr, freq_waddr, freq_raddr, mix_waddr, mix_raddr, out_waddr;
  logic [W-1:0] in_rdata_a, in_rdata_b, out_wdata;
  logic freq_we_a, freq_we_b, mix_we, out_we;
  logic [2*W-1:0] freq_wdata, freq_rdata_a, freq_rdata_b, mix_wdata, mix_rdata;
  logic [W-1:0] in_a [N], in_b [N], out_m [N];
  logic [2*W-1:0] fa [N], fb [N], mx [N];
  int checks = 0, failures = 0, cyc = 0, t_start = 0, t_done = 0, dones = 0;

  dj_engine #(.N(N), .W(W)) dut (.*);

  always #5 clk = !clk;
  always_ff @(posedge clk) begin
    in_rdata_a   <= in_a[in_raddr];
    in_rdata_b   <= in_b[in_raddr];
    freq_rdata_a <= fa[freq_raddr];
    freq_rdata_b <= fb[freq_raddr];
    mix_rdata    <= mx[mix_raddr];
    if (freq_we_a) fa[freq_waddr] <= freq_wdata;
    if (freq_we_b) fb[freq_waddr] <= freq_wdata;
    if (mix_we)    mx[mix_waddr]  <= mix_wdata;
    if (out_we)    out_m[out_waddr] <= out_wdata;
  end
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (frame_done) begin t_done = cyc; dones++; end
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic near(string nm, real expv, int got, real tol);
    checks++;
    if ((real'(got) - expv) > tol || (expv - real'(got)) > tol) begin
      failures++; $display("%s: got %0d expected %f", nm, got, expv);
    end
  endtask

  initial begin
    real xa [N], xb [N], ar [N], ai [N], br [N], bi [N], mr [N], mi [N], y [N];
    for (int n = 0; n < N; n++) begin
      xa[n] = $floor(8000.0 * $cos(2 * PI * n / N) + 3000.0 * $sin(2 * PI * 5 * n / N));
      xb[n] = $floor(6000.0 * $sin(2 * PI * 2 * n / N) + 5000.0 * $cos(2 * PI * 6 * n / N));
      in_a[n] = W'(int'(xa[n])); in_b[n] = W'(int'(xb[n]));
    end
    for (int k = 0; k < N; k++) begin
      ar[k] = 0; ai[k] = 0; br[k] = 0; bi[k] = 0;
      for (int n = 0; n < N; n++) begin
        ar[k] += xa[n] * $cos(2 * PI * k * n / N) / N; ai[k] -= xa[n] * $sin(2 * PI * k * n / N) / N;
        br[k] += xb[n] * $cos(2 * PI * k * n / N) / N; bi[k] -= xb[n] * $sin(2 * PI * k * n / N) / N;
      end
      mr[k] = ar[k] + ((k < 3 || k > N - 3) ? 0.75 * br[k] : 0.0);
      mi[k] = ai[k] + ((k < 3 || k > N - 3) ? 0.75 * bi[k] : 0.0);
    end
    for (int n = 0; n < N; n++) begin
      y[n] = 0;
      for (int k = 0; k < N; k++) y[n] += mr[k] * $cos(2 * PI * k * n / N) - mi[k] * $sin(2 * PI * k * n / N);
    end
    cfg.gain_a = 8'd128; cfg.gain_b = 8'd96; cfg.cutoff_a = (LOG_N+1)'(N); cfg.cutoff_b = (LOG_N+1)'(3);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; t_start = cyc;
    @(negedge clk); start = 0;
    repeat (20) @(posedge clk);
    @(negedge clk); start = 1;          // must be ignored while busy
    @(negedge clk); start = 0;
    while (busy) @(posedge clk);
    repeat (5) @(posedge clk);
    checks += 2;
    if (t_done - t_start != 7 * N + 3 * LOGN + 9) begin failures++; $display("frame took %0d cycles", t_done - t_start); end
    if (dones != 1) begin failures++; $display("frames %0d", dones); end
    for (int k = 0; k < N; k++) begin
      near("freq A re", ar[k], $signed(fa[k][15:0]), 4.0);  near("freq A im", ai[k], $signed(fa[k][31:16]), 4.0);
      near("freq B re", br[k], $signed(fb[k][15:0]), 4.0);  near("freq B im", bi[k], $signed(fb[k][31:16]), 4.0);
      near("mix re", mr[k], $signed(mx[k][15:0]), 5.0);     near("mix im", mi[k], $signed(mx[k][31:16]), 5.0);
    end
    for (int n = 0; n < N; n++) near("out", y[n], $signed(out_m[n]), real'(2 * N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
