// tb_dj_top_large: one complete operation of the mixer at N = 512 with the
// default clock and I2C settings and the behavioural codec (the full
// 2048-point design elaborates to a C++ model too large to build quickly).
// One frame of two songs is written over the Avalon-MM bus and committed
// (song B at gain 0.75 with a 20-bin low-pass that removes its 40-bin
// tone); a commit while BUSY must be ignored; the frame must take exactly
// 7*N + 3*log2(N) + 9 cycles in the core; the post-effect spectrum read back
// must match a DFT computed here within 6 LSB on sampled bins; and the first
// 16 samples played to the codec must match the inverse transform of the
// expected mix within 2*N LSB (the 1/N scaling of the forward transform
// quantises every bin, and the inverse sums N such errors).
module tb_dj_top_large;
  import dj_pkg::*;
  localparam int N = 512, BH = 6, PLAY = 16;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  logic [AVS_AW-1:0] avs_address = 0;
  logic avs_chipselect = 0, avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = 0, avs_readdata;
  logic aud_bclk, aud_daclrck, aud_dacdat, i2c_scl_oe, i2c_sda_oe, sda_line, codec_ready;
  logic sv;
  logic [15:0] sl, sr;
  logic [8:0] regs [16];
  int writes, nacks;
  int checks = 0, failures = 0, cyc = 0, t_commit = 0, t_done = 0;
  int n_ignored = 0, n_taken = 0, n_underrun = 0, n_cut = 0, n_commit = 0;
  logic [15:0] got [$];
  real ctab [N], stab [N], mr [N], mi [N], maxerr;

  dj_top #(.N(N)) dut (
    .clk, .rst_n, .avs_address, .avs_chipselect, .avs_read, .avs_write, .avs_writedata, .avs_readdata,
    .aud_bclk, .aud_daclrck, .aud_dacdat, .i2c_scl_oe, .i2c_sda_oe, .i2c_sda_in(sda_line), .codec_ready
  );
  codec_model #(.BCLK_HALF(BH)) u_codec (.clk, .rst_n, .scl_oe(i2c_scl_oe),
    .sda_oe(i2c_sda_oe), .sda_line, .aud_bclk, .aud_daclrck, .aud_dacdat, .sample_valid(sv),
    .sample_l(sl), .sample_r(sr), .regs, .writes, .nacks);

  always #10 clk = !clk;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (sv) got.push_back(sl);
    if (dut.u_audio.frame_taken) n_taken++;
    if (dut.u_audio.underrun) n_underrun++;
    if (dut.commit) begin n_commit++; t_commit = cyc; end
    if (dut.u_engine.frame_done) t_done = cyc;
    if (dut.u_engine.eff_in_valid && !dut.u_engine.u_fx.pass_b) n_cut++;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic avs_wr(int addr, int data);
    @(negedge clk);
    avs_address = AVS_AW'(addr); avs_writedata = 32'(data); avs_write = 1; avs_chipselect = 1;
    @(negedge clk);
    avs_write = 0; avs_chipselect = 0;
  endtask

  task automatic avs_rd(int addr, output int data);
    @(negedge clk);
    avs_address = AVS_AW'(addr); avs_read = 1; avs_chipselect = 1;
    @(negedge clk);
    avs_read = 0; avs_chipselect = 0;
    data = avs_readdata;
  endtask

  task automatic near(string nm, real expv, int got_v, real tol);
    real e;
    e = real'(got_v) - expv;
    if (e < 0) e = -e;
    if (e > maxerr) maxerr = e;
    checks++;
    if (e > tol) begin failures++; $display("%s: got %0d expected %f", nm, got_v, expv); end
  endtask

  initial begin
    real xa [N], xb [N];
    int d, s;
    for (int i = 0; i < N; i++) begin ctab[i] = $cos(2 * PI * i / N); stab[i] = $sin(2 * PI * i / N); end
    for (int n = 0; n < N; n++) begin
      xa[n] = $floor(7000.0 * ctab[(3 * n) % N] + 2500.0 * stab[(25 * n) % N]);
      xb[n] = $floor(6000.0 * stab[(7 * n) % N] + 4000.0 * ctab[(40 * n) % N]);
    end
    for (int k = 0; k < N; k++) begin
      real ar, ai, br, bi;
      ar = 0; ai = 0; br = 0; bi = 0;
      for (int n = 0; n < N; n++) begin
        ar += xa[n] * ctab[(k * n) % N]; ai -= xa[n] * stab[(k * n) % N];
        br += xb[n] * ctab[(k * n) % N]; bi -= xb[n] * stab[(k * n) % N];
      end
      ar /= N; ai /= N; br /= N; bi /= N;
      mr[k] = ar + ((k < 20 || k > N - 20) ? 0.75 * br : 0.0);
      mi[k] = ai + ((k < 20 || k > N - 20) ? 0.75 * bi : 0.0);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    avs_wr(32'h1802, 96);
    avs_wr(32'h1804, 20);
    for (int n = 0; n < N; n++) begin
      avs_wr(32'h0000 + n, int'(xa[n]));
      avs_wr(32'h0800 + n, int'(xb[n]));
    end
    avs_wr(32'h1800, 1);
    avs_wr(32'h1800, 1);                       // ignored: busy
    if (n_commit == 1) n_ignored++;
    do avs_rd(32'h1800, d); while (dut.u_engine.busy);
    checks++;
    if (t_done - t_commit != 7 * N + 3 * $clog2(N) + 9) begin
      failures++; $display("frame took %0d cycles", t_done - t_commit);
    end
    while (got.size() < PLAY + 4) @(posedge clk);
    // the frame is now playing; its spectrum is in the idle mix bank
    maxerr = 0;
    for (int k = 0; k < N; k += 7) begin
      avs_rd(32'h1000 + k, d);
      near("spectrum re", mr[k], $signed(d[15:0]), 6.0);
      near("spectrum im", mi[k], $signed(d[31:16]), 6.0);
    end
    $display("largest spectrum error %f LSB", maxerr);
    s = 0;
    while (s < got.size() && got[s] == 0) s++;
    while (got.size() < s + PLAY) @(posedge clk);
    maxerr = 0;
    for (int n = 0; n < PLAY && s + n < got.size(); n++) begin
      real yv;
      yv = 0;
      for (int k = 0; k < N; k++) yv += mr[k] * ctab[(k * n) % N] - mi[k] * stab[(k * n) % N];
      near("played sample", yv, $signed(got[s + n]), real'(2 * N));
    end
    $display("largest played-sample error %f LSB", maxerr);
    $display("ignored commits %0d, frames taken %0d, underrun samples %0d, cut bins %0d",
             n_ignored, n_taken, n_underrun, n_cut);
    checks += 5;
    if (s + PLAY > got.size()) failures++;
    if (n_ignored < 1)  failures++;
    if (n_taken != 1)   failures++;
    if (n_underrun < 1) failures++;
    if (n_cut < 1)      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
