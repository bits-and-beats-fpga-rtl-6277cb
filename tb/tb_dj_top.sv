// tb_dj_top: end-to-end test of the mixer at N = 16 with the behavioural
// codec. The host side is modelled by Avalon-MM read/write tasks. Sequence:
//   - the codec is configured over I2C (its first transfer is refused, so
//     the retry path runs) and the ten register values are checked;
//   - gain and cutoff registers are set (song B at 0.75 with a 3-bin
//     low-pass, so the filter removes part of song B);
//   - frame 1 is written and committed; a second commit while BUSY must be
//     ignored; frame 2 is written into the other input bank meanwhile and
//     committed once BUSY clears;
//   - the samples the codec receives must be silence (underrun) until frame
//     1 is ready, then frame 1 and frame 2 in order, each equal to the
//     inverse transform of the gained, filtered sum of the songs' spectra
//     (computed in real arithmetic here) within 2*N LSB;
//   - the post-effect spectrum read back over the bus must match frame 2's.
// Every mechanism (I2C retry, ignored commit, input and output bank swap,
// underrun, filter cut) is counted and must occur at least once.
module tb_dj_top;
  import dj_pkg::*;
  localparam int N = 16, BH = 6;
  localparam real PI = 3.14159265358979323846;
  localparam logic [8:0] EXP [10] = '{9'h01A, 9'h01A, 9'h07B, 9'h07B, 9'h095,
                                      9'h006, 9'h020, 9'h049, 9'h000, 9'h001};
  logic clk = 0, rst_n = 0;
  logic [AVS_AW-1:0] avs_address = 0;
  logic avs_chipselect = 0, avs_read = 0, avs_write = 0;
  logic [31:0] avs_writedata = 0, avs_readdata;
  logic aud_bclk, aud_daclrck, aud_dacdat, i2c_scl_oe, i2c_sda_oe, sda_line, codec_ready;
  logic sv;
  logic [15:0] sl, sr;
  logic [8:0] regs [16];
  int writes, nacks;
  int checks = 0, failures = 0;
  int n_ignored = 0, n_taken = 0, n_underrun = 0, n_cut = 0, n_swaps = 0;
  logic [15:0] got [$];
  real y [2][N], mr [2][N], mi [2][N];

  dj_top #(.N(N), .CLK_HZ(800), .I2C_HZ(100)) dut (
    .clk, .rst_n, .avs_address, .avs_chipselect, .avs_read, .avs_write, .avs_writedata, .avs_readdata,
    .aud_bclk, .aud_daclrck, .aud_dacdat, .i2c_scl_oe, .i2c_sda_oe, .i2c_sda_in(sda_line), .codec_ready
  );
  codec_model #(.BCLK_HALF(BH), .NACK_FIRST(1'b1)) u_codec (.clk, .rst_n, .scl_oe(i2c_scl_oe),
    .sda_oe(i2c_sda_oe), .sda_line, .aud_bclk, .aud_daclrck, .aud_dacdat, .sample_valid(sv),
    .sample_l(sl), .sample_r(sr), .regs, .writes, .nacks);

  always #5 clk = !clk;
  always @(posedge clk) if (rst_n) begin
    if (sv) got.push_back(sl);
    if (dut.u_audio.frame_taken) n_taken++;
    if (dut.u_audio.underrun) n_underrun++;
    if (dut.commit) n_swaps++;
    if (dut.u_engine.eff_in_valid && !dut.u_engine.u_fx.pass_b) n_cut++;
  end
  initial begin repeat (400000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

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
    checks++;
    if ((real'(got_v) - expv) > tol || (expv - real'(got_v)) > tol) begin
      failures++; $display("%s: got %0d expected %f", nm, got_v, expv);
    end
  endtask

  // write one frame of both songs and compute its expected output
  task automatic send_frame(int f);
    real xa [N], xb [N], ar, ai, br, bi;
    for (int n = 0; n < N; n++) begin
      xa[n] = $floor(7000.0 * $cos(2 * PI * (1 + f) * n / N) + 2500.0 * $sin(2 * PI * 5 * n / N));
      xb[n] = $floor(6000.0 * $sin(2 * PI * 2 * n / N) + 4000.0 * $cos(2 * PI * (6 + f) * n / N));
      avs_wr(32'h0000 + n, int'(xa[n]));
      avs_wr(32'h0800 + n, int'(xb[n]));
    end
    for (int k = 0; k < N; k++) begin
      ar = 0; ai = 0; br = 0; bi = 0;
      for (int n = 0; n < N; n++) begin
        ar += xa[n] * $cos(2 * PI * k * n / N) / N; ai -= xa[n] * $sin(2 * PI * k * n / N) / N;
        br += xb[n] * $cos(2 * PI * k * n / N) / N; bi -= xb[n] * $sin(2 * PI * k * n / N) / N;
      end
      mr[f][k] = ar + ((k < 3 || k > N - 3) ? 0.75 * br : 0.0);
      mi[f][k] = ai + ((k < 3 || k > N - 3) ? 0.75 * bi : 0.0);
    end
    for (int n = 0; n < N; n++) begin
      y[f][n] = 0;
      for (int k = 0; k < N; k++)
        y[f][n] += mr[f][k] * $cos(2 * PI * k * n / N) - mi[f][k] * $sin(2 * PI * k * n / N);
    end
  endtask

  initial begin
    int d, s;
    repeat (3) @(posedge clk);
    rst_n = 1;
    avs_wr(32'h1802, 96);
    avs_wr(32'h1804, 3);
    send_frame(0);
    avs_wr(32'h1800, 1);                         // commit frame 1
    avs_rd(32'h1800, d);
    checks++; if (d != 1) begin failures++; $display("BUSY not set"); end
    avs_wr(32'h1800, 1);                         // ignored: still busy
    if (n_swaps == 1) n_ignored++;
    send_frame(1);                               // other input bank
    do avs_rd(32'h1800, d); while (d[0]);
    avs_wr(32'h1800, 1);                         // commit frame 2
    do avs_rd(32'h1800, d); while (d[0]);
    // wait for both frames to be played
    while (got.size() < 2 * N + 8) @(posedge clk);
    s = 0;
    while (s < got.size() && got[s] == 0) s++;
    for (int f = 0; f < 2; f++)
      for (int n = 0; n < N; n++) near("played sample", y[f][n], $signed(got[s + f * N + n]), real'(2 * N));
    // post-effect spectrum of the last processed frame (frame 2)
    for (int k = 0; k < N; k++) begin
      avs_rd(32'h1000 + k, d);
      near("spectrum re", mr[1][k], $signed(d[15:0]), 5.0);
      near("spectrum im", mi[1][k], $signed(d[31:16]), 5.0);
    end
    // codec configuration
    while (!codec_ready) @(posedge clk);
    repeat (20) @(posedge clk);
    for (int r = 0; r < 10; r++) begin
      checks++;
      if (regs[r] !== EXP[r]) begin failures++; $display("R%0d = %h", r, regs[r]); end
    end
    $display("i2c retries %0d, ignored commits %0d, accepted commits %0d, frames taken %0d, underrun samples %0d, cut bins %0d",
             nacks, n_ignored, n_swaps, n_taken, n_underrun, n_cut);
    checks += 6;
    if (nacks < 1)      failures++;
    if (n_ignored < 1)  failures++;
    if (n_swaps != 2)   failures++;
    if (n_taken != 2)   failures++;
    if (n_underrun < 1) failures++;
    if (n_cut < 1)      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
