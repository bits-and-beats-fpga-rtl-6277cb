// tb_audio_out: the player reads 8-sample frames from a two-bank RAM model
// and serialises them to the behavioural codec. Checks: silence and underrun
// pulses before any frame exists; after a frame is offered, frame_taken
// pulses, the bank switches and the codec receives the frame's samples in
// order on both channels, one sample per LRCK period (64 BCLK periods); a
// second frame in the other bank follows without a gap; underrun resumes
// when no further frame is offered.
module tb_audio_out;
  localparam int N = 8, W = 16, BH = 6;
  logic clk = 0, rst_n = 0, bclk, lrck, dacdat, play_bank, frame_valid = 0, frame_taken, underrun;
  logic [2:0] raddr;
  logic [15:0] rdata;
  logic [15:0] bank [2][N];
  logic sv, scl_oe = 0, sda_oe = 0, sda_line;
  logic [15:0] sl, sr;
  logic [8:0] regs [16];
  int writes, nacks;
  int checks = 0, failures = 0, underruns = 0, takes = 0, cyc = 0, last_sv = -1, nsv = 0;
  logic [15:0] got [$];
  int sv_gap [$];

  audio_out #(.N(N), .W(W)) dut (.clk, .rst_n, .aud_bclk(bclk), .aud_daclrck(lrck), .aud_dacdat(dacdat),
    .raddr, .rdata, .play_bank, .frame_valid, .frame_taken, .underrun);
  codec_model #(.BCLK_HALF(BH)) u_codec (.clk, .rst_n, .scl_oe, .sda_oe, .sda_line,
    .aud_bclk(bclk), .aud_daclrck(lrck), .aud_dacdat(dacdat), .sample_valid(sv), .sample_l(sl),
    .sample_r(sr), .regs, .writes, .nacks);

  always #5 clk = !clk;
  always_ff @(posedge clk) rdata <= bank[play_bank][raddr];
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (underrun) underruns++;
    if (frame_taken) begin takes++; frame_valid <= 1'b0; end
    if (sv) begin
      got.push_back(sl);
      if (sl !== sr) begin failures++; $display("L/R differ"); end
      if (last_sv >= 0) sv_gap.push_back(cyc - last_sv);
      last_sv <= cyc;
    end
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int b = 0; b < 2; b++) for (int i = 0; i < N; i++) bank[b][i] = 16'($urandom) | 16'h1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // silence first
    while (got.size() < 3) @(posedge clk);
    checks += 2;
    if (underruns == 0) failures++;
    if (got[1] !== 0) failures++;
    got.delete();
    // offer frame in bank 1 (the player starts on bank 0 and switches)
    @(negedge clk); frame_valid = 1;
    while (takes == 0) @(posedge clk);
    checks++; if (play_bank !== 1'b1) failures++;
    // offer the next frame (bank 0) right away
    @(negedge clk); frame_valid = 1;
    while (takes < 2) @(posedge clk);
    while (got.size() < 2 * N + 4) @(posedge clk);
    begin
      int s;
      s = 0;
      while (s < got.size() && got[s] == 0) s++;
      for (int i = 0; i < 2 * N; i++) begin
        checks++;
        if (got[s + i] !== bank[(i < N) ? 1 : 0][i % N]) begin
          failures++; $display("sample %0d: %h expected %h", i, got[s + i], bank[(i < N) ? 1 : 0][i % N]);
        end
      end
    end
    checks++;
    if (underruns < 5) failures++;
    foreach (sv_gap[i]) begin
      checks++;
      if (sv_gap[i] != 64 * 2 * BH) begin failures++; $display("sample period %0d", sv_gap[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
