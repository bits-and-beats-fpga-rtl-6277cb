// dj_top: FPGA DJ mixer. Host software streams the samples of two songs and
// the effect settings over an Avalon-MM slave; the hardware transforms each
// frame of N samples per song with a fully parallel FFT, applies gain and a
// low-pass cutoff per song in the frequency domain, adds the two spectra,
// turns the mix back into samples with a fully parallel IFFT and plays it
// through the audio codec at 48 kHz. After reset the codec is programmed
// over I2C.
// Memories, all in RAM pairs so producer and consumer can work on different
// frames: per song an input pair (host writes one bank while the core reads
// the other) and a frequency pair (FFT results), a mixed-spectrum pair (the
// host reads the previous frame's post-effect spectrum from the idle bank)
// and an output pair (the core writes one bank while the codec plays the
// other).
// Flow control: a commit (write to the STATUS register) starts the core on
// the frame just written and swaps the host's input bank. BUSY is high while
// the core works or while a finished frame still waits for the player; the
// host must poll it and commits made while it is high are ignored.
// The overall data flow and RAM pairing follow the design; the register map,
// bank-switching rules and fixed-point formats are this design's own choices.
module dj_top
  import dj_pkg::*;
#(
  parameter int N      = dj_pkg::FFT_N,
  parameter int CLK_HZ = 50_000_000,
  parameter int I2C_HZ = 100_000
) (
  input  logic              clk,
  input  logic              rst_n,
  // Avalon-MM slave (host)
  input  logic [AVS_AW-1:0] avs_address,
  input  logic              avs_chipselect,
  input  logic              avs_read,
  input  logic              avs_write,
  input  logic [31:0]       avs_writedata,
  output logic [31:0]       avs_readdata,
  // audio codec: DAC serial port (codec is clock master) and I2C control
  input  logic              aud_bclk,
  input  logic              aud_daclrck,
  output logic              aud_dacdat,
  output logic              i2c_scl_oe,
  output logic              i2c_sda_oe,
  input  logic              i2c_sda_in,
  output logic              codec_ready
);
  localparam int W    = SAMPLE_W;
  localparam int LOGN = $clog2(N);

  effect_cfg_t     cfg;
  logic            samp_we_a, samp_we_b, commit, busy, eng_busy, frame_done;
  logic [LOGN-1:0] samp_addr, spec_raddr;
  logic [W-1:0]    samp_data;
  logic [2*W-1:0]  spec_rdata;

  logic            sw_bank, frame_bank, pending, play_bank, frame_taken, underrun;

  logic [LOGN-1:0] in_raddr, freq_waddr, freq_raddr, mix_waddr, mix_raddr, out_waddr, play_raddr;
  logic [W-1:0]    in_rdata_a, in_rdata_b, out_wdata, play_rdata;
  logic            freq_we_a, freq_we_b, mix_we, out_we;
  logic [2*W-1:0]  freq_wdata, freq_rdata_a, freq_rdata_b, mix_wdata, mix_rdata;
  logic [W-1:0]    unused_in_a, unused_in_b, unused_out;
  logic [2*W-1:0]  unused_fa, unused_fb;

  assign busy = eng_busy || pending;

  dj_avalon_regs #(.N(N)) u_regs (
    .clk, .rst_n,
    .avs_address, .avs_chipselect, .avs_read, .avs_write, .avs_writedata, .avs_readdata,
    .samp_we_a, .samp_we_b, .samp_addr, .samp_data,
    .commit, .busy, .cfg, .spec_raddr, .spec_rdata
  );

  // bank state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sw_bank    <= 1'b0;
      frame_bank <= 1'b0;
      pending    <= 1'b0;
    end else begin
      if (commit)      sw_bank    <= !sw_bank;
      if (frame_done)  frame_bank <= !frame_bank;
      if (frame_done)  pending    <= 1'b1;
      else if (frame_taken) pending <= 1'b0;
    end
  end

  // input sample RAM pairs, one per song
  pingpong_ram #(.DEPTH(N), .WIDTH(W)) u_in_a (
    .clk, .wsel(sw_bank), .we(samp_we_a), .waddr(samp_addr), .wdata(samp_data),
    .rsel(!sw_bank), .raddr0(in_raddr), .rdata0(in_rdata_a), .raddr1('0), .rdata1(unused_in_a)
  );
  pingpong_ram #(.DEPTH(N), .WIDTH(W)) u_in_b (
    .clk, .wsel(sw_bank), .we(samp_we_b), .waddr(samp_addr), .wdata(samp_data),
    .rsel(!sw_bank), .raddr0(in_raddr), .rdata0(in_rdata_b), .raddr1('0), .rdata1(unused_in_b)
  );

  // frequency-domain RAM pairs, one per song
  pingpong_ram #(.DEPTH(N), .WIDTH(2*W)) u_freq_a (
    .clk, .wsel(frame_bank), .we(freq_we_a), .waddr(freq_waddr), .wdata(freq_wdata),
    .rsel(frame_bank), .raddr0(freq_raddr), .rdata0(freq_rdata_a), .raddr1('0), .rdata1(unused_fa)
  );
  pingpong_ram #(.DEPTH(N), .WIDTH(2*W)) u_freq_b (
    .clk, .wsel(frame_bank), .we(freq_we_b), .waddr(freq_waddr), .wdata(freq_wdata),
    .rsel(frame_bank), .raddr0(freq_raddr), .rdata0(freq_rdata_b), .raddr1('0), .rdata1(unused_fb)
  );

  // mixed spectrum (IFFT input); the host reads the idle bank
  pingpong_ram #(.DEPTH(N), .WIDTH(2*W)) u_mix (
    .clk, .wsel(frame_bank), .we(mix_we), .waddr(mix_waddr), .wdata(mix_wdata),
    .rsel(frame_bank), .raddr0(mix_raddr), .rdata0(mix_rdata),
    .raddr1(spec_raddr), .rdata1(spec_rdata)
  );

  // mixed time-domain output (IFFT result); the player reads play_bank
  pingpong_ram #(.DEPTH(N), .WIDTH(W)) u_out (
    .clk, .wsel(!play_bank), .we(out_we), .waddr(out_waddr), .wdata(out_wdata),
    .rsel(play_bank), .raddr0(play_raddr), .rdata0(play_rdata), .raddr1('0), .rdata1(unused_out)
  );

  dj_engine #(.N(N), .W(W)) u_engine (
    .clk, .rst_n, .start(commit), .busy(eng_busy), .frame_done, .cfg,
    .in_raddr, .in_rdata_a, .in_rdata_b,
    .freq_we_a, .freq_we_b, .freq_waddr, .freq_wdata, .freq_raddr, .freq_rdata_a, .freq_rdata_b,
    .mix_we, .mix_waddr, .mix_wdata, .mix_raddr, .mix_rdata,
    .out_we, .out_waddr, .out_wdata
  );

  audio_out #(.N(N), .W(W)) u_audio (
    .clk, .rst_n, .aud_bclk, .aud_daclrck, .aud_dacdat,
    .raddr(play_raddr), .rdata(play_rdata), .play_bank,
    .frame_valid(pending), .frame_taken, .underrun
  );

  codec_config #(.CLK_HZ(CLK_HZ), .I2C_HZ(I2C_HZ)) u_codec_cfg (
    .clk, .rst_n, .config_done(codec_ready),
    .scl_oe(i2c_scl_oe), .sda_oe(i2c_sda_oe), .sda_in(i2c_sda_in)
  );
endmodule
