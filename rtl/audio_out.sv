// audio_out: plays the mixed frames through the codec's DAC serial port.
// The codec is clock master: it drives the bit clock (aud_bclk) and the DAC
// left/right clock (aud_daclrck, high = left channel) at 48 kHz, and reads
// aud_dacdat as 24-bit left-justified words, MSB first, sampled on the rising
// edge of BCLK. Both clocks are synchronised into clk (which must be several
// times faster than BCLK); on every LRCK edge the current sample, padded to
// 24 bits, is loaded into the shift register, and every falling BCLK edge
// shifts the next bit out. The mono mix is sent on both channels.
// Frames: the module reads the samples of bank play_bank of the output RAM in
// order, one per LRCK period (fetched at the falling LRCK edge). At the end of
// a frame it switches to the other bank if frame_valid says a new frame is
// waiting (frame_taken pulses); otherwise it outputs silence and pulses
// underrun on every sample until a frame arrives. Serial format and rate
// follow the codec configuration of the design; the mono duplication and the
// underrun policy are this design's own choices.
module audio_out #(
  parameter int N = dj_pkg::FFT_N,
  parameter int W = dj_pkg::SAMPLE_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // codec DAC serial port (codec is master)
  input  logic                 aud_bclk,
  input  logic                 aud_daclrck,
  output logic                 aud_dacdat,
  // output RAM read port
  output logic [$clog2(N)-1:0] raddr,
  input  logic [W-1:0]         rdata,
  output logic                 play_bank,
  // frame hand-over
  input  logic                 frame_valid,
  output logic                 frame_taken,
  output logic                 underrun
);
  localparam int LOGN = $clog2(N);
  localparam int SW   = 24;

  logic [2:0]      bclk_s, lrck_s;
  logic            bclk_fall, lr_rise, lr_fall;
  logic [SW-1:0]   sh;
  logic [W-1:0]    cur;
  logic [LOGN-1:0] idx;
  logic            playing, rd_req, rd_vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bclk_s <= '0;
      lrck_s <= '0;
    end else begin
      bclk_s <= {bclk_s[1:0], aud_bclk};
      lrck_s <= {lrck_s[1:0], aud_daclrck};
    end
  end

  assign bclk_fall  = bclk_s[2] && !bclk_s[1];
  assign lr_rise    = !lrck_s[2] && lrck_s[1];
  assign lr_fall    = lrck_s[2] && !lrck_s[1];
  assign aud_dacdat = sh[SW-1];
  assign raddr      = idx;

  // serialiser
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   sh <= '0;
    else if (lr_rise || lr_fall)  sh <= {cur, (SW-W)'(0)};
    else if (bclk_fall)           sh <= {sh[SW-2:0], 1'b0};
  end

  // sample fetch and frame hand-over
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur         <= '0;
      idx         <= '0;
      playing     <= 1'b0;
      play_bank   <= 1'b0;
      rd_req      <= 1'b0;
      rd_vld      <= 1'b0;
      frame_taken <= 1'b0;
      underrun    <= 1'b0;
    end else begin
      frame_taken <= 1'b0;
      underrun    <= 1'b0;
      rd_req      <= 1'b0;
      rd_vld      <= rd_req;
      if (lr_fall) begin
        if (!playing && frame_valid) begin
          play_bank   <= !play_bank;
          frame_taken <= 1'b1;
          playing     <= 1'b1;
          idx         <= '0;
          rd_req      <= 1'b1;
        end else if (playing) begin
          rd_req <= 1'b1;
        end else begin
          cur      <= '0;
          underrun <= 1'b1;
        end
      end
      if (rd_vld) begin
        cur <= rdata;
        idx <= idx + 1'b1;
        if (idx == LOGN'(N - 1)) playing <= 1'b0;
      end
    end
  end
endmodule
