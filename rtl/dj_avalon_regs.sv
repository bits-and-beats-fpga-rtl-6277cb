// dj_avalon_regs: Avalon-MM slave through which the host software drives the
// mixer. Two host drivers share it: STREAM writes the time-domain samples of
// the two songs, CTRL writes the effect settings. Word address map:
//   0x0000 + i  write : sample i of song A (signed, writedata[15:0])
//   0x0800 + i  write : sample i of song B
//   0x1000 + k  read  : bin k of the post-effect mixed spectrum of the last
//                       processed frame, {im[15:0], re[15:0]}
//   0x1800      read  : STATUS, bit 0 = BUSY; write: commit the frame
//   0x1801/2    r/w   : gain of song A / B, Q1.7 (reset 128 = unity)
//   0x1803/4    r/w   : low-pass cutoff bin of song A / B (reset N = pass all)
// Software polls BUSY and writes a new frame only while it is clear; a commit
// while BUSY is ignored. Reads have a fixed latency of one cycle (readdata is
// valid the cycle after read). Sample writes are forwarded to the input RAMs
// in the same cycle; spec_raddr drives the spectrum RAM, whose one-cycle read
// latency matches the bus latency. The split into STREAM and CTRL and the BUSY
// flag follow the design's host interface; addresses and formats are this
// design's own choices.
module dj_avalon_regs
  import dj_pkg::*;
#(
  parameter int N = dj_pkg::FFT_N
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // Avalon-MM slave
  input  logic [AVS_AW-1:0]     avs_address,
  input  logic                  avs_chipselect,
  input  logic                  avs_read,
  input  logic                  avs_write,
  input  logic [31:0]           avs_writedata,
  output logic [31:0]           avs_readdata,
  // to the input sample RAMs
  output logic                  samp_we_a,
  output logic                  samp_we_b,
  output logic [$clog2(N)-1:0]  samp_addr,
  output logic [SAMPLE_W-1:0]   samp_data,
  // to / from the processing core
  output logic                  commit,
  input  logic                  busy,
  output effect_cfg_t           cfg,
  output logic [$clog2(N)-1:0]  spec_raddr,
  input  logic [2*SAMPLE_W-1:0] spec_rdata
);
  localparam int LOGN = $clog2(N);

  logic [1:0]    region;
  logic [2:0]    offs;
  logic          wr, rd;
  logic          rd_spec_q;
  logic [31:0]   reg_rdata_q;

  assign region = avs_address[AVS_AW-1 -: 2];
  assign offs   = avs_address[2:0];
  assign wr     = avs_chipselect && avs_write;
  assign rd     = avs_chipselect && avs_read;

  assign samp_addr  = avs_address[LOGN-1:0];
  assign samp_data  = avs_writedata[SAMPLE_W-1:0];
  assign samp_we_a  = wr && region == REGION_SONG_A;
  assign samp_we_b  = wr && region == REGION_SONG_B;
  assign spec_raddr = avs_address[LOGN-1:0];
  assign commit     = wr && region == REGION_CTRL && offs == REG_STATUS && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.gain_a   <= GAIN_W'(GAIN_ONE);
      cfg.gain_b   <= GAIN_W'(GAIN_ONE);
      cfg.cutoff_a <= (LOG_N+1)'(N);
      cfg.cutoff_b <= (LOG_N+1)'(N);
    end else if (wr && region == REGION_CTRL) begin
      case (offs)
        REG_GAIN_A:   cfg.gain_a   <= avs_writedata[GAIN_W-1:0];
        REG_GAIN_B:   cfg.gain_b   <= avs_writedata[GAIN_W-1:0];
        REG_CUTOFF_A: cfg.cutoff_a <= avs_writedata[LOG_N:0];
        REG_CUTOFF_B: cfg.cutoff_b <= avs_writedata[LOG_N:0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_spec_q   <= 1'b0;
      reg_rdata_q <= '0;
    end else begin
      rd_spec_q <= rd && region == REGION_SPEC;
      case (offs)
        REG_STATUS:   reg_rdata_q <= {31'b0, busy};
        REG_GAIN_A:   reg_rdata_q <= 32'(cfg.gain_a);
        REG_GAIN_B:   reg_rdata_q <= 32'(cfg.gain_b);
        REG_CUTOFF_A: reg_rdata_q <= 32'(cfg.cutoff_a);
        REG_CUTOFF_B: reg_rdata_q <= 32'(cfg.cutoff_b);
        default:      reg_rdata_q <= '0;
      endcase
    end
  end

  assign avs_readdata = rd_spec_q ? 32'(spec_rdata) : reg_rdata_q;
endmodule
