// dj_engine: the frame-processing core of the mixer. For every committed
// frame of N samples per song it
//   1. reads song A from its input RAM into the FFT input register bank,
//      runs the FFT and writes the N bins to song A's frequency RAM,
//   2. does the same for song B,
//   3. streams both spectra through the effects unit (gain, low-pass cutoff)
//      and writes their sum, the mixed spectrum, to the mix RAM,
//   4. reads the mixed spectrum back, runs the IFFT and writes the real part,
//      the mixed time-domain frame, to the output RAM.
// The FFT and IFFT are fully parallel (one butterfly per operation), so they
// need all N points at once: a register bank collects the points read from a
// RAM one per cycle, and the transform result is written back one bin per
// cycle. A frame takes 7*N + 3*log2(N) + 9 cycles from start to frame_done
// (busy is high for that time). All RAMs have one cycle of read latency.
// The order of operations follows the data flow of the design (FFT, effects,
// mix, IFFT); the serial load/store sequencing and sharing one input register
// bank between FFT and IFFT are this design's own choices.
module dj_engine
  import dj_pkg::*;
#(
  parameter int N = dj_pkg::FFT_N,
  parameter int W = dj_pkg::SAMPLE_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 frame_done,
  input  effect_cfg_t          cfg,
  // input sample RAMs (bank chosen outside)
  output logic [$clog2(N)-1:0] in_raddr,
  input  logic [W-1:0]         in_rdata_a,
  input  logic [W-1:0]         in_rdata_b,
  // per-song frequency RAMs, {im, re}
  output logic                 freq_we_a,
  output logic                 freq_we_b,
  output logic [$clog2(N)-1:0] freq_waddr,
  output logic [2*W-1:0]       freq_wdata,
  output logic [$clog2(N)-1:0] freq_raddr,
  input  logic [2*W-1:0]       freq_rdata_a,
  input  logic [2*W-1:0]       freq_rdata_b,
  // mixed-spectrum RAM, {im, re}
  output logic                 mix_we,
  output logic [$clog2(N)-1:0] mix_waddr,
  output logic [2*W-1:0]       mix_wdata,
  output logic [$clog2(N)-1:0] mix_raddr,
  input  logic [2*W-1:0]       mix_rdata,
  // output time-domain RAM
  output logic                 out_we,
  output logic [$clog2(N)-1:0] out_waddr,
  output logic [W-1:0]         out_wdata
);
  localparam int LOGN = $clog2(N);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_XFORM, S_STORE, S_EFFECT, S_DONE} state_e;
  typedef enum logic [1:0] {PH_A, PH_B, PH_MIX} phase_e;

  state_e          state;
  phase_e          phase;
  logic [LOGN+1:0] cnt;
  logic            sent;

  logic signed [W-1:0] vec_re [N];
  logic signed [W-1:0] vec_im [N];
  logic signed [W-1:0] f_re [N], f_im [N];
  logic signed [W-1:0] i_re [N], i_im [N];
  logic                f_go, f_vld, i_go, i_vld;

  logic                eff_in_valid, eff_out_valid;
  logic [LOGN-1:0]     eff_out_bin;
  logic signed [W-1:0] eff_re, eff_im;

  logic [LOGN-1:0]     idx;
  assign idx = cnt[LOGN-1:0];

  // transforms share the input register bank
  assign f_go = state == S_XFORM && !sent && phase != PH_MIX;
  assign i_go = state == S_XFORM && !sent && phase == PH_MIX;

  fft #(.N(N), .W(W), .INVERSE(1'b0)) u_fft (
    .clk(clk), .rst_n(rst_n), .in_valid(f_go), .in_re(vec_re), .in_im(vec_im),
    .out_valid(f_vld), .out_re(f_re), .out_im(f_im)
  );

  fft #(.N(N), .W(W), .INVERSE(1'b1)) u_ifft (
    .clk(clk), .rst_n(rst_n), .in_valid(i_go), .in_re(vec_re), .in_im(vec_im),
    .out_valid(i_vld), .out_re(i_re), .out_im(i_im)
  );

  assign eff_in_valid = state == S_EFFECT && cnt >= 1 && cnt <= (LOGN+2)'(N);

  effects #(.N(N), .W(W)) u_fx (
    .clk(clk), .rst_n(rst_n), .in_valid(eff_in_valid), .bin(LOGN'(cnt - 1)),
    .a_re(freq_rdata_a[W-1:0]), .a_im(freq_rdata_a[2*W-1:W]),
    .b_re(freq_rdata_b[W-1:0]), .b_im(freq_rdata_b[2*W-1:W]),
    .gain_a(cfg.gain_a), .gain_b(cfg.gain_b),
    .cutoff_a((LOGN+1)'(cfg.cutoff_a)), .cutoff_b((LOGN+1)'(cfg.cutoff_b)),
    .out_valid(eff_out_valid), .out_bin(eff_out_bin), .out_re(eff_re), .out_im(eff_im)
  );

  // read addresses
  assign in_raddr   = idx;
  assign mix_raddr  = idx;
  assign freq_raddr = idx;

  // writes
  assign freq_we_a  = state == S_STORE && phase == PH_A;
  assign freq_we_b  = state == S_STORE && phase == PH_B;
  assign freq_waddr = idx;
  assign freq_wdata = {f_im[idx], f_re[idx]};
  assign mix_we     = eff_out_valid;
  assign mix_waddr  = eff_out_bin;
  assign mix_wdata  = {eff_im, eff_re};
  assign out_we     = state == S_STORE && phase == PH_MIX;
  assign out_waddr  = idx;
  assign out_wdata  = i_re[idx];

  assign busy       = state != S_IDLE;
  assign frame_done = state == S_DONE;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      phase <= PH_A;
      cnt   <= '0;
      sent  <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          state <= S_LOAD;
          phase <= PH_A;
          cnt   <= '0;
        end
        S_LOAD: begin
          // one cycle of RAM latency: the word read at cnt-1 arrives now
          cnt <= cnt + 1;
          if (cnt == (LOGN+2)'(N)) begin
            state <= S_XFORM;
            sent  <= 1'b0;
          end
        end
        S_XFORM: begin
          sent <= 1'b1;
          if ((phase == PH_MIX) ? i_vld : f_vld) begin
            state <= S_STORE;
            cnt   <= '0;
          end
        end
        S_STORE: begin
          cnt <= cnt + 1;
          if (cnt == (LOGN+2)'(N - 1)) begin
            cnt <= '0;
            case (phase)
              PH_A:    begin state <= S_LOAD;   phase <= PH_B; end
              PH_B:    state <= S_EFFECT;
              default: state <= S_DONE;
            endcase
          end
        end
        S_EFFECT: begin
          // RAM latency 1 + effects latency 1
          cnt <= cnt + 1;
          if (cnt == (LOGN+2)'(N + 1)) begin
            cnt   <= '0;
            state <= S_LOAD;
            phase <= PH_MIX;
          end
        end
        default: state <= S_IDLE;  // S_DONE
      endcase
    end
  end

  // input register bank: real samples for the FFT, complex bins for the IFFT
  always_ff @(posedge clk) begin
    if (state == S_LOAD && cnt != '0) begin
      case (phase)
        PH_A: begin
          vec_re[LOGN'(cnt - 1)] <= in_rdata_a;
          vec_im[LOGN'(cnt - 1)] <= '0;
        end
        PH_B: begin
          vec_re[LOGN'(cnt - 1)] <= in_rdata_b;
          vec_im[LOGN'(cnt - 1)] <= '0;
        end
        default: begin
          vec_re[LOGN'(cnt - 1)] <= mix_rdata[W-1:0];
          vec_im[LOGN'(cnt - 1)] <= mix_rdata[2*W-1:W];
        end
      endcase
    end
  end
endmodule
