// dj_pkg: constants, types and elaboration-time helper functions shared by the
// FPGA DJ mixer. The frame length of 2048 samples follows the RAM sizing of the
// design (each RAM block holds about 2048 samples); sample width, twiddle format,
// gain format and the register map are this design's own choices.
package dj_pkg;

  // Frame (FFT window) length and its log2.
  parameter int FFT_N    = 2048;
  parameter int LOG_N    = $clog2(FFT_N);
  // Width of one real sample and of each half of a complex frequency bin.
  parameter int SAMPLE_W = 16;
  // Twiddle factors are signed fixed point with TW_W bits, 1.0 = 2**(TW_W-2).
  parameter int TW_W     = 16;
  // Gain is unsigned fixed point Q1.7: 128 means unity gain.
  parameter int GAIN_W   = 8;
  parameter int GAIN_ONE = 128;

  // Avalon-MM register map (32-bit word addresses, 13 address bits: 2 region bits + 11 offset bits).
  parameter int AVS_AW          = LOG_N + 2;
  parameter logic [1:0] REGION_SONG_A = 2'd0;  // 0x0000-0x07FF: samples of song A
  parameter logic [1:0] REGION_SONG_B = 2'd1;  // 0x0800-0x0FFF: samples of song B
  parameter logic [1:0] REGION_SPEC   = 2'd2;  // 0x1000-0x17FF: post-effect spectrum (read)
  parameter logic [1:0] REGION_CTRL   = 2'd3;  // 0x1800-     : control registers

  // Control register offsets inside REGION_CTRL.
  typedef enum logic [2:0] {
    REG_STATUS   = 3'd0,  // read: bit0 BUSY; write: commit the frame just written
    REG_GAIN_A   = 3'd1,
    REG_GAIN_B   = 3'd2,
    REG_CUTOFF_A = 3'd3,
    REG_CUTOFF_B = 3'd4
  } ctrl_reg_e;

  // Effect settings written by the CTRL driver.
  typedef struct packed {
    logic [GAIN_W-1:0] gain_a;
    logic [GAIN_W-1:0] gain_b;
    logic [LOG_N:0]    cutoff_a;  // bins k with k < cutoff or k > N-cutoff pass
    logic [LOG_N:0]    cutoff_b;
  } effect_cfg_t;

  // Bit-reversal of the low 'bits' bits of x.
  function automatic int bitrev(int x, int bits);
    int r;
    r = 0;
    for (int i = 0; i < bits; i++) r = (r << 1) | ((x >> i) & 1);
    return r;
  endfunction

  // Twiddle factor W_n^k = cos(2*pi*k/n) - j*sin(2*pi*k/n), rounded to fixed point.
  function automatic int tw_cos(int k, int n, int tw_bits);
    real a;
    a = 2.0 * 3.14159265358979323846 * real'(k) / real'(n);
    return int'($cos(a) * real'(1 << (tw_bits - 2)));
  endfunction

  function automatic int tw_msin(int k, int n, int tw_bits);
    real a;
    a = 2.0 * 3.14159265358979323846 * real'(k) / real'(n);
    return int'(-$sin(a) * real'(1 << (tw_bits - 2)));
  endfunction

endpackage
