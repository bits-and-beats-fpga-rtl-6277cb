// effects: frequency-domain audio effects and mixing, one bin per cycle.
// For bin k of song A (a) and song B (b):
//   mix[k] = gain_a * LP_a(k) * a[k] + gain_b * LP_b(k) * b[k]
// Gain is unsigned Q1.7 (128 = unity, up to ~2x). The filter is an ideal
// low-pass brick wall in the frequency domain: bin k passes when
// k < cutoff or k > N - cutoff (the mirror bins, so a real input stays real),
// so cutoff = 0 mutes a song and cutoff >= N/2+1 passes everything.
// Results saturate to W bits. One cycle of latency: out_* and out_valid
// follow in_valid/bin by one clock. Gain and filter cutoff are the effects
// named for the design; their formats and the brick-wall filter are this
// design's own choices.
module effects #(
  parameter int N      = dj_pkg::FFT_N,
  parameter int W      = dj_pkg::SAMPLE_W,
  parameter int GAIN_W = dj_pkg::GAIN_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [$clog2(N)-1:0]    bin,
  input  logic signed [W-1:0]     a_re,
  input  logic signed [W-1:0]     a_im,
  input  logic signed [W-1:0]     b_re,
  input  logic signed [W-1:0]     b_im,
  input  logic [GAIN_W-1:0]       gain_a,
  input  logic [GAIN_W-1:0]       gain_b,
  input  logic [$clog2(N):0]      cutoff_a,
  input  logic [$clog2(N):0]      cutoff_b,
  output logic                    out_valid,
  output logic [$clog2(N)-1:0]    out_bin,
  output logic signed [W-1:0]     out_re,
  output logic signed [W-1:0]     out_im
);
  localparam int LOGN = $clog2(N);
  localparam int PW   = W + GAIN_W + 2;

  logic pass_a, pass_b;
  logic signed [PW-1:0] sa_re, sa_im, sb_re, sb_im, m_re, m_im;

  function automatic logic passes(input logic [LOGN-1:0] k, input logic [LOGN:0] cut);
    return ({1'b0, k} < cut) || (({1'b0, k} + cut) > (LOGN+1)'(N));
  endfunction

  function automatic logic signed [W-1:0] sat(input logic signed [PW-1:0] v);
    if (v > PW'((2 ** (W-1)) - 1))  return {1'b0, {(W-1){1'b1}}};
    else if (v < -PW'(2 ** (W-1)))  return {1'b1, {(W-1){1'b0}}};
    else                            return v[W-1:0];
  endfunction

  always_comb begin
    pass_a = passes(bin, cutoff_a);
    pass_b = passes(bin, cutoff_b);
    sa_re  = pass_a ? PW'(a_re) * PW'($signed({1'b0, gain_a})) : '0;
    sa_im  = pass_a ? PW'(a_im) * PW'($signed({1'b0, gain_a})) : '0;
    sb_re  = pass_b ? PW'(b_re) * PW'($signed({1'b0, gain_b})) : '0;
    sb_im  = pass_b ? PW'(b_im) * PW'($signed({1'b0, gain_b})) : '0;
    // sum, then remove the 7 fraction bits of the gain with rounding
    m_re   = (sa_re + sb_re + PW'(1 << (GAIN_W - 2))) >>> (GAIN_W - 1);
    m_im   = (sa_im + sb_im + PW'(1 << (GAIN_W - 2))) >>> (GAIN_W - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bin   <= '0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid;
      out_bin   <= bin;
      out_re    <= sat(m_re);
      out_im    <= sat(m_im);
    end
  end
endmodule
