// butterfly: radix-2 decimation-in-time butterfly, the 2-point DFT that the
// FFT is built from.
//   x = a + w*b,  y = a - w*b
// w is a signed fixed-point twiddle factor with 1.0 = 2**(TW-2). The product
// w*b is rounded back to W bits. When SCALE is set, both outputs are halved
// (with rounding) so that a chain of log2(N) stages cannot overflow; the
// forward FFT uses this, giving an output of DFT/N. Outputs saturate to W bits.
// Purely combinational. The butterfly itself is the textbook operation; the
// fixed-point formats, rounding and saturation are this design's choices.
module butterfly #(
  parameter int W     = 16,
  parameter int TW    = 16,
  parameter bit SCALE = 1'b1
) (
  input  logic signed [W-1:0]  a_re,
  input  logic signed [W-1:0]  a_im,
  input  logic signed [W-1:0]  b_re,
  input  logic signed [W-1:0]  b_im,
  input  logic signed [TW-1:0] w_re,
  input  logic signed [TW-1:0] w_im,
  output logic signed [W-1:0]  x_re,
  output logic signed [W-1:0]  x_im,
  output logic signed [W-1:0]  y_re,
  output logic signed [W-1:0]  y_im
);
  localparam int PW = W + TW + 1;
  localparam int FRAC = TW - 2;

  logic signed [PW-1:0] p_re_full, p_im_full;
  logic signed [W+1:0]  p_re, p_im;
  logic signed [W+2:0]  s_re, s_im, d_re, d_im;

  function automatic logic signed [W-1:0] sat(input logic signed [W+2:0] v);
    if (v > (W+3)'((2 ** (W-1)) - 1))      return {1'b0, {(W-1){1'b1}}};
    else if (v < -(W+3)'(2 ** (W-1)))      return {1'b1, {(W-1){1'b0}}};
    else                                   return v[W-1:0];
  endfunction

  always_comb begin
    // complex multiply w*b, rounded to W+2 bits
    p_re_full = PW'(b_re) * PW'(w_re) - PW'(b_im) * PW'(w_im) + PW'(1 << (FRAC - 1));
    p_im_full = PW'(b_re) * PW'(w_im) + PW'(b_im) * PW'(w_re) + PW'(1 << (FRAC - 1));
    p_re = (W+2)'(p_re_full >>> FRAC);
    p_im = (W+2)'(p_im_full >>> FRAC);
    s_re = (W+3)'(a_re) + (W+3)'(p_re);
    s_im = (W+3)'(a_im) + (W+3)'(p_im);
    d_re = (W+3)'(a_re) - (W+3)'(p_re);
    d_im = (W+3)'(a_im) - (W+3)'(p_im);
    if (SCALE) begin
      s_re = (s_re + 1) >>> 1;
      s_im = (s_im + 1) >>> 1;
      d_re = (d_re + 1) >>> 1;
      d_im = (d_im + 1) >>> 1;
    end
    x_re = sat(s_re);
    x_im = sat(s_im);
    y_re = sat(d_re);
    y_im = sat(d_im);
  end
endmodule
