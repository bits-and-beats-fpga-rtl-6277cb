// fft: fully parallel, pipelined radix-2 FFT / IFFT of N complex points.
// One butterfly unit is instantiated for every butterfly of the transform,
// N/2 per stage and log2(N) stages, so a whole transform completes in log2(N)
// clock cycles and a new transform can be started every cycle. This is the
// "one butterfly per operation" architecture chosen for the DJ mixer.
//
// Structure: the inputs are taken in bit-reversed order (pure wiring), then
// stage s (s = 0..log2(N)-1) combines points 2**s apart with twiddle
// W_N^(j*N/2**(s+1)); every stage output is registered.
//   INVERSE = 0: forward DFT scaled by 1/N (each stage halves its result).
//   INVERSE = 1: inverse DFT without scaling (conjugated twiddles), so that
//                ifft(fft(x)) == x up to rounding.
// Interface: in_valid qualifies in_re/in_im; out_valid is in_valid delayed by
// LOG_N cycles and qualifies out_re/out_im (natural order). If the inputs are
// held, the outputs stay valid after the latency. Fixed-point formats,
// scaling and rounding are this design's own choices.
module fft #(
  parameter int N       = dj_pkg::FFT_N,
  parameter int W       = dj_pkg::SAMPLE_W,
  parameter int TW      = dj_pkg::TW_W,
  parameter bit INVERSE = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re  [N],
  input  logic signed [W-1:0] in_im  [N],
  output logic                out_valid,
  output logic signed [W-1:0] out_re [N],
  output logic signed [W-1:0] out_im [N]
);
  localparam int LOGN = $clog2(N);

  // Each stage keeps its own registered result as packed vectors; stage s
  // reads the result of stage s-1 (stage 0 reads the bit-reversed input).
  logic [LOGN-1:0] vld;

  for (genvar s = 0; s < LOGN; s++) begin : g_stage
    localparam int HALF = 1 << s;
    logic [N-1:0][W-1:0] a_re, a_im;  // stage input
    logic [N-1:0][W-1:0] b_re, b_im;  // butterfly outputs
    logic [N-1:0][W-1:0] q_re, q_im;  // registered stage output

    if (s == 0) begin : g_first
      for (genvar i = 0; i < N; i++) begin : g_in
        localparam int R = dj_pkg::bitrev(i, LOGN);
        assign a_re[i] = in_re[R];
        assign a_im[i] = in_im[R];
      end
    end else begin : g_next
      assign a_re = g_stage[s-1].q_re;
      assign a_im = g_stage[s-1].q_im;
    end

    for (genvar b = 0; b < N / 2; b++) begin : g_bf
      localparam int GRP = b / HALF;
      localparam int POS = b % HALF;
      localparam int I0  = GRP * 2 * HALF + POS;
      localparam int I1  = I0 + HALF;
      localparam int K   = POS * (N / (2 * HALF));
      localparam logic signed [TW-1:0] WRE = TW'(dj_pkg::tw_cos(K, N, TW));
      localparam logic signed [TW-1:0] WIM = INVERSE ? TW'(-dj_pkg::tw_msin(K, N, TW))
                                                     : TW'(dj_pkg::tw_msin(K, N, TW));
      butterfly #(.W(W), .TW(TW), .SCALE(!INVERSE)) u_bf (
        .a_re(a_re[I0]), .a_im(a_im[I0]),
        .b_re(a_re[I1]), .b_im(a_im[I1]),
        .w_re(WRE),      .w_im(WIM),
        .x_re(b_re[I0]), .x_im(b_im[I0]),
        .y_re(b_re[I1]), .y_im(b_im[I1])
      );
    end

    always_ff @(posedge clk) begin
      q_re <= b_re;
      q_im <= b_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LOGN-2:0], in_valid};
  end

  assign out_valid = vld[LOGN-1];
  for (genvar i = 0; i < N; i++) begin : g_out
    assign out_re[i] = g_stage[LOGN-1].q_re[i];
    assign out_im[i] = g_stage[LOGN-1].q_im[i];
  end
endmodule
