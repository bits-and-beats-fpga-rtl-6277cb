// tb_fft: checks the fully parallel FFT and IFFT against a direct DFT
// computed in real arithmetic. The forward transform must equal DFT(x)/N and
// the inverse transform IDFT(X) (unscaled), within a few LSB of rounding.
// Also checks that out_valid follows in_valid after exactly log2(N) cycles,
// that a new transform can be accepted every cycle (two back-to-back frames),
// and that ifft(fft(x)) returns x (within N LSB: the 1/N scaling of the
// forward transform quantises each bin, and the inverse sums N such errors).
module tb_fft;
  localparam int N = 16, W = 16, LOGN = 4;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 4.0;
  logic clk = 0, rst_n = 0, fv = 0, iv = 0, fo, io;
  logic signed [W-1:0] fin_re [N], fin_im [N], fout_re [N], fout_im [N];
  logic signed [W-1:0] iin_re [N], iin_im [N], iout_re [N], iout_im [N];
  real xr [2][N], xi [2][N];
  int checks = 0, failures = 0, cyc = 0;

  fft #(.N(N), .W(W), .INVERSE(1'b0)) u_f (.clk, .rst_n, .in_valid(fv), .in_re(fin_re), .in_im(fin_im),
    .out_valid(fo), .out_re(fout_re), .out_im(fout_im));
  fft #(.N(N), .W(W), .INVERSE(1'b1)) u_i (.clk, .rst_n, .in_valid(iv), .in_re(iin_re), .in_im(iin_im),
    .out_valid(io), .out_re(iout_re), .out_im(iout_im));

  always #5 clk = !clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic near(string nm, real expv, int got, real tol = TOL);
    checks++;
    if ((real'(got) - expv) > tol || (expv - real'(got)) > tol) begin
      failures++; $display("%s: got %0d expected %f", nm, got, expv);
    end
  endtask

  // direct DFT (sign -1, scale 1/N) or IDFT (sign +1, scale 1)
  task automatic dft(input real ir [N], input real ii [N], input bit inv, output real orr [N], output real oi [N]);
    for (int k = 0; k < N; k++) begin
      real sr, si, a;
      sr = 0; si = 0;
      for (int n = 0; n < N; n++) begin
        a = (inv ? 2.0 : -2.0) * PI * real'(k * n) / real'(N);
        sr += ir[n] * $cos(a) - ii[n] * $sin(a);
        si += ir[n] * $sin(a) + ii[n] * $cos(a);
      end
      orr[k] = inv ? sr : sr / N;
      oi[k]  = inv ? si : si / N;
    end
  endtask

  initial begin
    real er [N], ei [N];
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // forward: two frames back to back
    for (int f = 0; f < 2; f++) begin
      @(negedge clk);
      for (int n = 0; n < N; n++) begin
        fin_re[n] = W'($signed($urandom_range(0, 40000)) - 20000);
        fin_im[n] = (f == 0) ? '0 : W'($signed($urandom_range(0, 40000)) - 20000);
        xr[f][n] = real'(fin_re[n]); xi[f][n] = real'(fin_im[n]);
      end
      fv = 1;
      if (f == 0) t0 = cyc;
    end
    @(negedge clk); fv = 0;
    for (int f = 0; f < 2; f++) begin
      while (!fo) @(posedge clk);
      checks++;
      if (cyc - t0 != LOGN + f) begin failures++; $display("latency %0d", cyc - t0); end
      dft(xr[f], xi[f], 1'b0, er, ei);
      for (int k = 0; k < N; k++) begin near("fwd re", er[k], fout_re[k]); near("fwd im", ei[k], fout_im[k]); end
      // round trip: feed this spectrum into the IFFT
      for (int k = 0; k < N; k++) begin iin_re[k] = fout_re[k]; iin_im[k] = fout_im[k]; end
      @(posedge clk);
    end
    // inverse on a random spectrum
    @(negedge clk);
    iv = 1;
    t0 = cyc;
    @(negedge clk);
    iv = 0;
    while (!io) @(posedge clk);
    checks++;
    if (cyc - t0 != LOGN) begin failures++; $display("ifft latency %0d", cyc - t0); end
    for (int n = 0; n < N; n++) begin
      // last spectrum fed was frame 1: result must be frame 1's samples
      near("roundtrip re", xr[1][n], iout_re[n], real'(N));
      near("roundtrip im", xi[1][n], iout_im[n], real'(N));
    end
    @(negedge clk);
    for (int k = 0; k < N; k++) begin
      iin_re[k] = W'($signed($urandom_range(0, 2000)) - 1000);
      iin_im[k] = W'($signed($urandom_range(0, 2000)) - 1000);
      er[k] = real'(iin_re[k]); ei[k] = real'(iin_im[k]);
    end
    iv = 1;
    @(negedge clk); iv = 0;
    while (!io) @(posedge clk);
    begin
      real orr [N], oi [N];
      dft(er, ei, 1'b1, orr, oi);
      for (int n = 0; n < N; n++) begin near("inv re", orr[n], iout_re[n]); near("inv im", oi[n], iout_im[n]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
