// tb_butterfly: drives random operands and twiddles into the butterfly (with
// and without scaling) and compares with a reference computed in real
// arithmetic, allowing one LSB of rounding error, plus saturation corners.
module tb_butterfly;
  localparam int W = 16, TW = 16;
  logic signed [W-1:0] a_re, a_im, b_re, b_im;
  logic signed [TW-1:0] w_re, w_im;
  logic signed [W-1:0] x_re [2], x_im [2], y_re [2], y_im [2];
  int checks = 0, failures = 0;

  butterfly #(.W(W), .TW(TW), .SCALE(1'b1)) dut_s (.a_re, .a_im, .b_re, .b_im, .w_re, .w_im,
    .x_re(x_re[1]), .x_im(x_im[1]), .y_re(y_re[1]), .y_im(y_im[1]));
  butterfly #(.W(W), .TW(TW), .SCALE(1'b0)) dut_u (.a_re, .a_im, .b_re, .b_im, .w_re, .w_im,
    .x_re(x_re[0]), .x_im(x_im[0]), .y_re(y_re[0]), .y_im(y_im[0]));

  function automatic real clip(real v);
    if (v > 32767.0) return 32767.0;
    if (v < -32768.0) return -32768.0;
    return v;
  endfunction

  task automatic chk(string nm, real expv, int got);
    checks++;
    if ((real'(got) - clip(expv)) > 1.01 || (clip(expv) - real'(got)) > 1.01) begin
      failures++; $display("%s: got %0d expected %f", nm, got, expv);
    end
  endtask

  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      real wr, wi, pr, pi;
      int sc;
      a_re = W'($urandom); a_im = W'($urandom); b_re = W'($urandom); b_im = W'($urandom);
      if (n % 3 == 0) begin a_re = a_re >>> 2; a_im = a_im >>> 2; b_re = b_re >>> 2; b_im = b_im >>> 2; end
      w_re = TW'($urandom_range(0, 32768) - 16384); w_im = TW'($urandom_range(0, 32768) - 16384);
      #1;
      wr = real'(w_re) / 16384.0; wi = real'(w_im) / 16384.0;
      pr = real'(b_re) * wr - real'(b_im) * wi;
      pi = real'(b_re) * wi + real'(b_im) * wr;
      for (int s = 0; s < 2; s++) begin
        real d;
        d = s ? 2.0 : 1.0;
        chk("x_re", (real'(a_re) + pr) / d, int'(x_re[s]));
        chk("x_im", (real'(a_im) + pi) / d, int'(x_im[s]));
        chk("y_re", (real'(a_re) - pr) / d, int'(y_re[s]));
        chk("y_im", (real'(a_im) - pi) / d, int'(y_im[s]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
