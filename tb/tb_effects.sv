// tb_effects: random bins, gains and cutoffs through the effects unit; each
// output is compared, one cycle later, with a reference computed with
// integer arithmetic from the gain/low-pass/mix definition, including the
// mirror-bin rule of the filter and saturation.
module tb_effects;
  localparam int N = 64, W = 16, LOGN = 6;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [LOGN-1:0] bin = 0, out_bin;
  logic signed [W-1:0] a_re = 0, a_im = 0, b_re = 0, b_im = 0, out_re, out_im;
  logic [7:0] gain_a = 0, gain_b = 0;
  logic [LOGN:0] cutoff_a = 0, cutoff_b = 0;
  int checks = 0, failures = 0, passed = 0, blocked = 0, saturated = 0;

  effects #(.N(N), .W(W)) dut (.*);
  always #5 clk = !clk;
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int satr(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      longint ea, eb, er, ei;
      bit pa, pb;
      @(negedge clk);
      in_valid = 1;
      bin = LOGN'($urandom);
      a_re = W'($urandom); a_im = W'($urandom); b_re = W'($urandom); b_im = W'($urandom);
      gain_a = 8'($urandom); gain_b = 8'($urandom);
      cutoff_a = (LOGN+1)'($urandom_range(0, N)); cutoff_b = (LOGN+1)'($urandom_range(0, N));
      pa = (int'(bin) < int'(cutoff_a)) || (int'(bin) > N - int'(cutoff_a));
      pb = (int'(bin) < int'(cutoff_b)) || (int'(bin) > N - int'(cutoff_b));
      er = (pa ? longint'(a_re) * gain_a : 0) + (pb ? longint'(b_re) * gain_b : 0);
      ei = (pa ? longint'(a_im) * gain_a : 0) + (pb ? longint'(b_im) * gain_b : 0);
      er = (er + 64) >>> 7; ei = (ei + 64) >>> 7;
      passed += pa + pb; blocked += 2 - pa - pb;
      if (er != satr(er)) saturated++;
      @(posedge clk); #1;
      checks += 4;
      if (!out_valid) failures++;
      if (out_bin != bin) failures++;
      if (int'(out_re) != satr(er)) begin failures++; $display("re %0d vs %0d", out_re, satr(er)); end
      if (int'(out_im) != satr(ei)) begin failures++; $display("im %0d vs %0d", out_im, satr(ei)); end
    end
    checks++;
    if (passed == 0 || blocked == 0 || saturated == 0) failures++;
    $display("passed %0d blocked %0d saturated %0d", passed, blocked, saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
