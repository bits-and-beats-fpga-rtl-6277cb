// tb_codec_config: lets the configuration sequencer program the behavioural
// codec (which refuses the first transfer, forcing one retry) and checks
// that all ten registers end up with the intended values, written exactly
// once each, before config_done rises.
module tb_codec_config;
  logic clk = 0, rst_n = 0, config_done, scl_oe, sda_oe, sda_line;
  logic bclk, lrck, sv;
  logic [15:0] sl, sr;
  logic [8:0] regs [16];
  int writes, nacks;
  int checks = 0, failures = 0;
  localparam logic [8:0] EXP [10] = '{9'h01A, 9'h01A, 9'h07B, 9'h07B, 9'h095,
                                      9'h006, 9'h020, 9'h049, 9'h000, 9'h001};

  codec_config #(.CLK_HZ(800), .I2C_HZ(100)) dut (.clk, .rst_n, .config_done, .scl_oe, .sda_oe, .sda_in(sda_line));
  codec_model #(.NACK_FIRST(1'b1)) u_codec (.clk, .rst_n, .scl_oe, .sda_oe, .sda_line,
    .aud_bclk(bclk), .aud_daclrck(lrck), .aud_dacdat(1'b0), .sample_valid(sv), .sample_l(sl),
    .sample_r(sr), .regs, .writes, .nacks);

  always #5 clk = !clk;
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (!config_done) @(posedge clk);
    repeat (20) @(posedge clk);
    for (int r = 0; r < 10; r++) begin
      checks++;
      if (regs[r] !== EXP[r]) begin failures++; $display("R%0d = %h expected %h", r, regs[r], EXP[r]); end
    end
    checks += 2;
    if (writes != 10) begin failures++; $display("writes %0d", writes); end
    if (nacks != 1) begin failures++; $display("nacks %0d", nacks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
