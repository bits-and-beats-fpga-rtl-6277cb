// tb_i2c_master: sends I2C write transactions to the behavioural codec
// (which refuses the very first address byte). Checks that the refused
// transaction reports ack_err, that acknowledged ones do not and reach the
// slave with the right register and data, and that SCL runs at the
// configured rate and that a refused address byte ends the transfer (27
// bit clocks and one STOP edge per write, 9 and one for the refused one) at the
// configured rate (4 * (CLK_HZ / I2C_HZ / 4) clk cycles per bit).
module tb_i2c_master;
  localparam int CLK_HZ = 1200, I2C_HZ = 100, BIT = 12;
  logic clk = 0, rst_n = 0, start = 0, ready, done, ack_err, scl_oe, sda_oe, sda_line;
  logic [23:0] tx_bytes = 0;
  logic bclk, lrck, sv;
  logic [15:0] sl, sr;
  logic [8:0] regs [16];
  int writes, nacks;
  int checks = 0, failures = 0, cyc = 0, last_rise = -1, period_bad = 0, rises = 0;

  i2c_master #(.CLK_HZ(CLK_HZ), .I2C_HZ(I2C_HZ)) dut (.clk, .rst_n, .start, .tx_bytes, .ready, .done,
    .ack_err, .scl_oe, .sda_oe, .sda_in(sda_line));
  codec_model #(.NACK_FIRST(1'b1)) u_codec (.clk, .rst_n, .scl_oe, .sda_oe, .sda_line,
    .aud_bclk(bclk), .aud_daclrck(lrck), .aud_dacdat(1'b0), .sample_valid(sv), .sample_l(sl),
    .sample_r(sr), .regs, .writes, .nacks);

  always #5 clk = !clk;
  logic scl_q = 1;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    scl_q <= !scl_oe;
    if (rst_n && !scl_oe && !scl_q) begin
      // only bit clocks inside one transaction are 1 bit period apart
      if (last_rise >= 0 && cyc - last_rise < BIT) period_bad++;
      last_rise <= cyc;
      rises++;
    end
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic send(logic [23:0] b, output bit err);
    while (!ready) @(posedge clk);
    @(negedge clk); tx_bytes = b; start = 1;
    @(negedge clk); start = 0;
    while (!done) @(posedge clk);
    err = ack_err;
  endtask

  initial begin
    bit e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    send({8'h34, 7'd5, 9'h155}, e);
    checks++; if (e !== 1'b1) begin failures++; $display("refused write not reported"); end
    checks++; if (writes != 0) failures++;
    for (int n = 0; n < 6; n++) begin
      logic [3:0] r; logic [8:0] d;
      r = 4'($urandom_range(0, 9)); d = 9'($urandom);
      send({8'h34, 3'b0, r, d}, e);
      checks += 3;
      if (e !== 1'b0) begin failures++; $display("unexpected nack"); end
      if (regs[r] !== d) begin failures++; $display("reg %0d got %h expected %h", r, regs[r], d); end
      if (writes != n + 1) failures++;
    end
    checks += 2;
    if (period_bad != 0) begin failures++; $display("SCL period too short %0d times", period_bad); end
    if (rises != 10 + 6 * 28) begin failures++; $display("SCL rising edges %0d", rises); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
