// codec_model: behavioural model of the audio codec as the mixer sees it,
// for testbenches only. It is an I2C slave at address 0x34 that acknowledges
// every byte (or refuses the first address byte when NACK_FIRST is set) and
// stores each register write {reg[6:0], data[8:0]} in regs[], and it is the
// clock master of the DAC serial port: it generates BCLK (half period
// BCLK_HALF clk cycles) and DACLRCK (32 BCLK periods per channel, high = left),
// captures 24-bit left-justified words on rising BCLK and reports the top 16
// bits of each left/right pair with sample_valid.
module codec_model #(
  parameter int BCLK_HALF  = 6,
  parameter bit NACK_FIRST = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        scl_oe,
  input  logic        sda_oe,
  output logic        sda_line,
  output logic        aud_bclk,
  output logic        aud_daclrck,
  input  logic        aud_dacdat,
  output logic        sample_valid,
  output logic [15:0] sample_l,
  output logic [15:0] sample_r,
  output logic [8:0]  regs [16],
  output int          writes,
  output int          nacks
);
  // ---------------- I2C slave ----------------
  logic scl, sda, scl_q, sda_q, ack_drv, first_done;
  logic [7:0] sh;
  int   nbits, nbytes;
  logic [7:0] bytes [3];

  assign scl      = !scl_oe;
  assign sda      = !(sda_oe || ack_drv);
  assign sda_line = sda;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_q <= 1'b1; sda_q <= 1'b1; ack_drv <= 1'b0; nbits <= 0; nbytes <= 0;
      writes <= 0; nacks <= 0; first_done <= 1'b0; sh <= '0;
      for (int i = 0; i < 16; i++) regs[i] <= '0;
    end else begin
      scl_q <= scl; sda_q <= sda;
      if (scl && scl_q && sda_q && !sda) begin          // START
        nbits <= 0; nbytes <= 0;
      end else if (scl && scl_q && !sda_q && sda) begin // STOP
        if (nbytes == 3 && bytes[0] == 8'h34) begin
          regs[bytes[1][4:1]] <= {bytes[1][0], bytes[2]};
          writes <= writes + 1;
        end
      end else if (scl && !scl_q) begin                 // rising SCL
        if (nbits < 8) sh <= {sh[6:0], sda};
        nbits <= nbits + 1;
      end else if (!scl && scl_q) begin                 // falling SCL
        if (nbits == 8) begin
          bytes[nbytes % 3] <= sh;
          if (NACK_FIRST && !first_done && nbytes == 0) begin
            first_done <= 1'b1;
            nacks      <= nacks + 1;
            ack_drv    <= 1'b0;
          end else begin
            ack_drv <= 1'b1;
          end
          nbytes <= nbytes + 1;
        end else if (nbits == 9) begin
          ack_drv <= 1'b0;
          nbits   <= 0;
        end
      end
    end
  end

  // ---------------- DAC serial port (master) ----------------
  int   div, bitc;
  logic [23:0] wl, wr;
  logic [15:0] left_hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= 0; bitc <= 0; aud_bclk <= 1'b0; aud_daclrck <= 1'b0;
      wl <= '0; wr <= '0; sample_valid <= 1'b0; sample_l <= '0; sample_r <= '0;
      left_hold <= '0;
    end else begin
      sample_valid <= 1'b0;
      if (div == BCLK_HALF - 1) begin
        div      <= 0;
        aud_bclk <= !aud_bclk;
        if (aud_bclk) begin                 // falling edge: advance LRCK
          if (bitc == 31) begin
            bitc        <= 0;
            aud_daclrck <= !aud_daclrck;
            if (aud_daclrck) left_hold <= wl[23:8];
            else begin
              sample_valid <= 1'b1;
              sample_l     <= left_hold;
              sample_r     <= wr[23:8];
            end
          end else bitc <= bitc + 1;
        end else begin                      // rising edge: capture
          if (bitc < 24) begin
            if (aud_daclrck) wl <= {wl[22:0], aud_dacdat};
            else             wr <= {wr[22:0], aud_dacdat};
          end
        end
      end else div <= div + 1;
    end
  end
endmodule
