// i2c_master: write-only I2C bus master used to program the audio codec.
// On start it sends one transaction: START, the device address byte
// (R/W bit included by the caller), two data bytes, STOP, checking the
// acknowledge bit after every byte; a byte that is not acknowledged ends
// the transaction with STOP at once. ack_err is set with done when any byte
// was not acknowledged. SCL runs at I2C_HZ derived from CLK_HZ; every bit is
// split into four quarter-periods (SDA changes only while SCL is low).
// The lines are open drain: *_oe = 1 pulls the line low, 0 releases it.
// Interface: start is taken while ready is high; done pulses for one cycle at
// the end. The codec is programmed over I2C with the FPGA as bus master; the
// frame and timing details are the standard I2C ones, the 100 kHz rate is
// this design's choice.
module i2c_master #(
  parameter int CLK_HZ = 50_000_000,
  parameter int I2C_HZ = 100_000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [23:0] tx_bytes,   // {address byte, byte 1, byte 2}
  output logic        ready,
  output logic        done,
  output logic        ack_err,
  output logic        scl_oe,
  output logic        sda_oe,
  input  logic        sda_in
);
  localparam int QDIV = (CLK_HZ / I2C_HZ / 4) < 1 ? 1 : CLK_HZ / I2C_HZ / 4;

  typedef enum logic [2:0] {I_IDLE, I_START, I_BIT, I_STOP, I_DONE} istate_e;

  istate_e                   state;
  logic [$clog2(QDIV+1)-1:0] div;
  logic                      tick;
  logic [1:0]                q;       // quarter of the current bit
  logic [3:0]                bitn;    // 0..7 data, 8 acknowledge
  logic [1:0]                byten;
  logic [23:0]               sh;
  logic                      scl_rel, sda_rel;  // 1 = line released (high)

  assign tick    = div == '0;
  assign ready   = state == I_IDLE;
  assign scl_oe  = !scl_rel;
  assign sda_oe  = !sda_rel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= I_IDLE;
      div     <= '0;
      q       <= '0;
      bitn    <= '0;
      byten   <= '0;
      sh      <= '0;
      scl_rel <= 1'b1;
      sda_rel <= 1'b1;
      done    <= 1'b0;
      ack_err <= 1'b0;
    end else begin
      done <= 1'b0;
      if (state != I_IDLE)
        div <= tick ? ($clog2(QDIV+1))'(QDIV - 1) : div - 1'b1;
      case (state)
        I_IDLE: if (start) begin
          state   <= I_START;
          sh      <= tx_bytes;
          q       <= '0;
          bitn    <= '0;
          byten   <= '0;
          ack_err <= 1'b0;
          div     <= ($clog2(QDIV+1))'(QDIV - 1);
        end
        I_START: if (tick) begin
          q <= q + 1'b1;
          case (q)
            2'd0: begin scl_rel <= 1'b1; sda_rel <= 1'b1; end
            2'd1: sda_rel <= 1'b0;           // SDA falls while SCL high
            2'd2: scl_rel <= 1'b0;
            default: state <= I_BIT;
          endcase
        end
        I_BIT: if (tick) begin
          q <= q + 1'b1;
          case (q)
            2'd0: sda_rel <= (bitn == 4'd8) ? 1'b1 : sh[23];
            2'd1: scl_rel <= 1'b1;
            2'd2: if (bitn == 4'd8 && sda_in) ack_err <= 1'b1;
            default: begin
              scl_rel <= 1'b0;
              if (bitn == 4'd8) begin
                bitn <= '0;
                // stop after the last byte, or at once when a byte was refused
                if (byten == 2'd2 || ack_err) state <= I_STOP;
                byten <= byten + 1'b1;
              end else begin
                bitn <= bitn + 1'b1;
                sh   <= {sh[22:0], 1'b0};
              end
            end
          endcase
        end
        I_STOP: if (tick) begin
          q <= q + 1'b1;
          case (q)
            2'd0: sda_rel <= 1'b0;
            2'd1: scl_rel <= 1'b1;
            2'd2: sda_rel <= 1'b1;           // SDA rises while SCL high
            default: state <= I_DONE;
          endcase
        end
        default: begin                       // I_DONE
          done  <= 1'b1;
          state <= I_IDLE;
        end
      endcase
    end
  end
endmodule
