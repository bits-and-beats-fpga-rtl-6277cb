// codec_config: programs the audio codec after reset. It walks a ROM of the
// ten codec registers R0..R9 (line-in volume, headphone volume, analogue and
// digital paths, power, data format, sampling control, active) and writes
// each one with the I2C master as {device address 0x34, {reg[6:0], data[8]},
// data[7:0]}. A write that is not acknowledged is repeated. config_done goes
// high once all ten registers have been written.
// The register values are the configuration given for the design: 48 kHz
// sampling in normal mode (256 fs), codec as clock master (it drives BCLK and
// DACLRCK), 24-bit left-justified data, DAC routed to the output. The power
// register is read as 9'b000100000 (only the oscillator powered down).
// Sequencing and retry are this design's own choices.
module codec_config #(
  parameter int CLK_HZ = 50_000_000,
  parameter int I2C_HZ = 100_000
) (
  input  logic clk,
  input  logic rst_n,
  output logic config_done,
  output logic scl_oe,
  output logic sda_oe,
  input  logic sda_in
);
  localparam int NREG = 10;
  localparam logic [7:0] DEV_ADDR = 8'h34;

  // codec register contents, index = register number
  localparam logic [8:0] ROM [NREG] = '{
    9'h01A,        // R0 left line in
    9'h01A,        // R1 right line in
    9'h07B,        // R2 left headphone out
    9'h07B,        // R3 right headphone out
    9'd149,        // R4 analogue audio path
    9'h006,        // R5 digital audio path
    9'b000100000,  // R6 power down control
    9'd73,         // R7 digital audio interface format
    9'd0,          // R8 sampling control
    9'h001         // R9 active
  };

  typedef enum logic [1:0] {C_SEND, C_WAIT, C_DONE} cstate_e;

  cstate_e     state;
  logic [3:0]  idx;
  logic        i_start, i_ready, i_done, i_err;
  logic [23:0] tx;

  assign tx          = {DEV_ADDR, 7'(idx), ROM[idx]};
  assign i_start     = state == C_SEND && i_ready;
  assign config_done = state == C_DONE;

  i2c_master #(.CLK_HZ(CLK_HZ), .I2C_HZ(I2C_HZ)) u_i2c (
    .clk(clk), .rst_n(rst_n), .start(i_start), .tx_bytes(tx),
    .ready(i_ready), .done(i_done), .ack_err(i_err),
    .scl_oe(scl_oe), .sda_oe(sda_oe), .sda_in(sda_in)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_SEND;
      idx   <= '0;
    end else begin
      case (state)
        C_SEND: if (i_ready) state <= C_WAIT;
        C_WAIT: if (i_done) begin
          if (i_err) state <= C_SEND;                 // retry the same register
          else if (idx == 4'(NREG - 1)) state <= C_DONE;
          else begin
            idx   <= idx + 1'b1;
            state <= C_SEND;
          end
        end
        default: ;
      endcase
    end
  end
endmodule
