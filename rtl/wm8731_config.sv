// wm8731_config: writes the start-up settings into the WM8731 codec over I2C.
//
// After reset it sends the NREGS register writes of the table below, each as
// one I2C write transfer: START, the codec's device address 0x34 (write),
// then the 16-bit word {register[6:0], value[8:0]} as two bytes, every byte
// followed by an acknowledge clock in which the line is released and the
// codec's answer sampled, then STOP. SCL runs at I2C_HZ; each bit takes four
// quarter periods of CLK_HZ / (4 * I2C_HZ) clocks. SDA is open drain:
// sda_drive_low pulls the line low, otherwise it floats high and sda_in reads
// it. `done` rises after the last write; `ack_error` is set if the codec did
// not acknowledge a byte.
//
// The settings follow the design's configuration: DAC output enabled, line-in
// bypass on, microphone bypass off, microphone to ADC, left-justified 16-bit
// data, 48 kHz. The codec is made the clock master (it then drives AUD_BCLK
// and AUD_DACLRCK for audio_dac_out). The register numbers and bit values
// come from the codec's register map; volumes (0 dB) are this design's choice.
module wm8731_config #(
  parameter int unsigned CLK_HZ = 50_000_000,
  parameter int unsigned I2C_HZ = 100_000
) (
  input  logic clk,
  input  logic reset,
  output logic i2c_sclk,
  output logic sda_drive_low,
  input  logic sda_in,
  output logic done,
  output logic ack_error
);

  localparam int unsigned QUARTER = (CLK_HZ / (4 * I2C_HZ) > 0) ? CLK_HZ / (4 * I2C_HZ) : 1;
  localparam int unsigned QW      = $clog2(QUARTER + 1);
  localparam int unsigned NREGS   = 11;
  localparam logic [7:0]  DEV_ADDR = 8'h34;

  // {register, value} words, sent in this order.
  function automatic logic [15:0] table_word(int unsigned i);
    unique case (i)
      0:  return {7'h0F, 9'h000};   // reset
      1:  return {7'h00, 9'h017};   // left line in: 0 dB, unmuted
      2:  return {7'h01, 9'h017};   // right line in: 0 dB, unmuted
      3:  return {7'h02, 9'h079};   // left headphone out: 0 dB
      4:  return {7'h03, 9'h079};   // right headphone out: 0 dB
      5:  return {7'h04, 9'h01C};   // analog path: DAC on, line bypass, mic to ADC
      6:  return {7'h05, 9'h000};   // digital path: DAC unmuted
      7:  return {7'h06, 9'h000};   // power: everything on
      8:  return {7'h07, 9'h041};   // format: master, 16 bit, left justified
      9:  return {7'h08, 9'h000};   // sampling: 48 kHz from 12.288 MHz
      default: return {7'h09, 9'h001};  // active
    endcase
  endfunction

  typedef enum logic [2:0] {S_START, S_BIT, S_ACK, S_STOP, S_DONE} state_e;

  state_e       state;
  logic [QW-1:0] qcnt;
  logic [1:0]   phase;
  logic         tick;
  logic [3:0]   widx;      // word being sent
  logic [23:0]  frame;     // device address and the word
  logic [4:0]   bitn;      // bits of `frame` sent so far
  logic         scl, sda;  // sda = 0 pulls the line low

  assign tick          = (qcnt == QW'(QUARTER - 1));
  assign i2c_sclk      = scl;
  assign sda_drive_low = !sda;
  assign done          = (state == S_DONE);
  assign frame         = {DEV_ADDR, table_word(int'(widx))};

  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= S_START;
      qcnt      <= '0;
      phase     <= '0;
      widx      <= '0;
      bitn      <= '0;
      scl       <= 1'b1;
      sda       <= 1'b1;
      ack_error <= 1'b0;
    end else if (state != S_DONE) begin
      qcnt <= tick ? '0 : qcnt + QW'(1);
      if (tick) begin
        phase <= phase + 2'd1;
        unique case (state)
          S_START: begin
            unique case (phase)
              2'd0: begin scl <= 1'b1; sda <= 1'b1; end
              2'd1: sda <= 1'b0;            // SDA falls while SCL is high
              2'd2: scl <= 1'b0;
              2'd3: begin state <= S_BIT; bitn <= '0; end
            endcase
          end
          S_BIT: begin
            unique case (phase)
              2'd0: sda <= frame[5'd23 - bitn];
              2'd1: scl <= 1'b1;
              2'd2: ;
              2'd3: begin
                scl  <= 1'b0;
                bitn <= bitn + 5'd1;
                if (bitn[2:0] == 3'd7) state <= S_ACK;
              end
            endcase
          end
          S_ACK: begin
            unique case (phase)
              2'd0: sda <= 1'b1;             // release the line
              2'd1: scl <= 1'b1;
              2'd2: if (sda_in) ack_error <= 1'b1;
              2'd3: begin
                scl   <= 1'b0;
                state <= (bitn == 5'd24) ? S_STOP : S_BIT;
              end
            endcase
          end
          S_STOP: begin
            unique case (phase)
              2'd0: sda <= 1'b0;
              2'd1: scl <= 1'b1;
              2'd2: sda <= 1'b1;             // SDA rises while SCL is high
              2'd3: begin
                if (widx == 4'(NREGS - 1)) state <= S_DONE;
                else begin
                  widx  <= widx + 4'd1;
                  state <= S_START;
                end
              end
            endcase
          end
          default: ;
        endcase
      end
    end
  end

endmodule
