// tetris_top: FPGA side of the Tetris system.
//
// The game itself runs as software on the board's processor, which reaches
// this logic through one Avalon-MM slave (word address 0..28, 32-bit write
// data; see tetris_pkg for the register map). Inside:
//
//   * tetris_vga draws the board, the falling and next tetrominoes and the
//     scores on a 640x480 VGA monitor and streams the selected music;
//   * audio_dac_out buffers the music in two 128-sample FIFOs and shifts it
//     out to the WM8731 codec, left justified, 16 bit, at 48 kHz;
//   * wm8731_config programs the codec over I2C once after reset.
//
// The codec's 12.288 MHz master clock comes from a PLL outside this module
// (audio_clk) and is passed to AUD_XCK; the codec then drives AUD_BCLK and
// AUD_DACLRCK. The I2C data pin is open drain: I2C_SDAT_drive_low pulls it
// low and I2C_SDAT_in reads it, leaving the tri-state pad to the board
// wrapper. Everything else runs on the 50 MHz clk with a synchronous,
// active-high reset.
module tetris_top
  import tetris_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  // Avalon-MM slave, driven by the processor
  input  logic              avs_chipselect,
  input  logic              avs_write,
  input  logic [ADDR_W-1:0] avs_address,
  input  logic [DATA_W-1:0] avs_writedata,
  // VGA
  output logic [7:0]        VGA_R,
  output logic [7:0]        VGA_G,
  output logic [7:0]        VGA_B,
  output logic              VGA_CLK,
  output logic              VGA_HS,
  output logic              VGA_VS,
  output logic              VGA_BLANK_n,
  output logic              VGA_SYNC_n,
  // audio codec
  input  logic              audio_clk,
  output logic              AUD_XCK,
  input  logic              AUD_BCLK,
  input  logic              AUD_DACLRCK,
  output logic              AUD_DACDAT,
  output logic              I2C_SCLK,
  output logic              I2C_SDAT_drive_low,
  input  logic              I2C_SDAT_in,
  // status
  output logic              codec_ready,
  output logic              codec_ack_error,
  output logic [15:0]       audio_underflows
);

  logic [15:0] l_data, r_data;
  logic        l_valid, l_ready, r_valid, r_ready;

  tetris_vga u_vga (
    .clk, .reset,
    .chipselect(avs_chipselect), .write(avs_write),
    .address(avs_address), .writedata(avs_writedata),
    .VGA_R, .VGA_G, .VGA_B, .VGA_CLK, .VGA_HS, .VGA_VS, .VGA_BLANK_n, .VGA_SYNC_n,
    .left_data(l_data), .left_valid(l_valid), .left_ready(l_ready),
    .right_data(r_data), .right_valid(r_valid), .right_ready(r_ready));

  audio_dac_out u_audio (
    .clk, .reset,
    .left_data(l_data), .left_valid(l_valid), .left_ready(l_ready),
    .right_data(r_data), .right_valid(r_valid), .right_ready(r_ready),
    .AUD_BCLK, .AUD_DACLRCK, .AUD_DACDAT, .underflows(audio_underflows));

  wm8731_config u_config (
    .clk, .reset, .i2c_sclk(I2C_SCLK), .sda_drive_low(I2C_SDAT_drive_low),
    .sda_in(I2C_SDAT_in), .done(codec_ready), .ack_error(codec_ack_error));

  assign AUD_XCK = audio_clk;

endmodule
