// tetris_vga: the Tetris display peripheral on the processor's Avalon bus.
//
// Software runs the game and writes what must be shown into tetris_regs;
// this block turns that state into a 640x480 VGA picture and plays the
// selected music. For every pixel, from the raster position (hcount, vcount):
//
//   * background_layer finds the board cell and its colour code (block
//     address encode, row register, block mux);
//   * falling_layer places the falling tetromino's 4x4 sprite at
//     falling_h / falling_v (sprite address encode, sprite mux), and a second
//     copy shows the "next" tetromino beside the board; both read their
//     masks from the dual-ported tetromino_rom;
//   * two block_clut colour decoders turn the sprite path and the background
//     path into RGB, and score_layer draws score and high score as digits;
//   * a priority mux picks the pixel: inside the board the falling piece,
//     then a settled block, then the empty-board colour; outside it the
//     board frame, the next piece, the digits, else black.
//
// The pixel is registered, so the VGA outputs are one clock behind the
// counters and the sync signals are delayed by the same clock.
// falling_v is a signed offset in pixels from the board's top edge (so the
// piece can slide down smoothly); falling_h is a signed column index, as
// the sprite box may reach past the left wall. The falling piece is only
// drawn inside the board.
//
// The audio_player reads the sample memory and sends the sound selected by
// the music registers to the audio core on two Avalon-ST sources.
//
// The status outputs end_of_frame, the converters' busy flags and the
// player's `playing` are wired to local signals that nothing reads yet; they
// are kept for software status bits or debug, and the lint tool reports them
// as unused.
//
// The layer structure follows the design's pixel path. Positions, colours
// and layout on the screen are this design's choices.
module tetris_vga
  import tetris_pkg::*;
#(
  parameter int unsigned X0        = 240,   // board top-left corner
  parameter int unsigned Y0        = 80,
  parameter int unsigned BLOCK_PX  = 16,
  parameter int unsigned NEXT_X    = 420,   // "next" preview top-left corner
  parameter int unsigned NEXT_Y    = 80,
  parameter int unsigned SCORE_X   = 420,   // score digits
  parameter int unsigned SCORE_Y   = 176,
  parameter int unsigned SOUNDS    = 16,
  parameter int unsigned SOUND_LEN = 2048,
  parameter string       INIT_FILE = "",
  localparam int unsigned PW       = $clog2(BLOCK_PX)
) (
  input  logic               clk,
  input  logic               reset,
  // Avalon-MM slave
  input  logic               chipselect,
  input  logic               write,
  input  logic [ADDR_W-1:0]  address,
  input  logic [DATA_W-1:0]  writedata,
  // VGA
  output logic [7:0]         VGA_R,
  output logic [7:0]         VGA_G,
  output logic [7:0]         VGA_B,
  output logic               VGA_CLK,
  output logic               VGA_HS,
  output logic               VGA_VS,
  output logic               VGA_BLANK_n,
  output logic               VGA_SYNC_n,
  // Avalon-ST audio sources
  output logic [15:0]        left_data,
  output logic               left_valid,
  input  logic               left_ready,
  output logic [15:0]        right_data,
  output logic               right_valid,
  input  logic               right_ready
);

  localparam rgb_t EMPTY_RGB = '{r: 8'h18, g: 8'h18, b: 8'h18};
  localparam rgb_t FRAME_RGB = '{r: 8'h90, g: 8'h90, b: 8'h90};
  localparam rgb_t DIGIT_RGB = '{r: 8'hFF, g: 8'hFF, b: 8'hFF};

  game_state_t state;

  tetris_regs u_regs (
    .clk, .reset, .chipselect, .write, .address, .writedata, .state);

  // ---------------------------------------------------------------- raster
  logic [10:0] hcount;
  logic [9:0]  vcount, x, y;
  logic        vclk, hs_n, vs_n, blank_n, sync_n, eof;

  vga_counters u_counters (
    .clk, .reset, .hcount, .vcount, .vga_clk(vclk), .hsync_n(hs_n),
    .vsync_n(vs_n), .blank_n, .sync_n, .end_of_frame(eof));

  assign x = hcount[10:1];
  assign y = vcount;

  // ------------------------------------------------------------ background
  logic          in_board, in_frame;
  color_t        bg_color;
  logic [PW-1:0] bg_px, bg_py;
  rgb_t          bg_rgb;

  background_layer #(.X0(X0), .Y0(Y0), .BLOCK_PX(BLOCK_PX)) u_background (
    .x, .y, .rows(state.rows), .in_board, .in_frame, .color(bg_color),
    .px(bg_px), .py(bg_py));

  block_clut #(.BLOCK_PX(BLOCK_PX)) u_bg_clut (
    .color(bg_color), .px(bg_px), .py(bg_py), .rgb(bg_rgb));

  // --------------------------------------------------- falling and next piece
  logic [15:0]        fall_mask, next_mask;
  logic signed [11:0] fall_x, fall_y;
  logic               fall_hit, next_hit;
  color_t             fall_color, next_color, spr_color;
  logic [PW-1:0]      fall_px, fall_py, next_px, next_py;
  rgb_t               spr_rgb;

  tetromino_rom u_sprites (
    .shape_a(state.fall_sprite), .ori_a(state.fall_ori), .mask_a(fall_mask),
    .shape_b(state.next_sprite), .ori_b(2'd0),           .mask_b(next_mask));

  assign fall_x = 12'(X0) + 12'(signed'(state.fall_h) * signed'(12'(BLOCK_PX)));
  assign fall_y = 12'(Y0) + 12'(signed'(state.fall_v));

  falling_layer #(.BLOCK_PX(BLOCK_PX)) u_falling (
    .x, .y, .pos_x(fall_x), .pos_y(fall_y), .shape(state.fall_sprite),
    .mask(fall_mask), .hit(fall_hit), .color(fall_color),
    .px(fall_px), .py(fall_py));

  falling_layer #(.BLOCK_PX(BLOCK_PX)) u_next (
    .x, .y, .pos_x(12'(NEXT_X)), .pos_y(12'(NEXT_Y)), .shape(state.next_sprite),
    .mask(next_mask), .hit(next_hit), .color(next_color),
    .px(next_px), .py(next_py));

  assign spr_color = in_board ? fall_color : next_color;

  block_clut #(.BLOCK_PX(BLOCK_PX)) u_spr_clut (
    .color(spr_color),
    .px(in_board ? fall_px : next_px), .py(in_board ? fall_py : next_py),
    .rgb(spr_rgb));

  // ---------------------------------------------------------------- numbers
  logic [39:0] score_bcd, hiscore_bcd;
  logic        score_busy, hiscore_busy, digit_hit;

  bin2bcd u_score_bcd (
    .clk, .reset, .bin(state.score), .bcd(score_bcd), .busy(score_busy));
  bin2bcd u_hiscore_bcd (
    .clk, .reset, .bin(state.hiscore), .bcd(hiscore_bcd), .busy(hiscore_busy));

  score_layer #(.SCORE_X(SCORE_X), .SCORE_Y(SCORE_Y)) u_score (
    .x, .y, .score_bcd, .hiscore_bcd, .hit(digit_hit));

  // ------------------------------------------------------------- pixel mux
  rgb_t pixel;

  always_comb begin
    if (in_board)
      pixel = fall_hit ? spr_rgb : (bg_color != '0) ? bg_rgb : EMPTY_RGB;
    else if (in_frame)
      pixel = FRAME_RGB;
    else if (next_hit)
      pixel = spr_rgb;
    else if (digit_hit)
      pixel = DIGIT_RGB;
    else
      pixel = '0;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      {VGA_R, VGA_G, VGA_B} <= '0;
      VGA_CLK     <= 1'b0;
      VGA_HS      <= 1'b1;
      VGA_VS      <= 1'b1;
      VGA_BLANK_n <= 1'b0;
      VGA_SYNC_n  <= 1'b0;
    end else begin
      {VGA_R, VGA_G, VGA_B} <= blank_n ? pixel : '0;
      VGA_CLK     <= vclk;
      VGA_HS      <= hs_n;
      VGA_VS      <= vs_n;
      VGA_BLANK_n <= blank_n;
      VGA_SYNC_n  <= sync_n;
    end
  end

  // ------------------------------------------------------------------ music
  localparam int unsigned SAW = $clog2(SOUNDS * SOUND_LEN);

  logic [SAW-1:0]     rom_addr;
  logic signed [15:0] rom_data;
  logic               playing;

  audio_sample_rom #(.SOUNDS(SOUNDS), .SOUND_LEN(SOUND_LEN), .INIT_FILE(INIT_FILE))
    u_samples (.clk, .addr(rom_addr), .data(rom_data));

  audio_player #(.SOUNDS(SOUNDS), .SOUND_LEN(SOUND_LEN)) u_player (
    .clk, .reset, .music_en(state.music_en), .music_sound(state.music_sound),
    .rom_addr, .rom_data, .left_data, .left_valid, .left_ready,
    .right_data, .right_valid, .right_ready, .playing);

endmodule
