// tetris_pkg: types and constants shared by the Tetris display and audio blocks.
//
// The game runs in software; the FPGA only holds the state that must be drawn
// or played, written by the processor as 32-bit words over a word-addressed
// Avalon-MM slave with a 5-bit address. The register map below is the one the
// design specifies (rows 0..19 at addresses 0..19, falling position at 20/21,
// falling sprite at 22, scores at 24/25, music at 26/27, orientation at 28).
// Address 23 for the "next" tetromino is this design's own choice: the map
// names the register but gives it no address, and 23 is the one left free.
//
// Board cells hold a 3-bit colour code, 0 meaning empty and 1..7 a colour, so
// a row of 10 cells is a 30-bit word with column 0 (the leftmost) in bits
// [2:0]. Row 0 is the bottom row of the board.
//
// The tetromino masks are 4x4 grids, bit (4*r + c) for row r (top = 0) and
// column c (left = 0). Orientation 0 is the spawn orientation; each step of
// the 2-bit orientation is a quarter turn clockwise inside a 3x3 box (J, L, S,
// T, Z) or the 4x4 box (I). The square is the same in all orientations and
// the bar has only two distinct states, so the memory holds 23 distinct masks.
package tetris_pkg;

  localparam int unsigned BOARD_COLS = 10;
  localparam int unsigned BOARD_ROWS = 20;
  localparam int unsigned COLOR_W    = 3;
  localparam int unsigned ROW_W      = BOARD_COLS * COLOR_W;   // 30
  localparam int unsigned DATA_W     = 32;
  localparam int unsigned ADDR_W     = 5;

  // Register addresses (word addresses on the Avalon-MM slave).
  localparam logic [ADDR_W-1:0] ADDR_ROW_LAST     = 5'd19;
  localparam logic [ADDR_W-1:0] ADDR_FALL_V       = 5'd20;
  localparam logic [ADDR_W-1:0] ADDR_FALL_H       = 5'd21;
  localparam logic [ADDR_W-1:0] ADDR_FALL_SPRITE  = 5'd22;
  localparam logic [ADDR_W-1:0] ADDR_NEXT_SPRITE  = 5'd23;
  localparam logic [ADDR_W-1:0] ADDR_SCORE        = 5'd24;
  localparam logic [ADDR_W-1:0] ADDR_HISCORE      = 5'd25;
  localparam logic [ADDR_W-1:0] ADDR_MUSIC_SOUND  = 5'd26;
  localparam logic [ADDR_W-1:0] ADDR_MUSIC_EN     = 5'd27;
  localparam logic [ADDR_W-1:0] ADDR_FALL_ORI     = 5'd28;

  typedef enum logic [2:0] {
    SHAPE_I    = 3'd0,
    SHAPE_O    = 3'd1,
    SHAPE_T    = 3'd2,
    SHAPE_S    = 3'd3,
    SHAPE_Z    = 3'd4,
    SHAPE_J    = 3'd5,
    SHAPE_L    = 3'd6,
    SHAPE_NONE = 3'd7     // nothing is drawn
  } shape_t;

  typedef logic [COLOR_W-1:0] color_t;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  // Everything the processor writes, as held by the register file.
  typedef struct packed {
    logic [BOARD_ROWS-1:0][ROW_W-1:0] rows;       // rows[0] is the bottom row
    logic [9:0]                       fall_v;     // pixels below the board top (signed)
    logic [9:0]                       fall_h;     // column of the sprite's left edge (signed)
    shape_t                           fall_sprite;
    logic [1:0]                       fall_ori;
    shape_t                           next_sprite;
    logic [31:0]                      score;
    logic [31:0]                      hiscore;
    logic [3:0]                       music_sound;
    logic                             music_en;
  } game_state_t;

  // A falling piece takes the colour code of its shape.
  function automatic color_t shape_color(shape_t s);
    return color_t'(s) + color_t'(1);
  endfunction

  // Mask of a tetromino in orientation 0.
  function automatic logic [15:0] base_mask(shape_t s);
    logic [15:0] m;
    m = '0;
    unique case (s)
      SHAPE_I: begin m[4]  = 1; m[5]  = 1; m[6]  = 1; m[7]  = 1; end
      SHAPE_O: begin m[1]  = 1; m[2]  = 1; m[5]  = 1; m[6]  = 1; end
      SHAPE_T: begin m[1]  = 1; m[4]  = 1; m[5]  = 1; m[6]  = 1; end
      SHAPE_S: begin m[1]  = 1; m[2]  = 1; m[4]  = 1; m[5]  = 1; end
      SHAPE_Z: begin m[0]  = 1; m[1]  = 1; m[5]  = 1; m[6]  = 1; end
      SHAPE_J: begin m[0]  = 1; m[4]  = 1; m[5]  = 1; m[6]  = 1; end
      SHAPE_L: begin m[2]  = 1; m[4]  = 1; m[5]  = 1; m[6]  = 1; end
      default: m = '0;
    endcase
    return m;
  endfunction

  // One quarter turn clockwise inside an n x n box at the top-left corner:
  // the cell (r, c) of the result is the cell (n-1-c, r) of the source.
  function automatic logic [15:0] rotate_cw(logic [15:0] m, int n);
    logic [15:0] o;
    o = '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (r < n && c < n)
          o[4*r + c] = m[4*(n-1-c) + r];
    return o;
  endfunction

  // Mask of any shape in any orientation.
  function automatic logic [15:0] tetromino_mask(shape_t s, logic [1:0] ori);
    logic [15:0] m;
    int          turns;
    m     = base_mask(s);
    turns = int'(ori);
    if (s == SHAPE_O) turns = 0;               // a square looks the same
    if (s == SHAPE_I) turns = int'(ori[0]);    // the bar has two states
    for (int t = 0; t < 3; t++)
      if (t < turns) m = rotate_cw(m, (s == SHAPE_I) ? 4 : 3);
    return m;
  endfunction

endpackage
