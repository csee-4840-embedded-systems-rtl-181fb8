// falling_layer: draws one tetromino sprite at a position on the screen.
//
// The sprite is a 4x4 grid of blocks, BLOCK_PX pixels each, whose top-left
// corner is at the signed screen position (pos_x, pos_y). For the pixel
// (x, y) the sprite address encoder works out which of the 16 grid cells it
// falls in and where in_sprite that block it lies; the sprite mux then picks
// that cell's bit from the mask of the selected sprite. A set bit is a hit,
// coloured with the shape's own colour code (shape_color). The shape
// SHAPE_NONE never hits. Purely combinational.
//
// The display uses it twice: for the falling piece, positioned by the
// falling_h / falling_v registers, and for the "next" preview at a fixed
// place. Drawing around the top-left corner follows the design; the 4x4 grid
// and the per-shape colour are this design's choices.
module falling_layer
  import tetris_pkg::*;
#(
  parameter int unsigned BLOCK_PX = 16,
  localparam int unsigned PW      = $clog2(BLOCK_PX)
) (
  input  logic [9:0]        x,
  input  logic [9:0]        y,
  input  logic signed [11:0] pos_x,
  input  logic signed [11:0] pos_y,
  input  shape_t            shape,
  input  logic [15:0]       mask,
  output logic              hit,
  output color_t            color,
  output logic [PW-1:0]     px,
  output logic [PW-1:0]     py
);

  localparam int unsigned SPAN = 4 * BLOCK_PX;

  logic signed [12:0] dx, dy;
  logic               in_sprite;
  logic [1:0]         bc, br;

  // Sprite address encode.
  assign dx     = $signed({3'b000, x}) - 13'(pos_x);
  assign dy     = $signed({3'b000, y}) - 13'(pos_y);
  assign in_sprite = (dx >= 0) && (dx < 13'(SPAN)) && (dy >= 0) && (dy < 13'(SPAN));
  assign bc     = dx[PW +: 2];
  assign br     = dy[PW +: 2];
  assign px     = dx[PW-1:0];
  assign py     = dy[PW-1:0];

  // Sprite mux.
  assign hit   = in_sprite && (shape != SHAPE_NONE) && mask[{br, bc}];
  assign color = shape_color(shape);

endmodule
