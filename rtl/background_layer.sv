// background_layer: the board of settled blocks ("bottom background").
//
// For the pixel (x, y) under the beam it finds the board cell and that cell's
// colour. The board is BOARD_COLS x BOARD_ROWS cells of BLOCK_PX pixels with
// its top-left corner at (X0, Y0). The column is (x - X0) / BLOCK_PX and the
// screen row (y - Y0) / BLOCK_PX; as row register 0 is the bottom row, the
// row register read is BOARD_ROWS - 1 - screen row. That 30-bit register is
// demultiplexed by the column into a 3-bit colour code, and the low bits of
// x - X0 and y - Y0 give the pixel inside the block, which the block colour
// table turns into RGB. A frame FRAME_PX wide is reported around the board.
// Purely combinational: outputs follow (x, y) in the same clock.
//
// The split into block address, row register and block mux follows the
// design; the board size comes from it too. Position, block size and frame
// are this design's choices for a 640x480 screen.
module background_layer
  import tetris_pkg::*;
#(
  parameter int unsigned X0       = 240,
  parameter int unsigned Y0       = 80,
  parameter int unsigned BLOCK_PX = 16,
  parameter int unsigned FRAME_PX = 4,
  localparam int unsigned PW      = $clog2(BLOCK_PX)
) (
  input  logic [9:0]                       x,
  input  logic [9:0]                       y,
  input  logic [BOARD_ROWS-1:0][ROW_W-1:0] rows,
  output logic                             in_board,
  output logic                             in_frame,
  output color_t                           color,
  output logic [PW-1:0]                    px,
  output logic [PW-1:0]                    py
);

  localparam int unsigned W = BOARD_COLS * BLOCK_PX;
  localparam int unsigned H = BOARD_ROWS * BLOCK_PX;

  logic [9:0] dx, dy;
  logic [9:0] col, srow;   // only the low bits index the board
  logic [4:0] row;

  assign dx = x - 10'(X0);
  assign dy = y - 10'(Y0);
  assign in_board = (x >= 10'(X0)) && (x < 10'(X0 + W)) &&
                    (y >= 10'(Y0)) && (y < 10'(Y0 + H));
  assign in_frame = !in_board &&
                    (x + 10'(FRAME_PX) >= 10'(X0)) && (x < 10'(X0 + W + FRAME_PX)) &&
                    (y + 10'(FRAME_PX) >= 10'(Y0)) && (y < 10'(Y0 + H + FRAME_PX));

  // Block address encode.
  assign col  = dx >> PW;
  assign srow = dy >> PW;
  assign row  = 5'(BOARD_ROWS - 1) - srow[4:0];
  assign px   = dx[PW-1:0];
  assign py   = dy[PW-1:0];

  // Row register and block mux.
  always_comb begin
    color = '0;
    if (in_board)
      color = rows[row][col[3:0]*COLOR_W +: COLOR_W];
  end

endmodule
