// tetris_regs: Avalon-MM slave register file of the Tetris display.
//
// The processor keeps the game and only pushes, word by word, what must be
// shown or played. A write (chipselect && write) to one of the addresses of
// tetris_pkg updates that register on the next rising clock edge; writes to
// other addresses are ignored. The slave is write-only and never stalls, as
// the design describes only writes from software.
//
//   addresses 0..19  background row n (row 0 = bottom), writedata[29:0] holds
//                    ten 3-bit colour codes, column 0 in bits [2:0]
//   20 / 21          falling tetromino vertical (pixels) / horizontal (column)
//   22 / 28          falling sprite (shape) / orientation
//   23               next tetromino sprite (address is this design's choice)
//   24 / 25          score / high score, 32-bit binary
//   26 / 27          music sound (4 bits) / music enable (1 bit)
//
// Reset clears the board and scores and selects "no shape" (7) for the
// falling and next sprites so that nothing is drawn until software writes.
// The whole state is visible at the output as one packed struct.
module tetris_regs
  import tetris_pkg::*;
(
  input  logic                clk,
  input  logic                reset,
  input  logic                chipselect,
  input  logic                write,
  input  logic [ADDR_W-1:0]   address,
  input  logic [DATA_W-1:0]   writedata,
  output game_state_t         state
);

  always_ff @(posedge clk) begin
    if (reset) begin
      state             <= '0;
      state.fall_sprite <= SHAPE_NONE;
      state.next_sprite <= SHAPE_NONE;
    end else if (chipselect && write) begin
      if (address <= ADDR_ROW_LAST)
        state.rows[address] <= writedata[ROW_W-1:0];
      else
        unique case (address)
          ADDR_FALL_V:      state.fall_v      <= writedata[9:0];
          ADDR_FALL_H:      state.fall_h      <= writedata[9:0];
          ADDR_FALL_SPRITE: state.fall_sprite <= shape_t'(writedata[2:0]);
          ADDR_NEXT_SPRITE: state.next_sprite <= shape_t'(writedata[2:0]);
          ADDR_SCORE:       state.score       <= writedata;
          ADDR_HISCORE:     state.hiscore     <= writedata;
          ADDR_MUSIC_SOUND: state.music_sound <= writedata[3:0];
          ADDR_MUSIC_EN:    state.music_en    <= writedata[0];
          ADDR_FALL_ORI:    state.fall_ori    <= writedata[1:0];
          default: ;
        endcase
    end
  end

endmodule
