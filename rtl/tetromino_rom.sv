// tetromino_rom: the sprite memory of the tetrominoes, with two read ports.
//
// Each sprite is a tetromino in one orientation, stored as a 4x4 block mask
// (bit 4*r + c, row r from the top). The memory is addressed by
// {shape, orientation}: 32 words, of which the 28 with a real shape are
// filled and the 4 of "no shape" are empty. Its contents are computed from
// the shape table and rotation rule in tetris_pkg, so the square repeats one
// mask and the bar two; the memory holds 23 distinct masks.
//
// As the design describes, the memory is dual ported: the falling piece and
// the "next" preview read it at the same time through ports a and b. Reads
// are asynchronous (the address is decoded in the same clock), which suits
// a 32 x 16 bit table held in logic.
module tetromino_rom
  import tetris_pkg::*;
(
  input  shape_t      shape_a,
  input  logic [1:0]  ori_a,
  output logic [15:0] mask_a,
  input  shape_t      shape_b,
  input  logic [1:0]  ori_b,
  output logic [15:0] mask_b
);

  logic [15:0] mem [32];

  always_comb
    for (int i = 0; i < 32; i++)
      mem[i] = tetromino_mask(shape_t'(i[4:2]), i[1:0]);

  assign mask_a = mem[{shape_a, ori_a}];
  assign mask_b = mem[{shape_b, ori_b}];

endmodule
