// block_clut: colour look-up table of the board blocks (the "colour decode").
//
// A block is drawn as a BLOCK_PX x BLOCK_PX square sprite in its colour:
// a one-pixel light edge on the top and left, a one-pixel dark edge on the
// bottom and right, and the plain colour inside. Input is the 3-bit colour
// code of the block and the pixel position (px, py) inside it; output is the
// 24-bit RGB value. Code 0 (empty) gives black. Purely combinational.
//
// The design names blue, white and red as block colours and allows 7 codes;
// the codes 1..3 are those three, and 4..7 (yellow, green, purple, orange)
// and the edge shading are this design's own choices.
module block_clut
  import tetris_pkg::*;
#(
  parameter int unsigned BLOCK_PX = 16,
  localparam int unsigned PW = $clog2(BLOCK_PX)
) (
  input  color_t        color,
  input  logic [PW-1:0] px,
  input  logic [PW-1:0] py,
  output rgb_t          rgb
);

  rgb_t base;

  always_comb begin
    unique case (color)
      3'd1:    base = '{r: 8'h20, g: 8'h40, b: 8'hF0};  // blue
      3'd2:    base = '{r: 8'hE0, g: 8'hE0, b: 8'hE0};  // white
      3'd3:    base = '{r: 8'hE0, g: 8'h20, b: 8'h20};  // red
      3'd4:    base = '{r: 8'hF0, g: 8'hE0, b: 8'h20};  // yellow
      3'd5:    base = '{r: 8'h20, g: 8'hD0, b: 8'h40};  // green
      3'd6:    base = '{r: 8'hA0, g: 8'h30, b: 8'hE0};  // purple
      3'd7:    base = '{r: 8'hF0, g: 8'h90, b: 8'h10};  // orange
      default: base = '0;                               // empty
    endcase

    if (color == '0)
      rgb = '0;
    else if (px == '0 || py == '0)            // light edge: halfway to white
      rgb = '{r: 8'h80 + {1'b0, base.r[7:1]},
              g: 8'h80 + {1'b0, base.g[7:1]},
              b: 8'h80 + {1'b0, base.b[7:1]}};
    else if (px == PW'(BLOCK_PX - 1) || py == PW'(BLOCK_PX - 1))  // dark edge
      rgb = '{r: {1'b0, base.r[7:1]},
              g: {1'b0, base.g[7:1]},
              b: {1'b0, base.b[7:1]}};
    else
      rgb = base;
  end

endmodule
