// score_layer: draws the score and the high score with digit sprites.
//
// Two lines of DIGITS decimal digits: the score at (SCORE_X, SCORE_Y) and the
// high score DIGIT_H + GAP pixels below it, most significant digit on the
// left. Each digit is a DIGIT_W x DIGIT_H cell drawn as a seven-segment glyph
// (segments 3 pixels thick); the glyph of a digit is looked up from its
// segment code, so the "number sprites" need no stored bitmap. Inputs are
// the two BCD values (least significant digit in bits [3:0]); the output
// says whether the pixel (x, y) is lit. Combinational.
//
// Showing the numbers with sprites follows the design; the glyph shape,
// size, layout and showing leading zeros are this design's choices.
module score_layer #(
  parameter int unsigned SCORE_X = 420,
  parameter int unsigned SCORE_Y = 176,
  parameter int unsigned DIGITS  = 10,
  parameter int unsigned DIGIT_W = 16,
  parameter int unsigned DIGIT_H = 24,
  parameter int unsigned GAP     = 16
) (
  input  logic [9:0]            x,
  input  logic [9:0]            y,
  input  logic [4*DIGITS-1:0]   score_bcd,
  input  logic [4*DIGITS-1:0]   hiscore_bcd,
  output logic                  hit
);

  // Segment codes, bit 0 = a (top) ... bit 6 = g (middle).
  function automatic logic [6:0] segments(logic [3:0] d);
    unique case (d)
      4'd0: return 7'h3F;
      4'd1: return 7'h06;
      4'd2: return 7'h5B;
      4'd3: return 7'h4F;
      4'd4: return 7'h66;
      4'd5: return 7'h6D;
      4'd6: return 7'h7D;
      4'd7: return 7'h07;
      4'd8: return 7'h7F;
      4'd9: return 7'h6F;
      default: return 7'h00;
    endcase
  endfunction

  // Whether pixel (gx, gy) of a DIGIT_W x DIGIT_H cell is on a lit segment.
  function automatic logic glyph(logic [6:0] s, int gx, int gy);
    int xl, xr, ym, yb;
    logic h, vl, vr, up, lo;
    xl = 2;  xr = DIGIT_W - 5;           // left / right bar start column
    ym = DIGIT_H / 2 - 2;                // middle bar start row
    yb = DIGIT_H - 4;                    // bottom bar start row
    h  = (gx >= xl) && (gx <= xr + 2);
    vl = (gx >= xl) && (gx <  xl + 3);
    vr = (gx >= xr) && (gx <  xr + 3);
    up = (gy >= 1)  && (gy <  ym + 3);
    lo = (gy >= ym) && (gy <  yb + 3);
    return (s[0] && h  && gy >= 1  && gy < 4) ||
           (s[6] && h  && gy >= ym && gy < ym + 3) ||
           (s[3] && h  && gy >= yb && gy < yb + 3) ||
           (s[5] && vl && up) || (s[1] && vr && up) ||
           (s[4] && vl && lo) || (s[2] && vr && lo);
  endfunction

  localparam int unsigned LINE_W = DIGITS * DIGIT_W;

  logic [9:0]  dx, dy;
  logic        on_score, on_hi;
  logic [4:0]  slot;               // digit position from the left
  logic [3:0]  digit;
  int          gx, gy;

  always_comb begin
    dx       = x - 10'(SCORE_X);
    dy       = y - 10'(SCORE_Y);
    on_score = (x >= 10'(SCORE_X)) && (dx < 10'(LINE_W)) &&
               (y >= 10'(SCORE_Y)) && (dy < 10'(DIGIT_H));
    on_hi    = (x >= 10'(SCORE_X)) && (dx < 10'(LINE_W)) &&
               (y >= 10'(SCORE_Y + DIGIT_H + GAP)) &&
               (dy < 10'(2 * DIGIT_H + GAP));
    slot     = 5'(dx / 10'(DIGIT_W));
    gx       = int'(dx) % int'(DIGIT_W);
    gy       = on_hi ? int'(dy) - int'(DIGIT_H + GAP) : int'(dy);
    digit    = '0;
    for (int i = 0; i < DIGITS; i++)
      if (slot == 5'(DIGITS - 1 - i))
        digit = on_hi ? hiscore_bcd[4*i +: 4] : score_bcd[4*i +: 4];
    hit = (on_score || on_hi) && glyph(segments(digit), gx, gy);
  end

endmodule
