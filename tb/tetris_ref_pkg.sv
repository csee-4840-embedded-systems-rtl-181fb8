// tetris_ref_pkg: reference model of the Tetris screen and sounds, written
// independently of the RTL for the display and system testbenches.
//
// Screen: board of 10 x 20 cells of 16 pixels at (240, 80), row 0 at the
// bottom, 4-pixel grey frame, falling piece at column fall_h and fall_v
// pixels below the board top (clipped to the board), next piece at
// (420, 80), score and high score digits at (420, 176) and (420, 216).
// Sound k of the default sample memory: triangle of period 16 + 4k samples.
package tetris_ref_pkg;

  typedef struct {
    logic [29:0] rows [20];
    int          fall_h, fall_v;    // signed
    int          fall_shape, fall_ori, next_shape;
    longint      score, hiscore;
  } ref_state_t;

  localparam logic [15:0] MASKS [7][4] = '{
    '{16'h00F0, 16'h4444, 16'h00F0, 16'h4444},   // I
    '{16'h0066, 16'h0066, 16'h0066, 16'h0066},   // O
    '{16'h0072, 16'h0262, 16'h0270, 16'h0232},   // T
    '{16'h0036, 16'h0462, 16'h0360, 16'h0231},   // S
    '{16'h0063, 16'h0264, 16'h0630, 16'h0132},   // Z
    '{16'h0071, 16'h0226, 16'h0470, 16'h0322},   // J
    '{16'h0074, 16'h0622, 16'h0170, 16'h0223}};  // L

  localparam logic [23:0] PAL [8] = '{24'h000000, 24'h2040F0, 24'hE0E0E0,
    24'hE02020, 24'hF0E020, 24'h20D040, 24'hA030E0, 24'hF09010};

  localparam int RECT [7][4] = '{
    '{2, 13, 1, 3},  '{11, 13, 1, 12}, '{11, 13, 10, 22}, '{2, 13, 20, 22},
    '{2, 4, 10, 22}, '{2, 4, 1, 12},   '{2, 13, 10, 12}};
  localparam logic [6:0] SEG [10] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66,
                                      7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F};

  function automatic logic [23:0] block_rgb(int code, int px, int py);
    logic [23:0] c;
    c = PAL[code];
    if (code == 0) return 0;
    if (px == 0 || py == 0)
      for (int k = 0; k < 3; k++) c[8*k +: 8] = 8'd128 + PAL[code][8*k +: 8] / 2;
    else if (px == 15 || py == 15)
      for (int k = 0; k < 3; k++) c[8*k +: 8] = PAL[code][8*k +: 8] / 2;
    return c;
  endfunction

  // Whether a sprite of `shape` at pixel position (sx, sy) covers (x, y).
  function automatic logic sprite_hit(int shape, int ori, int sx, int sy, int x, int y);
    int dx = x - sx, dy = y - sy;
    if (shape > 6 || dx < 0 || dy < 0 || dx >= 64 || dy >= 64) return 0;
    return MASKS[shape][ori][(dy / 16) * 4 + dx / 16];
  endfunction

  function automatic logic digit_hit(int x, int y, longint s, longint h);
    int dx = x - 420, dy = y - 176, slot, gx, dig;
    longint v;
    if (dx < 0 || dx >= 160) return 0;
    if (dy >= 0 && dy < 24) v = s;
    else if (dy >= 40 && dy < 64) begin v = h; dy -= 40; end
    else return 0;
    slot = dx / 16; gx = dx % 16;
    for (int i = 0; i < 9 - slot; i++) v = v / 10;
    dig = int'(v % 10);
    for (int k = 0; k < 7; k++)
      if (SEG[dig][k] && gx >= RECT[k][0] && gx <= RECT[k][1] &&
          dy >= RECT[k][2] && dy <= RECT[k][3]) return 1;
    return 0;
  endfunction

  function automatic logic [23:0] pixel(ref_state_t st, int x, int y);
    int fx = 240 + 16 * st.fall_h, fy = 80 + st.fall_v;
    if (x >= 240 && x < 400 && y >= 80 && y < 400) begin
      int c = (x - 240) / 16, r = 19 - (y - 80) / 16, code;
      if (sprite_hit(st.fall_shape, st.fall_ori, fx, fy, x, y))
        return block_rgb(st.fall_shape + 1, (x - fx) % 16, (y - fy) % 16);
      code = int'((st.rows[r] >> (3 * c)) & 30'h7);
      return (code != 0) ? block_rgb(code, (x - 240) % 16, (y - 80) % 16) : 24'h181818;
    end
    if (x >= 236 && x < 404 && y >= 76 && y < 404) return 24'h909090;
    if (sprite_hit(st.next_shape, 0, 420, 80, x, y))
      return block_rgb(st.next_shape + 1, (x - 420) % 16, (y - 80) % 16);
    if (digit_hit(x, y, st.score, st.hiscore)) return 24'hFFFFFF;
    return 0;
  endfunction

  function automatic logic [15:0] tone(int sound, int n);
    int p = 16 + 4 * sound, ph, v;
    ph = (n % 2048) % p;
    v = (ph < p / 2) ? ph : p - ph;
    return 16'((v * 32768) / p - 8192);
  endfunction

endpackage
