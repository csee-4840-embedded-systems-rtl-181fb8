// tb_score_layer: draws random scores and high scores and checks every pixel
// of the number area (and a margin around it) against a model of the digit
// glyphs: seven rectangles per 16x24 cell, two lines of ten digits at
// (420, 176) and 40 pixels lower.
module tb_score_layer;
  logic [9:0]  x, y;
  logic [39:0] score_bcd, hiscore_bcd;
  logic        hit;
  int checks = 0, failures = 0;

  score_layer dut (.*);

  // Segments a..g as {x0, x1, y0, y1}, inclusive.
  localparam int RECT [7][4] = '{
    '{2, 13, 1, 3},  '{11, 13, 1, 12}, '{11, 13, 10, 22}, '{2, 13, 20, 22},
    '{2, 4, 10, 22}, '{2, 4, 1, 12},   '{2, 13, 10, 12}};
  localparam logic [6:0] SEG [10] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66,
                                      7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F};

  function automatic logic [39:0] to_bcd(longint unsigned n);
    logic [39:0] r;
    for (int d = 0; d < 10; d++) begin r[4*d +: 4] = 4'(n % 10); n /= 10; end
    return r;
  endfunction

  function automatic logic model(int xx, int yy, logic [39:0] s, logic [39:0] h);
    int dx, dy, line, slot, gx, gy, dig;
    dx = xx - 420; dy = yy - 176;
    if (dx < 0 || dx >= 160) return 0;
    if (dy >= 0 && dy < 24) line = 0;
    else if (dy >= 40 && dy < 64) begin line = 1; dy -= 40; end
    else return 0;
    slot = dx / 16; gx = dx % 16; gy = dy;
    dig  = line ? int'(h[4*(9-slot) +: 4]) : int'(s[4*(9-slot) +: 4]);
    for (int k = 0; k < 7; k++)
      if (SEG[dig][k] && gx >= RECT[k][0] && gx <= RECT[k][1] &&
          gy >= RECT[k][2] && gy <= RECT[k][3]) return 1;
    return 0;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 12; t++) begin
      score_bcd   = to_bcd((t == 0) ? 64'd1234567890 : longint'($urandom));
      hiscore_bcd = to_bcd((t == 0) ? 64'd4294967295 : longint'($urandom));
      for (int yy = 170; yy < 246; yy++)
        for (int xx = 410; xx < 590; xx++) begin
          x = 10'(xx); y = 10'(yy);
          #1;
          checks++;
          if (hit !== model(xx, yy, score_bcd, hiscore_bcd)) begin
            failures++;
            if (failures < 10) $display("FAIL t %0d (%0d,%0d) hit %0d", t, xx, yy, hit);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
