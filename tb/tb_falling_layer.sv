// tb_falling_layer: places sprites with hand-written masks at random signed
// positions (including partly off the board's left and top) and checks hit,
// colour and the pixel offset inside the block for every pixel of a window
// around the sprite against a model of the 4x4 grid of 16-pixel blocks.
module tb_falling_layer;
  import tetris_pkg::*;

  logic [9:0]         x, y;
  logic signed [11:0] pos_x, pos_y;
  shape_t             shape;
  logic [15:0]        mask;
  logic               hit;
  color_t             color;
  logic [3:0]         px, py;
  int checks = 0, failures = 0, hits = 0;

  falling_layer dut (.*);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 60; t++) begin
      int bx, by;
      shape = shape_t'(t % 8);
      mask  = 16'($urandom);
      pos_x = 12'($urandom_range(0, 600)) - 12'sd40;
      pos_y = 12'($urandom_range(0, 440)) - 12'sd40;
      bx = int'(pos_x); by = int'(pos_y);
      for (int yy = by - 4; yy < by + 68; yy++)
        for (int xx = bx - 4; xx < bx + 68; xx++) begin
          logic e;
          int   dx, dy;
          if (xx < 0 || yy < 0 || xx > 639 || yy > 479) continue;
          x = 10'(xx); y = 10'(yy);
          #1;
          dx = xx - bx; dy = yy - by;
          e = (dx >= 0 && dx < 64 && dy >= 0 && dy < 64 && shape != SHAPE_NONE &&
               mask[(dy / 16) * 4 + dx / 16]);
          checks++;
          if (hit !== e || (e && (color !== color_t'(int'(shape) + 1) ||
                                 px !== 4'(dx % 16) || py !== 4'(dy % 16)))) begin
            failures++;
            if (failures < 10)
              $display("FAIL t %0d (%0d,%0d) at pos (%0d,%0d): hit %0d/%0d", t, xx, yy, bx, by, hit, e);
          end
          if (hit) hits++;
        end
    end
    checks++;
    if (hits == 0) begin failures++; $display("FAIL no pixel was ever hit"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
