// tb_background_layer: fills the 20 row registers with random colour codes
// and sweeps every pixel of the 640x480 screen, checking in_board, in_frame,
// the colour code and the pixel position inside the block against a model
// of the board at (240, 80) with 16-pixel blocks and row 0 at the bottom.
// A second pass writes one distinct code per cell position to catch row or
// column order mistakes.
module tb_background_layer;
  import tetris_pkg::*;

  logic [9:0] x, y;
  logic [BOARD_ROWS-1:0][ROW_W-1:0] rows;
  logic       in_board, in_frame;
  color_t     color;
  logic [3:0] px, py;
  int checks = 0, failures = 0;

  background_layer dut (.*);

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sweep();
    for (int yy = 0; yy < 480; yy++)
      for (int xx = 0; xx < 640; xx++) begin
        logic eb, ef;
        int   c, r;
        color_t ec;
        x = 10'(xx); y = 10'(yy);
        #1;
        eb = (xx >= 240 && xx < 400 && yy >= 80 && yy < 400);
        ef = !eb && (xx >= 236 && xx < 404 && yy >= 76 && yy < 404);
        c  = (xx - 240) / 16;
        r  = 19 - (yy - 80) / 16;
        ec = eb ? color_t'((rows[r] >> (3 * c)) & 30'h7) : color_t'(0);
        checks++;
        if (in_board !== eb || in_frame !== ef || color !== ec ||
            (eb && (px !== 4'((xx - 240) % 16) || py !== 4'((yy - 80) % 16)))) begin
          failures++;
          if (failures < 10)
            $display("FAIL (%0d,%0d): board %0d/%0d frame %0d/%0d colour %0d/%0d",
                     xx, yy, in_board, eb, in_frame, ef, color, ec);
        end
      end
  endtask

  initial begin
    for (int r = 0; r < 20; r++) rows[r] = 30'($urandom);
    sweep();
    // Cell (row r, column c) gets code (r + c) % 8: every neighbour differs.
    for (int r = 0; r < 20; r++)
      for (int c = 0; c < 10; c++)
        rows[r][3*c +: 3] = 3'((r + c) % 8);
    sweep();
    // Bottom-left cell is row 0 column 0 at screen (240, 384).
    rows = '0;
    rows[0][2:0] = 3'd5;
    x = 10'd241; y = 10'd390; #1;
    checks++;
    if (color !== 3'd5) begin failures++; $display("FAIL bottom-left cell"); end
    x = 10'd241; y = 10'd81; #1;
    checks++;
    if (color !== 3'd0) begin failures++; $display("FAIL top-left cell"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
