// tb_block_clut: checks every colour code at every pixel of a 16x16 block
// against the palette and the edge shading rule (light top/left edge is
// halfway to white, dark bottom/right edge is half the colour, empty black).
module tb_block_clut;
  import tetris_pkg::*;

  color_t     color;
  logic [3:0] px, py;
  rgb_t       rgb;
  int checks = 0, failures = 0;

  block_clut dut (.*);

  localparam logic [23:0] PAL [8] = '{24'h000000, 24'h2040F0, 24'hE0E0E0,
    24'hE02020, 24'hF0E020, 24'h20D040, 24'hA030E0, 24'hF09010};

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          logic [23:0] exp;
          color = color_t'(c); px = 4'(i); py = 4'(j);
          #1;
          exp = PAL[c];
          if (c == 0) exp = 0;
          else if (i == 0 || j == 0)
            for (int k = 0; k < 3; k++) exp[8*k +: 8] = 8'd128 + PAL[c][8*k +: 8] / 2;
          else if (i == 15 || j == 15)
            for (int k = 0; k < 3; k++) exp[8*k +: 8] = PAL[c][8*k +: 8] / 2;
          checks++;
          if (rgb !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL code %0d px %0d py %0d: %h expected %h", c, i, j, rgb, exp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
