// tb_tetromino_rom: compares both read ports for all 32 addresses with
// masks worked out by hand (4x4 grid, bit 4*row + column), and checks that
// the memory holds 23 distinct shapes of four blocks each.
module tb_tetromino_rom;
  import tetris_pkg::*;

  shape_t      shape_a, shape_b;
  logic [1:0]  ori_a, ori_b;
  logic [15:0] mask_a, mask_b;
  int checks = 0, failures = 0;

  tetromino_rom dut (.*);

  // Expected masks, [shape][orientation], shapes I O T S Z J L.
  localparam logic [15:0] EXP [7][4] = '{
    '{16'h00F0, 16'h4444, 16'h00F0, 16'h4444},   // I
    '{16'h0066, 16'h0066, 16'h0066, 16'h0066},   // O
    '{16'h0072, 16'h0262, 16'h0270, 16'h0232},   // T
    '{16'h0036, 16'h0462, 16'h0360, 16'h0231},   // S
    '{16'h0063, 16'h0264, 16'h0630, 16'h0132},   // Z
    '{16'h0071, 16'h0226, 16'h0470, 16'h0322},   // J
    '{16'h0074, 16'h0622, 16'h0170, 16'h0223}    // L
  };

  initial begin
    logic [15:0] seen [$];
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] distinct [$];
    for (int s = 0; s < 8; s++)
      for (int o = 0; o < 4; o++) begin
        logic [15:0] exp;
        shape_a = shape_t'(s);  ori_a = 2'(o);
        shape_b = shape_t'(7 - s); ori_b = 2'(3 - o);
        #1;
        exp = (s == 7) ? 16'h0 : EXP[s][o];
        checks++;
        if (mask_a !== exp) begin
          failures++;
          $display("FAIL port a shape %0d ori %0d: %h expected %h", s, o, mask_a, exp);
        end
        exp = (s == 0) ? 16'h0 : EXP[7 - s][3 - o];
        checks++;
        if (mask_b !== exp) begin
          failures++;
          $display("FAIL port b shape %0d ori %0d: %h expected %h", 7 - s, 3 - o, mask_b, exp);
        end
        if (s < 7) begin
          checks++;
          if ($countones(mask_a) != 4) begin
            failures++;
            $display("FAIL shape %0d ori %0d has %0d blocks", s, o, $countones(mask_a));
          end
          if (!(mask_a inside {distinct})) distinct.push_back(mask_a);
        end
      end
    checks++;
    if (distinct.size() != 23) begin
      failures++;
      $display("FAIL %0d distinct masks, expected 23", distinct.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
