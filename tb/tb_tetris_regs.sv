// tb_tetris_regs: self-checking test of the Avalon-MM register file.
// Checks the reset values, then writes random words to random addresses
// (including unused ones and cycles without chipselect) and compares every
// field of the register state with a reference model after each write.
module tb_tetris_regs;
  import tetris_pkg::*;

  logic        clk = 0, reset = 1, chipselect = 0, write = 0;
  logic [4:0]  address = 0;
  logic [31:0] writedata = 0;
  game_state_t state, model;
  int checks = 0, failures = 0;

  tetris_regs dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what);
    checks++;
    if (state !== model) begin
      failures++;
      $display("FAIL %s: state differs from model", what);
    end
  endtask

  initial begin
    model = '0;
    model.fall_sprite = SHAPE_NONE;
    model.next_sprite = SHAPE_NONE;
    repeat (3) @(posedge clk);
    reset <= 0;
    @(posedge clk); #1;
    check("reset");
    for (int i = 0; i < 3000; i++) begin
      logic [4:0]  a;
      logic [31:0] d;
      logic        cs, wr;
      a  = 5'($urandom_range(0, 31));
      d  = $urandom;
      cs = ($urandom_range(0, 9) != 0);
      wr = ($urandom_range(0, 9) != 0);
      chipselect = cs; write = wr; address = a; writedata = d;
      @(posedge clk); #1;
      if (cs && wr) begin
        if (a <= 5'd19) model.rows[a] = d[29:0];
        else case (a)
          5'd20: model.fall_v      = d[9:0];
          5'd21: model.fall_h      = d[9:0];
          5'd22: model.fall_sprite = shape_t'(d[2:0]);
          5'd23: model.next_sprite = shape_t'(d[2:0]);
          5'd24: model.score       = d;
          5'd25: model.hiscore     = d;
          5'd26: model.music_sound = d[3:0];
          5'd27: model.music_en    = d[0];
          5'd28: model.fall_ori    = d[1:0];
          default: ;
        endcase
      end
      check($sformatf("write %0d to address %0d", i, a));
    end
    // Spot checks of the map the display relies on.
    chipselect = 1; write = 1; address = 5'd0; writedata = 32'h3FFF_FFFF;
    @(posedge clk); #1;
    chipselect = 0; write = 0;
    checks++;
    if (state.rows[0] !== 30'h3FFF_FFFF) begin failures++; $display("FAIL row 0"); end
    chipselect = 1; write = 1; address = 5'd28; writedata = 32'h2;
    @(posedge clk); #1;
    chipselect = 0; write = 0;
    checks++;
    if (state.fall_ori !== 2'd2) begin failures++; $display("FAIL orientation"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
