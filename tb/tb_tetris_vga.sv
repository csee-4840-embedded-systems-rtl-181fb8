// tb_tetris_vga: programs the display through its Avalon-MM slave, captures
// whole 640x480 frames from the VGA outputs (lines found from blank_n, frames
// from vsync) and compares every pixel with tetris_ref_pkg's model of the
// screen. Frame 1: a random board, a T piece turned once, an L as next piece
// and two scores. Frame 2: a vertical I piece partly left of the board's
// first column and above its top edge (clipped), a changed row and score.
// Also checks the pixel clock and that the selected sound is streamed, each
// 8 kHz sample six times on both channels, with the audio core always ready.
module tb_tetris_vga;
  import tetris_ref_pkg::*;

  logic        clk = 0, reset = 1, chipselect = 0, write = 0;
  logic [4:0]  address = 0;
  logic [31:0] writedata = 0;
  logic [7:0]  VGA_R, VGA_G, VGA_B;
  logic        VGA_CLK, VGA_HS, VGA_VS, VGA_BLANK_n, VGA_SYNC_n;
  logic [15:0] left_data, right_data;
  logic        left_valid, right_valid, left_ready = 1, right_ready = 1;
  int checks = 0, failures = 0;

  tetris_vga dut (.*);

  always #10 clk = ~clk;

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- frame capture
  logic [23:0] frame [480][640];
  int   xclk = 0, yidx = -1, odd_bad = 0, frames = 0;
  logic blank_q = 0;

  always @(posedge clk) begin
    if (!VGA_VS) yidx = -1;
    if (VGA_BLANK_n && !blank_q) begin yidx = yidx + 1; xclk = 0; end
    if (VGA_BLANK_n && yidx >= 0 && yidx < 480) begin
      if (xclk % 2 == 0) frame[yidx][xclk / 2] = {VGA_R, VGA_G, VGA_B};
      else if (frame[yidx][xclk / 2] !== {VGA_R, VGA_G, VGA_B}) odd_bad++;
      if (frames > 0 && VGA_CLK !== 1'(xclk % 2)) odd_bad++;
      xclk = xclk + 1;
    end
    if (!VGA_BLANK_n && blank_q && yidx == 479) frames = frames + 1;
    blank_q = VGA_BLANK_n;
  end

  // ------------------------------------------------------------------ audio
  logic [15:0] lq [$], rq [$];
  always @(posedge clk) begin
    if (!reset && left_valid && left_ready)   lq.push_back(left_data);
    if (!reset && right_valid && right_ready) rq.push_back(right_data);
  end

  task automatic avs_write(int a, logic [31:0] d);
    @(negedge clk);
    chipselect = 1; write = 1; address = 5'(a); writedata = d;
    @(negedge clk);
    chipselect = 0; write = 0;
  endtask

  task automatic expect_true(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load(ref_state_t st);
    for (int r = 0; r < 20; r++) avs_write(r, {2'b00, st.rows[r]});
    avs_write(20, 32'(st.fall_v));
    avs_write(21, 32'(st.fall_h));
    avs_write(22, 32'(st.fall_shape));
    avs_write(28, 32'(st.fall_ori));
    avs_write(23, 32'(st.next_shape));
    avs_write(24, 32'(st.score));
    avs_write(25, 32'(st.hiscore));
  endtask

  task automatic compare_frame(string what, ref_state_t st);
    int bad = 0, f0;
    f0 = frames;
    wait (frames == f0 + 1);
    for (int yy = 0; yy < 480; yy++)
      for (int xx = 0; xx < 640; xx++)
        if (frame[yy][xx] !== pixel(st, xx, yy)) begin
          bad++;
          if (bad < 6) $display("%s (%0d,%0d): %h expected %h", what, xx, yy,
                                frame[yy][xx], pixel(st, xx, yy));
        end
    expect_true($sformatf("%s: %0d wrong pixels", what, bad), bad == 0);
  endtask

  initial begin
    ref_state_t st;
    int bad;
    repeat (3) @(posedge clk);
    reset = 0;
    for (int r = 0; r < 20; r++) st.rows[r] = 30'($urandom) & {10{3'b111}};
    for (int r = 15; r < 20; r++) st.rows[r] = '0;
    st.fall_h = 3; st.fall_v = 40; st.fall_shape = 2; st.fall_ori = 1;
    st.next_shape = 6; st.score = 1234; st.hiscore = 64'd4000000000;
    load(st);
    avs_write(26, 2);            // sound 2
    avs_write(27, 1);            // music on
    wait (frames == 1);          // the frame being drawn while loading
    compare_frame("frame 1", st);

    st.fall_h = -1; st.fall_v = -8; st.fall_shape = 0; st.fall_ori = 1;
    st.rows[0] = '1; st.score = 98765; st.next_shape = 7;
    avs_write(21, 32'h3FF);
    avs_write(20, 32'h3F8);
    avs_write(22, 0);
    avs_write(28, 1);
    avs_write(0, 32'h3FFF_FFFF);
    avs_write(24, 98765);
    avs_write(23, 7);
    wait (frames == 2);
    compare_frame("frame 2", st);
    expect_true($sformatf("pixel clock and pixel pairs (%0d bad)", odd_bad), odd_bad == 0);

    bad = 0;
    for (int i = 0; i < 600; i++)
    begin
      logic [15:0] e;
      e = tone(2, i / 6);
      if (lq[i] !== e || rq[i] !== e) begin
        bad++;
        if (bad < 4) $display("audio %0d: %h/%h expected %h", i, lq[i], rq[i], e);
      end
    end
    expect_true($sformatf("sound 2 streamed (%0d wrong of %0d)", bad, lq.size()),
                bad == 0 && lq.size() >= 600);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
