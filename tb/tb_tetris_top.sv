// tb_tetris_top: end-to-end test of the whole FPGA side at its default sizes.
//
// Models around the top: the processor (Avalon-MM writes), a VGA monitor
// (frame capture compared pixel by pixel with tetris_ref_pkg), the WM8731
// codec as clock master (3.07 MHz bit clock, 48 kHz frame clock, from their
// own timing, decoding AUD_DACDAT as left-justified 16-bit words) and the
// codec's I2C port (acknowledging and recording the configuration).
//
// Sequence: configuration over I2C; silence while music is off (FIFO
// underflow); a board with a falling piece and scores; sound 4 played, each
// 8 kHz sample on 6 consecutive 48 kHz frames, both channels; the audio
// FIFOs filling up and holding the player back; a switch to sound 9; the
// piece moved down and turned, a row changed and the score raised; music
// switched off, after which the line goes silent again. Each of these
// mechanisms is counted, and one that never happened is a failure.
module tb_tetris_top;
  import tetris_ref_pkg::*;

  logic        clk = 0, reset = 1;
  logic        avs_chipselect = 0, avs_write = 0;
  logic [4:0]  avs_address = 0;
  logic [31:0] avs_writedata = 0;
  logic [7:0]  VGA_R, VGA_G, VGA_B;
  logic        VGA_CLK, VGA_HS, VGA_VS, VGA_BLANK_n, VGA_SYNC_n;
  logic        audio_clk = 0, AUD_XCK, AUD_BCLK = 0, AUD_DACLRCK = 0, AUD_DACDAT;
  logic        I2C_SCLK, I2C_SDAT_drive_low, I2C_SDAT_in;
  logic        codec_ready, codec_ack_error;
  logic [15:0] audio_underflows;
  int checks = 0, failures = 0;

  tetris_top dut (.*);

  always #10 clk = ~clk;                 // 50 MHz
  always #40.69 audio_clk = ~audio_clk;  // 12.288 MHz

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------------------ codec audio
  // Bit clock = 12.288 MHz / 4, frame = 64 bit clocks; left while LRCK high.
  logic [15:0] dec_l [$], dec_r [$];
  initial begin
    logic [15:0] sh;
    forever begin
      AUD_DACLRCK = ~AUD_DACLRCK;
      for (int b = 0; b < 32; b++) begin
        #162.76 AUD_BCLK = 1;
        if (b < 16) sh[15 - b] = AUD_DACDAT;
        if (b == 15) begin
          if (AUD_DACLRCK) dec_l.push_back(sh);
          else             dec_r.push_back(sh);
        end
        #162.76 AUD_BCLK = 0;
      end
    end
  end

  // --------------------------------------------------------------- I2C port
  logic        slave_low = 0, scl_q = 1, sda_q = 1, in_xfer = 0;
  int          nbit = 0;
  logic [7:0]  cur;
  logic [7:0]  bytes [$];
  logic [23:0] xfers [$];

  assign I2C_SDAT_in = !(I2C_SDAT_drive_low || slave_low);

  always @(posedge clk) begin
    scl_q <= I2C_SCLK;
    sda_q <= I2C_SDAT_in;
    if (scl_q && I2C_SCLK && sda_q && !I2C_SDAT_in) begin
      in_xfer <= 1; nbit = 0; bytes.delete();
    end else if (scl_q && I2C_SCLK && !sda_q && I2C_SDAT_in) begin
      in_xfer <= 0;
      xfers.push_back(bytes.size() == 3 ? {bytes[0], bytes[1], bytes[2]} : 24'hFFFFFF);
    end else if (in_xfer && !scl_q && I2C_SCLK) begin
      if (nbit < 8) cur[7 - nbit] = I2C_SDAT_in;
      nbit = nbit + 1;
      if (nbit == 8) bytes.push_back(cur);
    end else if (in_xfer && scl_q && !I2C_SCLK) begin
      if (nbit == 8) slave_low <= 1;
      if (nbit == 9) begin slave_low <= 0; nbit = 0; end
    end
  end

  // ------------------------------------------------------------ VGA monitor
  logic [23:0] frame [480][640];
  int   xclk = 0, yidx = -1, frames = 0;
  logic blank_q = 0;

  always @(posedge clk) begin
    if (!VGA_VS) yidx = -1;
    if (VGA_BLANK_n && !blank_q) begin yidx = yidx + 1; xclk = 0; end
    if (VGA_BLANK_n && yidx >= 0 && yidx < 480) begin
      if (xclk % 2 == 0) frame[yidx][xclk / 2] = {VGA_R, VGA_G, VGA_B};
      xclk = xclk + 1;
    end
    if (!VGA_BLANK_n && blank_q && yidx == 479) frames = frames + 1;
    blank_q = VGA_BLANK_n;
  end

  task automatic wait_frame();
    int f0;
    f0 = frames;
    wait (frames == f0 + 1);
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

  // -------------------------------------------------------------- processor
  task automatic avs_wr(int a, logic [31:0] d);
    @(negedge clk);
    avs_chipselect = 1; avs_write = 1; avs_address = 5'(a); avs_writedata = d;
    @(negedge clk);
    avs_chipselect = 0; avs_write = 0;
  endtask

  // ---------------------------------------------------- mechanism counters
  int n_backpressure = 0, n_config = 0, n_underflow = 0, n_switch = 0,
      n_music_off = 0, n_move = 0, n_row = 0, n_score = 0;

  always @(posedge clk)
    if (!reset && dut.l_valid && !dut.l_ready) n_backpressure++;

  // Checks that dec[from ...] holds sound s from its first sample, each
  // sample on 6 frames, for n frames.
  task automatic expect_sound(string what, int from, int n, int s);
    int bad = 0;
    for (int i = 0; i < n; i++) begin
      logic [15:0] e;
      e = tone(s, i / 6);
      if (dec_l[from + i] !== e || dec_r[from + i] !== e) begin
        bad++;
        if (bad < 4) $display("%s word %0d: %h/%h expected %h", what, i,
                              dec_l[from + i], dec_r[from + i], e);
      end
    end
    expect_true($sformatf("%s: %0d wrong words", what, bad), bad == 0);
  endtask

  function automatic int find_word(int from, logic [15:0] w);
    for (int i = from; i < dec_l.size(); i++) if (dec_l[i] === w) return i;
    return -1;
  endfunction

  initial begin
    ref_state_t st;
    int j, k, u0;
    localparam logic [15:0] EXP [11] = '{16'h1E00, 16'h0017, 16'h0217, 16'h0479,
      16'h0679, 16'h081C, 16'h0A00, 16'h0C00, 16'h0E41, 16'h1000, 16'h1201};

    repeat (5) @(posedge clk);
    reset = 0;

    // Codec configuration.
    wait (codec_ready);
    repeat (50) @(posedge clk);
    k = 0;
    for (int i = 0; i < 11 && i < xfers.size(); i++) if (xfers[i] === {8'h34, EXP[i]}) k++;
    expect_true($sformatf("codec configured (%0d of 11 transfers right)", k),
                k == 11 && xfers.size() == 11 && !codec_ack_error);
    if (k == 11) n_config++;

    // Silence while music is off.
    u0 = audio_underflows;
    expect_true("silence before music", dec_l.size() > 20 && dec_l[dec_l.size() - 1] === 0);
    if (u0 > 0) n_underflow++;

    // Board, falling T piece, next L piece, scores; then sound 4.
    for (int r = 0; r < 20; r++) st.rows[r] = (r < 12) ? 30'($urandom) : '0;
    st.fall_h = 4; st.fall_v = 20; st.fall_shape = 2; st.fall_ori = 0;
    st.next_shape = 6; st.score = 120; st.hiscore = 5400;
    for (int r = 0; r < 20; r++) avs_wr(r, {2'b00, st.rows[r]});
    avs_wr(21, 4); avs_wr(20, 20); avs_wr(22, 2); avs_wr(28, 0);
    avs_wr(23, 6); avs_wr(24, 120); avs_wr(25, 5400);
    j = dec_l.size();
    avs_wr(26, 4); avs_wr(27, 1);
    wait_frame();                // the frame drawn while loading
    compare_frame("frame 1", st);
    compare_frame("frame 1 again", st);

    // Sound 4 from its first sample.
    wait (dec_l.size() > j + 400 && dec_r.size() > j + 400);
    k = find_word(j, tone(4, 1));
    if (k >= 0) k = k - 6;
    expect_true("sound 4 starts", k >= j);
    if (k >= 0) expect_sound("sound 4", k, 300, 4);
    expect_true($sformatf("FIFO back-pressure seen (%0d clocks)", n_backpressure),
                n_backpressure > 0);

    // Switch to sound 9 while playing.
    j = dec_l.size();
    avs_wr(26, 9);
    n_switch++;
    // The 128 buffered words of sound 4 play out first.
    wait (dec_l.size() > j + 128 + 300 && dec_r.size() > j + 128 + 300);
    // Every tone starts at -8192, so look for sound 9's second sample.
    k = find_word(j, tone(9, 1));
    if (k >= 0) k = k - 6;
    expect_true("sound 9 starts", k >= j && k <= j + 140);
    if (k >= 0) expect_sound("sound 9", k, 240, 9);

    // Piece moved down one block and turned, a row filled, score raised.
    st.fall_v = 36; st.fall_ori = 1; st.rows[3] = 30'h1249_2492; st.score = 160;
    avs_wr(20, 36); avs_wr(28, 1); avs_wr(3, 32'h1249_2492); avs_wr(24, 160);
    n_move++; n_row++; n_score++;
    wait_frame();
    compare_frame("frame 2 (piece moved)", st);
    compare_frame("frame 2 again", st);

    // Music off: after the FIFO empties the line is silent again.
    avs_wr(27, 0);
    n_music_off++;
    u0 = audio_underflows;
    j = dec_l.size();
    wait (dec_l.size() > j + 200);
    k = 0;
    for (int i = j + 150; i < j + 200; i++) if (dec_l[i] !== 0 || dec_r[i] !== 0) k++;
    expect_true($sformatf("silent after music off (%0d non-zero)", k), k == 0);
    if (audio_underflows > u0) n_underflow++;

    // Every mechanism happened.
    expect_true("mechanism: codec configuration",  n_config > 0);
    expect_true("mechanism: FIFO underflow",       n_underflow == 2);
    expect_true("mechanism: FIFO back-pressure",   n_backpressure > 0);
    expect_true("mechanism: sound switch",         n_switch > 0);
    expect_true("mechanism: music off",            n_music_off > 0);
    expect_true("mechanism: piece move/rotation",  n_move > 0);
    expect_true("mechanism: row update",           n_row > 0);
    expect_true("mechanism: score conversion",     n_score > 0);
    $display("mechanisms: config %0d, underflow %0d, back-pressure clocks %0d, switch %0d, music off %0d, move %0d, row %0d, score %0d",
             n_config, n_underflow, n_backpressure, n_switch, n_music_off, n_move, n_row, n_score);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
