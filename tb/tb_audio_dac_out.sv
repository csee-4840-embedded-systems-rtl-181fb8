// tb_audio_dac_out: with the codec clocks stopped, offers 200 words on each
// channel and checks that exactly 128 (the FIFO depth) are accepted before
// ready falls. Then runs a codec model (bit clock of 16 system clocks, frame
// clock toggling every 32 bit clocks on a falling bit-clock edge, left while
// high), decodes AUD_DACDAT on rising bit-clock edges as left-justified
// 16-bit words, and checks that every accepted word comes out, in order, on
// its own channel, that the remaining words follow as space frees up, and
// that an empty FIFO sends zeros and counts underflows.
module tb_audio_dac_out;
  logic        clk = 0, reset = 1;
  logic [15:0] left_data = 0, right_data = 0;
  logic        left_valid = 0, right_valid = 0, left_ready, right_ready;
  logic        AUD_BCLK = 0, AUD_DACLRCK = 0, AUD_DACDAT;
  logic [15:0] underflows;
  int checks = 0, failures = 0;

  audio_dac_out dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Codec model.
  logic        run = 0;
  int          cnt = 0, bc = 0;
  logic [15:0] shift;
  logic [15:0] dec_l [$], dec_r [$];

  always @(posedge clk) if (run) begin
    cnt <= (cnt == 15) ? 0 : cnt + 1;
    if (cnt == 0) begin                     // falling bit-clock edge
      AUD_BCLK <= 0;
      if (bc == 0) AUD_DACLRCK <= ~AUD_DACLRCK;
    end
    if (cnt == 8) begin                     // rising bit-clock edge
      AUD_BCLK <= 1;
      if (bc < 16) shift[15 - bc] = AUD_DACDAT;
      if (bc == 15) begin
        if (AUD_DACLRCK) dec_l.push_back(shift);
        else             dec_r.push_back(shift);
      end
      bc <= (bc == 31) ? 0 : bc + 1;
    end
  end

  // Sources: words 1000+i on the left, 5000+3i on the right.
  int nl = 0, nr = 0, limit = 200;
  always @(posedge clk) if (!reset) begin
    if (left_valid && left_ready)   nl = nl + 1;
    if (right_valid && right_ready) nr = nr + 1;
    left_valid  <= (nl < limit);
    right_valid <= (nr < limit);
    left_data   <= 16'(1000 + nl);
    right_data  <= 16'(5000 + 3 * nr);
  end

  task automatic expect_true(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int bad;
    repeat (3) @(posedge clk);
    reset = 0;
    repeat (400) @(posedge clk);
    expect_true($sformatf("left FIFO takes 128 words (took %0d)", nl), nl == 128);
    expect_true($sformatf("right FIFO takes 128 words (took %0d)", nr), nr == 128);
    expect_true("ready low when full", !left_ready && !right_ready);
    run = 1;
    wait (dec_l.size() >= 230 && dec_r.size() >= 230);
    bad = 0;
    for (int i = 0; i < 200; i++) begin
      if (dec_l[i] !== 16'(1000 + i))     bad++;
      if (dec_r[i] !== 16'(5000 + 3 * i)) bad++;
    end
    expect_true($sformatf("200 words per channel in order (%0d wrong)", bad), bad == 0);
    bad = 0;
    for (int i = 200; i < 230; i++)
      if (dec_l[i] !== 16'h0 || dec_r[i] !== 16'h0) bad++;
    expect_true("silence after the FIFOs run dry", bad == 0);
    expect_true($sformatf("underflows counted (%0d)", underflows), underflows >= 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
