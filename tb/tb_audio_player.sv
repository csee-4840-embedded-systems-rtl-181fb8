// tb_audio_player: drives the player with a model of the sample memory
// (one clock read latency, word = 37 * address + 5) and random back-pressure
// on both streams. Checks that nothing is sent while disabled; that a sound
// plays its samples in order, each exactly 6 times, on both channels alike,
// and loops at its end; that a new sound selection starts at its first
// sample after completing the current one; and that disabling stops the
// streams within one sample.
module tb_audio_player;
  localparam int LEN = 32;

  logic        clk = 0, reset = 1, music_en = 0;
  logic [3:0]  music_sound = 0;
  logic [8:0]  rom_addr;
  logic signed [15:0] rom_data;
  logic [15:0] left_data, right_data;
  logic        left_valid, right_valid, left_ready = 0, right_ready = 0, playing;
  int checks = 0, failures = 0;
  logic [15:0] lq [$], rq [$];

  audio_player #(.SOUNDS(16), .SOUND_LEN(LEN)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [15:0] word(int a);
    return 16'(a * 37 + 5);
  endfunction

  always_ff @(posedge clk) rom_data <= word(int'(rom_addr));

  always @(posedge clk) begin
    if (!reset && left_valid && left_ready)   lq.push_back(left_data);
    if (!reset && right_valid && right_ready) rq.push_back(right_data);
    left_ready  <= ($urandom_range(0, 3) != 0);
    right_ready <= ($urandom_range(0, 3) != 0);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Checks that q[from .. from+n-1] plays sound s from sample 0.
  task automatic expect_sound(string what, int from, int n, int s);
    int bad = 0;
    for (int i = 0; i < n; i++)
      if (lq[from + i] !== word(s * LEN + (i / 6) % LEN) || rq[from + i] !== lq[from + i])
        bad++;
    expect_true($sformatf("%s: %0d wrong words", what, bad), bad == 0);
  endtask

  initial begin
    int j, n_at_off;
    repeat (3) @(posedge clk);
    reset = 0;
    repeat (50) @(posedge clk);
    expect_true("silent while disabled", lq.size() == 0 && rq.size() == 0 && !playing);

    // Sound 3, long enough to loop.
    @(negedge clk); music_sound = 3; music_en = 1;
    wait (lq.size() >= 2 * 6 * LEN + 20 && rq.size() >= 2 * 6 * LEN + 20);
    expect_sound("sound 3 with loop", 0, 2 * 6 * LEN + 20, 3);

    // Switch to sound 7 while playing.
    @(negedge clk); music_sound = 7;
    wait (lq.size() >= 2 * 6 * LEN + 220 && rq.size() >= 2 * 6 * LEN + 220);
    j = 0;
    while (j < lq.size() && lq[j] !== word(7 * LEN)) j++;
    expect_true("switch found", j < lq.size());
    expect_true("switch at a sample boundary", j % 6 == 0);
    expect_sound("before switch", 0, j, 3);
    expect_sound("after switch", j, 190, 7);

    // Disable: at most the rest of one sample's repeats follows.
    @(negedge clk); music_en = 0;
    n_at_off = lq.size();
    repeat (200) @(posedge clk);
    expect_true("stops after disable", lq.size() - n_at_off <= 6 && rq.size() == lq.size());
    expect_true("idle after disable", !playing);
    n_at_off = lq.size();
    repeat (100) @(posedge clk);
    expect_true("stays silent", lq.size() == n_at_off);

    // Re-enable starts again from the first sample.
    lq.delete(); rq.delete();
    @(negedge clk); music_sound = 1; music_en = 1;
    wait (lq.size() >= 60 && rq.size() >= 60);
    expect_sound("restart sound 1", 0, 60, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
