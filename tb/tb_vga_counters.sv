// tb_vga_counters: runs two whole 640x480 frames at the default timing and
// checks the line length (1600 clocks), frame length (525 lines), hsync width
// (192 clocks per line), vsync width (2 lines), the visible area
// (1280 x 480 clocks per frame), the pixel clock and the end-of-frame pulse.
module tb_vga_counters;
  logic        clk = 0, reset = 1;
  logic [10:0] hcount;
  logic [9:0]  vcount;
  logic        vga_clk, hsync_n, vsync_n, blank_n, sync_n, end_of_frame;
  int checks = 0, failures = 0;

  vga_counters dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    longint clocks, visible, hs_low, vs_low_clk, eof_at, lines;
    int     hs_run, max_h, max_v, clk_err;
    repeat (2) @(posedge clk);
    reset <= 0;
    @(posedge clk); #1;
    expect_eq("hcount after reset", hcount, 1);
    for (int f = 0; f < 2; f++) begin
      clocks = 0; visible = 0; hs_low = 0; vs_low_clk = 0; eof_at = -1;
      hs_run = 0; max_h = 0; max_v = 0; clk_err = 0; lines = 0;
      while (1) begin
        if (hcount > max_h) max_h = hcount;
        if (vcount > max_v) max_v = vcount;
        if (blank_n) visible++;
        if (!hsync_n) hs_low++;
        if (!vsync_n) vs_low_clk++;
        if (vga_clk != hcount[0]) clk_err++;
        if (sync_n) clk_err++;
        if (hcount == 0) lines++;
        clocks++;
        if (end_of_frame) eof_at = clocks;
        @(posedge clk); #1;
        if (hcount == 1 && vcount == 0) break;
      end
      if (f == 1) begin
        expect_eq("frame length in clocks", clocks, 1600 * 525);
        expect_eq("lines per frame", lines, 525);
        expect_eq("max hcount", max_h, 1599);
        expect_eq("max vcount", max_v, 524);
        expect_eq("visible clocks", visible, 1280 * 480);
        expect_eq("hsync low clocks", hs_low, 192 * 525);
        expect_eq("vsync low clocks", vs_low_clk, 2 * 1600);
        expect_eq("pixel clock / sync_n errors", clk_err, 0);
        expect_eq("end_of_frame position", eof_at, 1600 * 525 - 1);  // counted from hcount = 1
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
