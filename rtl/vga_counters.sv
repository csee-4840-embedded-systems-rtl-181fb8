// vga_counters: VGA raster timing for a 640x480 display from a 50 MHz clock.
//
// hcount advances every clock and covers one line in H_TOTAL = 1600 clocks,
// two clocks per pixel, so the pixel column is hcount[10:1] and the 25 MHz
// pixel clock is hcount[0]. vcount advances at the end of each line and
// covers a frame in 525 lines. Sync pulses are active low; blank_n is high
// inside the 640x480 visible area. sync_n (composite sync) is tied low as
// the DAC does not use it. All outputs are combinational from the two
// counters, which reset to 0 (top-left visible pixel).
//
// The design names hcount, vcount and the VGA pins; the 640x480 at 60 Hz
// timing (front porch, sync, back porch) is the standard one for that mode,
// chosen here. The defaults are the standard numbers; a testbench may shrink
// them to run whole frames quickly.
module vga_counters #(
  parameter int unsigned H_ACTIVE = 1280,  // in clocks (2 per pixel)
  parameter int unsigned H_FRONT  = 32,
  parameter int unsigned H_SYNC   = 192,
  parameter int unsigned H_BACK   = 96,
  parameter int unsigned V_ACTIVE = 480,   // in lines
  parameter int unsigned V_FRONT  = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BACK   = 33,
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FRONT + H_SYNC + H_BACK,
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FRONT + V_SYNC + V_BACK
) (
  input  logic        clk,
  input  logic        reset,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        vga_clk,
  output logic        hsync_n,
  output logic        vsync_n,
  output logic        blank_n,
  output logic        sync_n,
  output logic        end_of_frame   // one clock at the last clock of a frame
);

  logic end_of_line;
  assign end_of_line  = (hcount == 11'(H_TOTAL - 1));
  assign end_of_frame = end_of_line && (vcount == 10'(V_TOTAL - 1));

  always_ff @(posedge clk) begin
    if (reset) begin
      hcount <= '0;
      vcount <= '0;
    end else if (end_of_line) begin
      hcount <= '0;
      vcount <= end_of_frame ? '0 : vcount + 10'd1;
    end else begin
      hcount <= hcount + 11'd1;
    end
  end

  assign hsync_n = !((hcount >= 11'(H_ACTIVE + H_FRONT)) &&
                     (hcount <  11'(H_ACTIVE + H_FRONT + H_SYNC)));
  assign vsync_n = !((vcount >= 10'(V_ACTIVE + V_FRONT)) &&
                     (vcount <  10'(V_ACTIVE + V_FRONT + V_SYNC)));
  assign blank_n = (hcount < 11'(H_ACTIVE)) && (vcount < 10'(V_ACTIVE));
  assign sync_n  = 1'b0;
  assign vga_clk = hcount[0];

endmodule
