// audio_dac_out: output half of the audio core between the player and the
// WM8731 codec.
//
// Each channel has a FIFO of FIFO_DEPTH = 128 samples, filled from an
// Avalon-ST sink (ready = FIFO not full). The codec is the clock master: it
// drives the bit clock AUD_BCLK and the frame clock AUD_DACLRCK, which are
// brought into the system clock domain through two flip-flops. The data is
// sent left justified: at every change of AUD_DACLRCK the next sample of
// that channel (left while AUD_DACLRCK is high) is taken from its FIFO into a
// shift register whose top bit drives AUD_DACDAT, so the MSB is there before
// the first rising edge of AUD_BCLK; each falling edge of AUD_BCLK then
// shifts in the next bit. After the 16 data bits zeros are sent until the
// next frame-clock edge. Both FIFOs are read together at the start of the
// left half-frame, the right word being held until its half begins, so the
// two channels stay paired frame by frame. An empty FIFO sends a silent
// (zero) sample and counts one underflow.
// The system clock must be several times faster than AUD_BCLK (50 MHz
// against 3.072 MHz in the default setup).
//
// The FIFOs' fill counts (l_count, r_count) are connected but not used here;
// the lint tool reports them as unused.
//
// The FIFO depth, the two channels and the left-justified 16-bit format
// follow the design; only the output direction is built, since audio input
// is switched off in the design's configuration.
module audio_dac_out #(
  parameter int unsigned DATA_W     = 16,
  parameter int unsigned FIFO_DEPTH = 128
) (
  input  logic              clk,
  input  logic              reset,
  // Avalon-ST sinks from the player
  input  logic [DATA_W-1:0] left_data,
  input  logic              left_valid,
  output logic              left_ready,
  input  logic [DATA_W-1:0] right_data,
  input  logic              right_valid,
  output logic              right_ready,
  // codec pins
  input  logic              AUD_BCLK,
  input  logic              AUD_DACLRCK,
  output logic              AUD_DACDAT,
  // count of samples sent while the FIFO was empty
  output logic [15:0]       underflows
);

  localparam int unsigned AW = $clog2(FIFO_DEPTH);

  logic              l_full, l_empty, r_full, r_empty, l_pop, r_pop;
  logic [DATA_W-1:0] l_head, r_head;
  logic [AW:0]       l_count, r_count;
  logic [2:0]        bclk_s, lrck_s;
  logic              bclk_fall, lrck_edge, to_left;
  logic [DATA_W-1:0] shreg, r_hold;

  assign left_ready  = !l_full;
  assign right_ready = !r_full;

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_left (
    .clk, .reset, .push(left_valid && left_ready), .wdata(left_data), .pop(l_pop),
    .rdata(l_head), .full(l_full), .empty(l_empty), .count(l_count));

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_right (
    .clk, .reset, .push(right_valid && right_ready), .wdata(right_data), .pop(r_pop),
    .rdata(r_head), .full(r_full), .empty(r_empty), .count(r_count));

  // Codec clocks into this clock domain.
  always_ff @(posedge clk) begin
    if (reset) begin
      bclk_s <= '0;
      lrck_s <= '0;
    end else begin
      bclk_s <= {bclk_s[1:0], AUD_BCLK};
      lrck_s <= {lrck_s[1:0], AUD_DACLRCK};
    end
  end

  assign bclk_fall = bclk_s[2] && !bclk_s[1];
  assign lrck_edge = lrck_s[2] ^ lrck_s[1];
  assign to_left   = lrck_s[1];
  assign l_pop     = lrck_edge && to_left && !l_empty;
  assign r_pop     = lrck_edge && to_left && !r_empty;

  always_ff @(posedge clk) begin
    if (reset) begin
      shreg      <= '0;
      r_hold     <= '0;
      underflows <= '0;
    end else if (lrck_edge) begin
      if (to_left) begin
        shreg  <= l_empty ? '0 : l_head;
        r_hold <= r_empty ? '0 : r_head;
        if (underflows < 16'hFFFE)
          underflows <= underflows + 16'(l_empty) + 16'(r_empty);
      end else begin
        shreg  <= r_hold;
      end
    end else if (bclk_fall) begin
      shreg <= {shreg[DATA_W-2:0], 1'b0};
    end
  end

  assign AUD_DACDAT = shreg[DATA_W-1];

endmodule
