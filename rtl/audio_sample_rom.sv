// audio_sample_rom: memory of the sound samples, 16-bit signed mono PCM.
//
// SOUNDS sounds of SOUND_LEN samples each, sound k at addresses
// k*SOUND_LEN .. (k+1)*SOUND_LEN - 1, played at 8 kHz. Synchronous read: the
// word at `addr` appears on `data` after the next rising clock edge, as in an
// on-chip block RAM.
//
// The samples themselves are recorded music that the design loads from a hex
// file. When INIT_FILE names such a file (one 4-digit hex word per line) it
// is loaded; by default the memory is filled with a test tone per sound
// instead: a triangle wave of amplitude 8192 whose period is 16 + 4*k
// samples for sound k (500 Hz for sound 0 at 8 kHz), so every sound is
// audible and distinguishable. Sizes are this design's choice.
module audio_sample_rom #(
  parameter int unsigned SOUNDS    = 16,
  parameter int unsigned SOUND_LEN = 2048,
  parameter string       INIT_FILE = "",
  localparam int unsigned DEPTH    = SOUNDS * SOUND_LEN,
  localparam int unsigned AW       = $clog2(DEPTH)
) (
  input  logic              clk,
  input  logic [AW-1:0]     addr,
  output logic signed [15:0] data
);

  logic signed [15:0] mem [DEPTH];

  // Test tone: triangle of period p samples between -8192 and +8192.
  function automatic logic signed [15:0] tone(int unsigned i);
    int p, ph, v;
    p  = 16 + 4 * int'(i / SOUND_LEN);
    ph = int'(i % SOUND_LEN) % p;
    v  = (ph < p / 2) ? ph : p - ph;          // 0 .. p/2
    return 16'((v * 32768) / p - 8192);
  endfunction

  initial begin
    if (INIT_FILE != "")
      $readmemh(INIT_FILE, mem);
    else
      for (int unsigned i = 0; i < DEPTH; i++)
        mem[i] = tone(i);
  end

  always_ff @(posedge clk)
    data <= mem[addr];

endmodule
