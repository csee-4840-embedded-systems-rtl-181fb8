// audio_player: plays a sound from the sample memory into the audio core.
//
// While music_en is high the player reads the sound selected by music_sound
// from audio_sample_rom, sample by sample, and loops back to its start at the
// end. The samples are 8 kHz mono; the codec runs at 48 kHz, so every sample
// is handed to the audio core REPEAT = 6 times, on the left and on the right
// stream alike (mono played on both channels). The audio core's FIFOs pull
// the streams at 48 kHz through `ready`, which sets the playing speed.
//
// Streams are Avalon-ST with ready latency 0: a word is taken in a clock
// where valid and ready are both high; valid and data then hold until taken.
// Per sample the player spends two clocks reading the memory (address, then
// the registered read) and at least one clock per repeat.
//
// A new sound selection, or music_en going low, takes effect at the next
// sample boundary; a new or re-enabled sound starts from its first sample.
// When disabled no words are sent, and the audio core then plays silence.
// Playing a sound selected by a register and sending it out on two streams
// follows the design; looping and the sample repetition are this design's
// choices for an 8 kHz recording on a 48 kHz codec.
module audio_player #(
  parameter int unsigned SOUNDS    = 16,
  parameter int unsigned SOUND_LEN = 2048,
  parameter int unsigned REPEAT    = 6,
  localparam int unsigned AW       = $clog2(SOUNDS * SOUND_LEN),
  localparam int unsigned IW       = $clog2(SOUND_LEN),
  localparam int unsigned RW       = $clog2(REPEAT + 1)
) (
  input  logic               clk,
  input  logic               reset,
  input  logic               music_en,
  input  logic [3:0]         music_sound,
  // sample memory
  output logic [AW-1:0]      rom_addr,
  input  logic signed [15:0] rom_data,
  // Avalon-ST sources towards the audio core
  output logic [15:0]        left_data,
  output logic               left_valid,
  input  logic               left_ready,
  output logic [15:0]        right_data,
  output logic               right_valid,
  input  logic               right_ready,
  output logic               playing
);

  typedef enum logic [1:0] {IDLE, FETCH, LOAD, SEND} state_e;

  state_e        state;
  logic [3:0]    sound;
  logic [IW-1:0] idx;
  logic [RW-1:0] rep;
  logic [15:0]   sample;
  logic          lv, rv, lv_next, rv_next;

  assign rom_addr    = AW'(sound) * AW'(SOUND_LEN) + AW'(idx);
  assign left_data   = sample;
  assign right_data  = sample;
  assign left_valid  = lv;
  assign right_valid = rv;
  assign playing     = (state != IDLE);

  assign lv_next = lv && !left_ready;
  assign rv_next = rv && !right_ready;

  always_ff @(posedge clk) begin
    if (reset) begin
      state  <= IDLE;
      sound  <= '0;
      idx    <= '0;
      rep    <= '0;
      sample <= '0;
      lv     <= 1'b0;
      rv     <= 1'b0;
    end else begin
      unique case (state)
        IDLE:
          if (music_en) begin
            sound <= music_sound;
            idx   <= '0;
            state <= FETCH;
          end
        FETCH:                          // address stable, memory reads it
          if (!music_en)
            state <= IDLE;
          else if (music_sound != sound) begin
            sound <= music_sound;
            idx   <= '0;
          end else
            state <= LOAD;
        LOAD: begin                     // registered read is on rom_data
          sample <= rom_data;
          lv     <= 1'b1;
          rv     <= 1'b1;
          rep    <= '0;
          state  <= SEND;
        end
        SEND: begin
          lv <= lv_next;
          rv <= rv_next;
          if (!lv_next && !rv_next) begin
            if (rep == RW'(REPEAT - 1)) begin
              idx   <= (idx == IW'(SOUND_LEN - 1)) ? '0 : idx + IW'(1);
              state <= FETCH;
            end else begin
              rep <= rep + RW'(1);
              lv  <= 1'b1;
              rv  <= 1'b1;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // Avalon-ST sources: once offered, a word stays until it is taken.
  assert property (@(posedge clk) disable iff (reset)
                   left_valid && !left_ready |=> left_valid && $stable(left_data))
    else $error("audio_player: left word withdrawn");
  assert property (@(posedge clk) disable iff (reset)
                   right_valid && !right_ready |=> right_valid && $stable(right_data))
    else $error("audio_player: right word withdrawn");

endmodule
