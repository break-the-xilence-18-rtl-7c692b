// synth_pkg: widths, types and constants shared by the synthesizer.
// The three bus widths are the ones drawn on the block diagram of the design:
// 32-bit note words from the processor, 24-bit audio samples between the
// stages of a note bank, and 18-bit envelope values. The layout of the note
// word and the envelope-setting bundle are this design's own choices.
package synth_pkg;

  localparam int unsigned NOTE_W   = 32;  // processor -> note bank word
  localparam int unsigned SAMPLE_W = 24;  // audio samples (signed)
  localparam int unsigned ENV_W    = 18;  // envelope values (unsigned Q0.18)
  localparam int unsigned LEN_W    = 16;  // envelope phase lengths, in steps
  localparam int unsigned CTRL_W   = 12;  // one potentiometer reading
  localparam int unsigned INCR_W   = 24;  // oscillator phase increment

  // Note word, bit 31 first.
  typedef struct packed {
    logic              note_on;  // 1 = play, 0 = silence the bank
    logic [6:0]        bank;     // destination note bank
    logic [INCR_W-1:0] incr;     // phase increment per sample
  } note_word_t;

  // Settings of one ADSR envelope.
  typedef struct packed {
    logic [LEN_W-1:0] attack_len;
    logic [LEN_W-1:0] decay_len;
    logic [LEN_W-1:0] release_len;
    logic [ENV_W-1:0] peak;
    logic [ENV_W-1:0] sustain;
  } env_params_t;

  typedef enum logic [2:0] {
    ENV_IDLE    = 3'd0,
    ENV_ATTACK  = 3'd1,
    ENV_DECAY   = 3'd2,
    ENV_SUSTAIN = 3'd3,
    ENV_RELEASE = 3'd4
  } env_state_t;

  typedef enum logic {
    WAVE_PULSE = 1'b0,
    WAVE_SAW   = 1'b1
  } wave_t;

endpackage
