// oscillator: the first stage of a note bank.
// A phase accumulator adds the note's 24-bit phase increment on every sample
// strobe. The pulse wave is high while the top 12 phase bits are below `duty`
// (a slider reading, so duty 2048 gives the square wave) and the sawtooth is
// the phase itself, re-centred around zero. Both are scaled to half of 24-bit
// full scale so the resonant filter that follows has headroom. While the
// note is off the phase is held at zero and the output is zero.
// The phase-accumulator structure, the half-scale amplitude and the 12-bit
// duty are this design's choices; the waveforms are the document's.
// Timing: `sample` is registered and changes one clock after sample_en.
module oscillator
  import synth_pkg::*;
#(
  parameter int unsigned PHASE_W = INCR_W,
  parameter int          AMP     = (1 << (SAMPLE_W - 2)) - 1
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       sample_en,
  input  logic [NOTE_W-1:0]          note_word,
  input  logic [CTRL_W-1:0]          duty,
  input  wave_t                      wave,
  output logic signed [SAMPLE_W-1:0] sample,
  output logic                       gate
);
  note_word_t w;
  logic [PHASE_W-1:0] phase;
  logic signed [SAMPLE_W-1:0] saw;

  assign w    = note_word_t'(note_word);
  assign gate = w.note_on;
  // Re-centred phase, halved: spans -AMP-1 .. AMP
  assign saw  = SAMPLE_W'(signed'({~phase[PHASE_W-1], phase[PHASE_W-2:0]}) >>> 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase  <= '0;
      sample <= '0;
    end else if (sample_en) begin
      if (!w.note_on) begin
        phase  <= '0;
        sample <= '0;
      end else begin
        phase <= phase + PHASE_W'(w.incr);
        if (wave == WAVE_SAW)
          sample <= saw;
        else
          sample <= (phase[PHASE_W-1 -: CTRL_W] < duty) ? SAMPLE_W'(AMP) : -SAMPLE_W'(AMP);
      end
    end
  end
endmodule
