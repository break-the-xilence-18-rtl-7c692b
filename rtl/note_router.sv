// note_router: processor-to-note-bank word register file.
// The scheduler on the processor sends one 32-bit word per MIDI event: a
// note-on word names a bank and carries the note's phase increment; a
// note-off word names the bank to silence. Each word whose bank index is in
// range is stored in that bank's register, which drives the bank's
// oscillator directly (the 32-bit path on the block diagram). Words for banks
// that do not exist are dropped. The word layout (bit 31 note on, bits 30:24
// bank, bits 23:0 increment) is this design's choice.
// Interface: host_valid/host_word, always ready. Timing: the bank register
// and the note_on_evt/note_off_evt pulses update one clock after the word.
module note_router
  import synth_pkg::*;
#(
  parameter int unsigned NUM_BANKS = 4
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  host_valid,
  input  logic [NOTE_W-1:0]     host_word,
  output logic [NOTE_W-1:0]     bank_word [NUM_BANKS],
  output logic                  note_on_evt,
  output logic                  note_off_evt
);
  note_word_t w;
  assign w = note_word_t'(host_word);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_BANKS; i++) bank_word[i] <= '0;
      note_on_evt  <= 1'b0;
      note_off_evt <= 1'b0;
    end else begin
      note_on_evt  <= 1'b0;
      note_off_evt <= 1'b0;
      if (host_valid && (32'(w.bank) < NUM_BANKS)) begin
        for (int i = 0; i < NUM_BANKS; i++)
          if (32'(w.bank) == i) bank_word[i] <= host_word;
        note_on_evt  <= w.note_on;
        note_off_evt <= ~w.note_on;
      end
    end
  end
endmodule
