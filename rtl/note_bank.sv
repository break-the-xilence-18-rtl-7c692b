// note_bank: one voice of the synthesizer.
// Chain: oscillator -> resonant low-pass filter -> amplitude multiplier.
// Two ADSR envelopes share the note's gate: the filter envelope's 18-bit
// level is the filter's K (so it sweeps the cutoff, via lpf_coeff), and the
// amplitude envelope's level is the multiplier's gain. The chain and the
// widths (24-bit audio, 18-bit envelopes, 32-bit note word) follow the
// block diagram. Every stage registers on the same sample strobe, so the
// voice output trails the oscillator by two samples; that pipelining is
// this design's choice. Interface: sample_en (600 kHz), env_en (envelope
// step), arith_en (4.8 MHz arithmetic rate for the envelope and coefficient
// sequencers), the bank's note word, pulse duty and waveform, and the two sets of
// envelope settings. `out` changes one clock after sample_en.
module note_bank
  import synth_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       sample_en,
  input  logic                       env_en,
  input  logic                       arith_en,
  input  logic [NOTE_W-1:0]          note_word,
  input  logic [CTRL_W-1:0]          duty,
  input  wave_t                      wave,
  input  env_params_t                amp_prm,
  input  env_params_t                filt_prm,
  output logic signed [SAMPLE_W-1:0] out,
  output env_state_t                 amp_state,
  output env_state_t                 filt_state,
  output logic                       filt_sat
);
  localparam int unsigned CF  = 30;
  localparam int unsigned C_W = 34;

  logic                       gate;
  logic signed [SAMPLE_W-1:0] osc_s, lpf_s;
  logic [ENV_W-1:0]           amp_lvl, filt_lvl;
  logic signed [C_W-1:0]      b0, b1, b2, a1, a2;
  logic                       coef_valid;

  oscillator u_osc (
    .clk(clk), .rst(rst), .sample_en(sample_en), .note_word(note_word),
    .duty(duty), .wave(wave), .sample(osc_s), .gate(gate)
  );

  adsr_envelope u_filt_env (
    .clk(clk), .rst(rst), .step_en(env_en), .op_en(arith_en), .gate(gate), .prm(filt_prm),
    .level(filt_lvl), .state(filt_state)
  );

  lpf_coeff #(.K_W(ENV_W), .Q_SHIFT(2), .CF(CF), .C_W(C_W)) u_coeff (
    .clk(clk), .rst(rst), .en(arith_en), .k(filt_lvl),
    .b0(b0), .b1(b1), .b2(b2), .a1(a1), .a2(a2), .valid(coef_valid)
  );

  biquad_df1 #(.W(SAMPLE_W), .CF(CF), .C_W(C_W)) u_lpf (
    .clk(clk), .rst(rst), .en(sample_en), .x(osc_s),
    .b0(b0), .b1(b1), .b2(b2), .a1(a1), .a2(a2), .y(lpf_s), .sat(filt_sat)
  );

  adsr_envelope u_amp_env (
    .clk(clk), .rst(rst), .step_en(env_en), .op_en(arith_en), .gate(gate), .prm(amp_prm),
    .level(amp_lvl), .state(amp_state)
  );

  amp_mult #(.W(SAMPLE_W), .G_W(ENV_W)) u_vca (
    .clk(clk), .rst(rst), .en(sample_en), .x(lpf_s), .g(amp_lvl), .y(out)
  );
endmodule
