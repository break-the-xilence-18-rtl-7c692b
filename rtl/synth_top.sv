// synth_top: polyphonic subtractive synthesizer in programmable logic.
// The processor's scheduler turns MIDI key events into 32-bit note words
// (note on/off, bank, phase increment) that arrive on host_valid/host_word.
// note_router latches each word into its note bank. Each of the NUM_BANKS
// banks is an oscillator (variable-width pulse or sawtooth), a resonant
// low-pass filter swept by a filter envelope, and an amplitude envelope
// multiplier. The bank outputs are summed by an accumulating adder, the sum
// passes through a tremolo, and the result goes as 24-bit samples to both
// channels of the audio codec over I2S (the codec is clock master). Twelve
// potentiometers read through three PmodAD2 modules set the envelopes, the
// pulse duty and the tremolo rate.
// Clocking: one 48 MHz clock. Clock enables give the 4.8 MHz arithmetic rate
// (ARITH_DIV; it paces the envelope and filter-coefficient arithmetic), the 600 kHz sample rate (SAMPLE_DIV more), the envelope step
// rate (ENV_DIV sample ticks, 1 kHz), and mclk, a 24 MHz square wave for the
// codec. The codec takes the newest sample at each 48 kHz frame.
// Control map (this design's choice): pmod 0 channels 0..3 = amplitude
// attack, decay, sustain, release; pmod 1 = amplitude peak, pulse duty,
// tremolo rate, filter peak; pmod 2 = filter attack, decay, sustain,
// release. Lengths are readings in envelope steps (ms at the default rate);
// levels are readings scaled to 18 bits. A tremolo rate of 0 disables it.
module synth_top
  import synth_pkg::*;
#(
  parameter int unsigned NUM_BANKS  = 4,
  parameter int unsigned ARITH_DIV  = 10,
  parameter int unsigned SAMPLE_DIV = 8,
  parameter int unsigned ENV_DIV    = 600,
  parameter int unsigned I2C_QDIV   = 120,
  parameter int unsigned SCAN_DIV   = 480000
) (
  input  logic                       clk,
  input  logic                       rst,
  // Note words from the processor
  input  logic                       host_valid,
  input  logic [NOTE_W-1:0]          host_word,
  output logic                       host_ready,
  input  wave_t                      wave_sel,
  // Audio codec
  output logic                       mclk,
  input  logic                       i2s_bclk,
  input  logic                       i2s_lrclk,
  output logic                       i2s_dac_sdata,
  input  logic                       i2s_adc_sdata,
  output logic [SAMPLE_W-1:0]        adc_left,
  output logic [SAMPLE_W-1:0]        adc_right,
  // Parameter control unit: three PmodAD2 I2C buses
  output logic [2:0]                 pmod_scl,
  output logic [2:0]                 pmod_sda_oe,
  input  logic [2:0]                 pmod_sda_i,
  // Observation
  output logic signed [SAMPLE_W-1:0] audio_out,
  output logic [CTRL_W-1:0]          ctrl_values [12]
);
  // ---------------- clock enables ----------------
  logic arith_tick, sample_tick, env_tick, sample_d1;
  logic unused_sq_a, unused_sq_s, unused_sq_e, unused_tick_m;

  clock_divider #(.DIV(1)) u_mclk_div (
    .clk(clk), .rst(rst), .en(1'b1), .tick(unused_tick_m), .sq(mclk));
  clock_divider #(.DIV(ARITH_DIV)) u_arith_div (
    .clk(clk), .rst(rst), .en(1'b1), .tick(arith_tick), .sq(unused_sq_a));
  clock_divider #(.DIV(SAMPLE_DIV)) u_sample_div (
    .clk(clk), .rst(rst), .en(arith_tick), .tick(sample_tick), .sq(unused_sq_s));
  clock_divider #(.DIV(ENV_DIV)) u_env_div (
    .clk(clk), .rst(rst), .en(sample_tick), .tick(env_tick), .sq(unused_sq_e));

  always_ff @(posedge clk) begin
    if (rst) sample_d1 <= 1'b0;
    else     sample_d1 <= sample_tick;
  end

  // ---------------- parameter control unit ----------------
  logic [7:0] nack_cnt [3];
  logic [2:0] pmod_done;
  for (genvar p = 0; p < 3; p++) begin : g_pmod
    logic [CTRL_W-1:0] v [4];
    pmod_ad2_ctrl #(.I2C_QDIV(I2C_QDIV), .SCAN_DIV(SCAN_DIV)) u_pmod (
      .clk(clk), .rst(rst), .scl(pmod_scl[p]), .sda_oe(pmod_sda_oe[p]),
      .sda_i(pmod_sda_i[p]), .value(v), .nack_cnt(nack_cnt[p]), .done_evt(pmod_done[p]));
    for (genvar c = 0; c < 4; c++) begin : g_ch
      assign ctrl_values[p*4 + c] = v[c];
    end
  end

  function automatic logic [LEN_W-1:0] as_len(input logic [CTRL_W-1:0] r);
    return LEN_W'(r);
  endfunction
  function automatic logic [ENV_W-1:0] as_level(input logic [CTRL_W-1:0] r);
    return {r, {(ENV_W - CTRL_W){1'b0}}};
  endfunction

  env_params_t       amp_prm, filt_prm;
  logic [CTRL_W-1:0] duty, trem_rate;
  always_comb begin
    amp_prm.attack_len   = as_len(ctrl_values[0]);
    amp_prm.decay_len    = as_len(ctrl_values[1]);
    amp_prm.sustain      = as_level(ctrl_values[2]);
    amp_prm.release_len  = as_len(ctrl_values[3]);
    amp_prm.peak         = as_level(ctrl_values[4]);
    duty                 = ctrl_values[5];
    trem_rate            = ctrl_values[6];
    filt_prm.peak        = as_level(ctrl_values[7]);
    filt_prm.attack_len  = as_len(ctrl_values[8]);
    filt_prm.decay_len   = as_len(ctrl_values[9]);
    filt_prm.sustain     = as_level(ctrl_values[10]);
    filt_prm.release_len = as_len(ctrl_values[11]);
  end

  // ---------------- note banks ----------------
  logic [NOTE_W-1:0]          bank_word [NUM_BANKS];
  logic signed [SAMPLE_W-1:0] bank_out  [NUM_BANKS];
  logic note_on_evt, note_off_evt;

  assign host_ready = 1'b1;

  note_router #(.NUM_BANKS(NUM_BANKS)) u_router (
    .clk(clk), .rst(rst), .host_valid(host_valid), .host_word(host_word),
    .bank_word(bank_word), .note_on_evt(note_on_evt), .note_off_evt(note_off_evt));

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    env_state_t amp_state, filt_state;
    logic       filt_sat;
    note_bank u_bank (
      .clk(clk), .rst(rst), .sample_en(sample_tick), .env_en(env_tick), .arith_en(arith_tick),
      .note_word(bank_word[b]), .duty(duty), .wave(wave_sel),
      .amp_prm(amp_prm), .filt_prm(filt_prm), .out(bank_out[b]),
      .amp_state(amp_state), .filt_state(filt_state), .filt_sat(filt_sat));
  end

  // ---------------- adder, tremolo, codec ----------------
  logic signed [SAMPLE_W-1:0] mix_s;
  logic mix_valid, mix_sat, trem_active;

  mixer_accum #(.NUM_BANKS(NUM_BANKS), .W(SAMPLE_W)) u_mix (
    .clk(clk), .rst(rst), .in_valid(sample_d1), .in_s(bank_out),
    .out_s(mix_s), .out_valid(mix_valid), .sat(mix_sat));

  tremolo u_trem (
    .clk(clk), .rst(rst), .en(mix_valid), .rate(trem_rate), .x(mix_s),
    .y(audio_out), .active(trem_active));

  logic i2s_frame;
  i2s_transceiver #(.W(SAMPLE_W)) u_i2s (
    .clk(clk), .rst(rst), .bclk(i2s_bclk), .lrclk(i2s_lrclk),
    .sdata_in(i2s_adc_sdata), .sdata_out(i2s_dac_sdata),
    .left_in(audio_out), .right_in(audio_out),
    .left_out(adc_left), .right_out(adc_right), .frame(i2s_frame));

  // The accumulating adder must finish before the next sample
  initial assert (NUM_BANKS + 2 < ARITH_DIV * SAMPLE_DIV)
    else $error("synth_top: NUM_BANKS too large for the sample period");
endmodule
