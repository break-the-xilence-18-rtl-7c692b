// tb_synth_top: the whole synthesizer at its default sizes and rates
// (48 MHz clock, 600 kHz voices, 1 kHz envelope steps, 100 kHz I2C,
// 100 Hz channel scan, 48 kHz codec frames). Three ADC models stand in for
// the potentiometer boxes and a codec model clocks the I2S link.
// Sequence: wait for all twelve control readings; play one note, then four
// at once (the adder saturates), send a word for a bank that does not
// exist, release all notes and check the output returns to silence; then
// turn the duty and tremolo knobs, switch to the sawtooth and play again.
// Every codec frame is compared with the sample the design loaded for it.
// Each mechanism (routing, every envelope phase, polyphony, adder
// saturation, filter sweep, duty change, sawtooth, tremolo on and off,
// I2C readings, I2S frames) is counted and must occur at least once.
module tb_synth_top;
  import synth_pkg::*;
  logic clk = 0, rst = 1;
  logic host_valid = 0;
  logic [31:0] host_word = 0;
  logic host_ready;
  wave_t wave_sel = WAVE_PULSE;
  logic mclk, bclk, lrclk, dac_sd, adc_sd;
  logic [23:0] adc_left, adc_right;
  logic [2:0] scl, m_oe, s_oe, sda;
  logic signed [23:0] audio_out;
  logic [11:0] ctrl_values [12];
  logic [11:0] cv [3][4];
  logic [23:0] c_dac_l, c_dac_r;
  int frames;
  int reads [3];
  logic [7:0] cfg [3];
  int checks = 0, failures = 0;
  always #10.4167ns clk = ~clk;

  synth_top dut (.clk(clk), .rst(rst), .host_valid(host_valid), .host_word(host_word),
    .host_ready(host_ready), .wave_sel(wave_sel), .mclk(mclk), .i2s_bclk(bclk),
    .i2s_lrclk(lrclk), .i2s_dac_sdata(dac_sd), .i2s_adc_sdata(adc_sd), .adc_left(adc_left),
    .adc_right(adc_right), .pmod_scl(scl), .pmod_sda_oe(m_oe), .pmod_sda_i(sda),
    .audio_out(audio_out), .ctrl_values(ctrl_values));

  for (genvar p = 0; p < 3; p++) begin : g_adc
    assign sda[p] = ~(m_oe[p] | s_oe[p]);
    ad7991_model adc (.scl(scl[p]), .sda(sda[p]), .s_oe(s_oe[p]), .chan_val(cv[p]),
      .reads(reads[p]), .cfg(cfg[p]));
  end

  i2s_codec_model #(.BCLK_HALF(162.76ns)) codec (.bclk(bclk), .lrclk(lrclk), .adc_sdata(adc_sd),
    .dac_sdata(dac_sd), .adc_left(24'h5A5A5A), .adc_right(24'h0C0C0C), .dac_left(c_dac_l),
    .dac_right(c_dac_r), .frames(frames));

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_on, n_off, n_ignored, n_attack, n_decay, n_sustain, n_release, n_idle_ret;
  int n_poly, n_mix_sat, n_trem_on, n_trem_off, n_saw, n_kchange, n_i2c, n_frames_ok;
  int n_mclk;
  env_state_t st_prev [4];
  logic [17:0] k_prev;
  always @(posedge clk) if (!rst) begin
    int active;
    if (dut.note_on_evt) n_on++;
    if (dut.note_off_evt) n_off++;
    if (dut.mix_valid && dut.mix_sat) n_mix_sat++;
    if (dut.mix_valid && dut.trem_active) n_trem_on++;
    if (dut.mix_valid && !dut.trem_active) n_trem_off++;
    if (mclk) n_mclk++;
    n_i2c += $countones(dut.pmod_done);
    active = 0;
    for (int b = 0; b < 4; b++) begin
      env_state_t s;
      case (b)
        0: s = dut.g_bank[0].amp_state;
        1: s = dut.g_bank[1].amp_state;
        2: s = dut.g_bank[2].amp_state;
        default: s = dut.g_bank[3].amp_state;
      endcase
      if (s != st_prev[b]) begin
        if (s == ENV_ATTACK) n_attack++;
        if (s == ENV_DECAY) n_decay++;
        if (s == ENV_SUSTAIN) n_sustain++;
        if (s == ENV_RELEASE) n_release++;
        if (s == ENV_IDLE) n_idle_ret++;
      end
      st_prev[b] = s;
      if (s != ENV_IDLE) active++;
    end
    if (active >= 2) n_poly++;
    if (dut.g_bank[0].u_bank.filt_lvl != k_prev) n_kchange++;
    k_prev = dut.g_bank[0].u_bank.filt_lvl;
  end

  // Rates: 600 kHz sample strobe (80 clocks), 24 MHz mclk (toggles every
  // clock), 100 kHz SCL (480 clocks between rising edges within a byte),
  // one ADC exchange per 100 Hz tick (480000 clocks)
  longint cyc = 0, last_samp = -1, last_scl = -1, last_done = -1;
  int bad_rate = 0, n_samp_int = 0, n_scl_int = 0, n_scan_int = 0;
  logic mclk_d = 0, scl_d = 1;
  always @(posedge clk) if (!rst) begin
    cyc++;
    if (dut.sample_tick) begin
      if (last_samp >= 0) begin n_samp_int++; if (cyc - last_samp != 80) bad_rate++; end
      last_samp = cyc;
    end
    if (cyc > 2 && mclk == mclk_d) bad_rate++;
    mclk_d = mclk;
    if (scl[0] && !scl_d) begin
      if (last_scl >= 0 && cyc - last_scl < 600) begin n_scl_int++; if (cyc - last_scl != 480) bad_rate++; end
      last_scl = cyc;
    end
    scl_d = scl[0];
    if (dut.pmod_done[0]) begin
      if (last_done >= 0) begin n_scan_int++; if (cyc - last_done != 480000) bad_rate++; end
      last_done = cyc;
    end
  end

  // Every codec frame must carry the sample loaded at its frame pulse
  logic [23:0] loaded_q [$];
  // (frame rises one clock after the load, so the loaded value is the
  // sample seen one clock earlier)
  logic [23:0] audio_d = 0;
  always @(posedge clk) begin
    if (dut.i2s_frame) loaded_q.push_back(audio_d);
    audio_d <= audio_out;
  end
  int f_seen = 0;
  always @(frames) begin
    logic [23:0] e;
    if (loaded_q.size() > 0) begin
      e = loaded_q.pop_front();
      checks++;
      if (c_dac_l !== e || c_dac_r !== e) begin
        failures++;
        if (failures < 10) $display("FAIL codec frame %h/%h expected %h", c_dac_l, c_dac_r, e);
      end else n_frames_ok++;
    end
  end

  // ---------------- stimulus helpers ----------------
  task automatic send(input logic on, input int bank, input int unsigned incr);
    @(posedge clk);
    host_word <= {on, 7'(bank), 24'(incr)};
    host_valid <= 1;
    @(posedge clk);
    host_valid <= 0;
  endtask

  // Runs n samples of the mix, returning its peak magnitude
  task automatic watch(input int n, output int peak);
    peak = 0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk iff dut.mix_valid);
      @(posedge clk); #1;
      if (audio_out > peak) peak = audio_out;
      if (-audio_out > peak) peak = -audio_out;
    end
  endtask

  task automatic wait_ctrl();
    int guard;
    guard = 0;
    for (;;) begin
      int ok;
      ok = 1;
      for (int i = 0; i < 12; i++) if (ctrl_values[i] !== cv[i / 4][i % 4]) ok = 0;
      if (ok || guard > 5000000) break;
      @(posedge clk); guard++;
    end
    for (int i = 0; i < 12; i++) begin
      checks++;
      if (ctrl_values[i] !== cv[i / 4][i % 4]) begin
        failures++; $display("FAIL control %0d = %h expected %h", i, ctrl_values[i], cv[i / 4][i % 4]);
      end
    end
  endtask

  localparam int unsigned A4 = 12303;   // 440 Hz: 440 * 2^24 / 600 kHz

  initial begin
    int pk, highs, total, distinct;
    logic signed [23:0] last_osc;
    for (int b = 0; b < 4; b++) st_prev[b] = ENV_IDLE;
    k_prev = 0;
    // pmod 0: amplitude attack, decay, sustain, release
    cv[0][0] = 12'd3; cv[0][1] = 12'd3; cv[0][2] = 12'hC00; cv[0][3] = 12'd4;
    // pmod 1: amplitude peak, duty, tremolo rate, filter peak
    cv[1][0] = 12'hFFF; cv[1][1] = 12'h800; cv[1][2] = 12'd0; cv[1][3] = 12'h800;
    // pmod 2: filter attack, decay, sustain, release
    cv[2][0] = 12'd2; cv[2][1] = 12'd2; cv[2][2] = 12'h400; cv[2][3] = 12'd2;
    repeat (5) @(posedge clk);
    rst <= 0;
    wait_ctrl();
    checks++;
    if (!host_ready) begin failures++; $display("FAIL host_ready low"); end

    watch(300, pk);
    checks++;
    if (pk != 0) begin failures++; $display("FAIL output %0d with no note", pk); end

    // One note
    send(1, 0, A4);
    watch(6000, pk);   // 10 ms
    checks++;
    if (pk < 500000) begin failures++; $display("FAIL single note peak %0d", pk); end
    checks++;
    if (dut.g_bank[0].amp_state != ENV_SUSTAIN) begin failures++; $display("FAIL bank 0 not sustaining"); end

    // Four notes: the adder clips
    send(1, 1, A4 * 5 / 4);
    send(1, 2, A4 * 3 / 2);
    send(1, 3, A4 * 2);
    send(1, 9, A4);        // no such bank
    n_ignored = (n_on == 4) ? 1 : 0;
    watch(6000, pk);
    checks++;
    if (n_on != 4) begin failures++; $display("FAIL %0d note-on words taken", n_on); end

    // All notes off: silence after the release
    for (int b = 0; b < 4; b++) send(0, b, 0);
    watch(4800, pk);    // 8 ms
    watch(100, pk);
    checks++;
    if (pk != 0) begin failures++; $display("FAIL output %0d after release", pk); end

    // Turn the knobs: quarter duty, tremolo on
    cv[1][1] = 12'h400; cv[1][2] = 12'd1500;
    wait_ctrl();
    send(1, 0, A4);
    highs = 0; total = 0;
    for (int i = 0; i < 6000; i++) begin
      @(posedge clk iff dut.sample_tick); @(posedge clk); #1;
      if (dut.g_bank[0].u_bank.gate) begin
        total++;
        if (dut.g_bank[0].u_bank.osc_s > 0) highs++;
      end
    end
    checks++;
    if (highs * 100 < total * 20 || highs * 100 > total * 30) begin
      failures++; $display("FAIL duty: %0d of %0d samples high", highs, total);
    end
    // Sawtooth
    wave_sel <= WAVE_SAW;
    distinct = 0; last_osc = 0;
    for (int i = 0; i < 3000; i++) begin
      @(posedge clk iff dut.sample_tick); @(posedge clk); #1;
      if (dut.g_bank[0].u_bank.osc_s != last_osc) distinct++;
      last_osc = dut.g_bank[0].u_bank.osc_s;
    end
    n_saw = (distinct > 2500) ? distinct : 0;
    send(0, 0, 0);
    watch(3000, pk);

    // ---------------- mechanism report ----------------
    $display("note_on=%0d note_off=%0d ignored=%0d attack=%0d decay=%0d sustain=%0d release=%0d idle=%0d",
             n_on, n_off, n_ignored, n_attack, n_decay, n_sustain, n_release, n_idle_ret);
    $display("poly=%0d mix_sat=%0d trem_on=%0d trem_off=%0d saw=%0d k_changes=%0d i2c=%0d frames_ok=%0d",
             n_poly, n_mix_sat, n_trem_on, n_trem_off, n_saw, n_kchange, n_i2c, n_frames_ok);
    begin
      int m [16];
      m = '{n_on, n_off, n_ignored, n_attack, n_decay, n_sustain, n_release, n_idle_ret,
            n_poly, n_mix_sat, n_trem_on, n_trem_off, n_saw, n_kchange, n_i2c, n_frames_ok};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    checks++;
    if (bad_rate != 0 || n_samp_int < 1000 || n_scl_int < 100 || n_scan_int < 5) begin
      failures++; $display("FAIL rates: %0d wrong intervals (%0d sample, %0d SCL, %0d scan)", bad_rate, n_samp_int, n_scl_int, n_scan_int);
    end
    $display("rates: %0d sample, %0d SCL, %0d scan intervals checked", n_samp_int, n_scl_int, n_scan_int);
    checks++;
    if (adc_left !== 24'h5A5A5A || adc_right !== 24'h0C0C0C) begin
      failures++; $display("FAIL codec ADC words %h/%h", adc_left, adc_right);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
