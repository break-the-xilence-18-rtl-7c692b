// tb_note_bank: one voice end to end. Checks silence before the note, that
// both envelopes run attack -> decay -> sustain, that the sustained output
// is periodic with the oscillator period, that a low filter cutoff (small
// K) attenuates the pulse wave against a high one, and that the voice is
// exactly silent again once the amplitude release has finished.
module tb_note_bank;
  import synth_pkg::*;
  logic clk = 0, rst = 1, sample_en = 0, env_en = 0, arith_en = 0;
  logic [31:0] note_word = 0;
  env_params_t amp_prm, filt_prm;
  logic signed [23:0] out;
  env_state_t amp_state, filt_state;
  logic filt_sat;
  int checks = 0, failures = 0;
  int amp_seen [5], filt_seen [5];
  always #5 clk = ~clk;

  note_bank dut (.clk(clk), .rst(rst), .sample_en(sample_en), .env_en(env_en), .arith_en(arith_en),
    .note_word(note_word), .duty(12'h800), .wave(WAVE_PULSE), .amp_prm(amp_prm),
    .filt_prm(filt_prm), .out(out), .amp_state(amp_state), .filt_state(filt_state),
    .filt_sat(filt_sat));

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 8 clocks per sample, an envelope step every 16 samples
  int scnt = 0;
  always @(posedge clk) begin
    sample_en <= (scnt % 8 == 0);
    env_en    <= (scnt % 128 == 3);
    arith_en  <= (scnt % 2 == 1);
    scnt++;
  end
  always @(posedge clk) begin
    amp_seen[int'(amp_state)]++;
    filt_seen[int'(filt_state)]++;
  end

  localparam int P = 64;  // oscillator period in samples
  logic signed [23:0] hist [P];

  task automatic samples(input int n, output int peak, output int maxdiff);
    peak = 0; maxdiff = 0;
    for (int i = 0; i < n; i++) begin
      @(posedge clk iff sample_en); @(posedge clk); #1;
      if (out > peak) peak = out;
      if (i >= P) begin
        int d;
        d = out - hist[i % P];
        if (d < 0) d = -d;
        if (d > maxdiff) maxdiff = d;
      end
      hist[i % P] = out;
    end
  endtask

  initial begin
    int pk, md, pk_hi, pk_lo;
    amp_prm  = '{attack_len: 16'd10, decay_len: 16'd10, release_len: 16'd20,
                 peak: 18'h3FFFF, sustain: 18'h20000};
    filt_prm = '{attack_len: 16'd5, decay_len: 16'd5, release_len: 16'd5,
                 peak: 18'h20000, sustain: 18'h10000};   // K = 0.5 then 0.25
    repeat (3) @(posedge clk);
    rst <= 0;
    samples(200, pk, md);
    checks++;
    if (pk != 0 || out != 0) begin failures++; $display("FAIL output before the note"); end
    note_word <= {1'b1, 7'd0, 24'(1 << 18)};   // 2^24 / 64
    samples(20 * 16 + 200, pk, md);            // through attack and decay
    checks++;
    if (amp_state != ENV_SUSTAIN || filt_state != ENV_SUSTAIN) begin
      failures++; $display("FAIL states %0d/%0d, expected sustain", amp_state, filt_state);
    end
    samples(600, pk_hi, md);
    checks++;
    if (md > 8) begin failures++; $display("FAIL sustained output not periodic (diff %0d)", md); end
    checks++;
    if (pk_hi < 1000000) begin failures++; $display("FAIL sustained peak only %0d", pk_hi); end
    // Lower the cutoff: K = 1/64 -> about 3 kHz at 600 kHz, the 9.4 kHz pulse loses its edges
    filt_prm.sustain <= 18'h01000;
    samples(1500, pk, md);
    samples(600, pk_lo, md);
    checks++;
    if (!(pk_lo < pk_hi * 3 / 4)) begin failures++; $display("FAIL low cutoff peak %0d vs %0d", pk_lo, pk_hi); end
    note_word <= {1'b0, 7'd0, 24'd0};
    samples(25 * 16 + 50, pk, md);
    checks++;
    if (amp_state != ENV_IDLE) begin failures++; $display("FAIL amplitude envelope not idle"); end
    samples(50, pk, md);
    checks++;
    if (pk != 0 || out != 0) begin failures++; $display("FAIL output after release %0d", pk); end
    for (int s = 0; s < 5; s++) begin
      checks += 2;
      if (amp_seen[s] == 0 || filt_seen[s] == 0) begin failures++; $display("FAIL state %0d not reached", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
