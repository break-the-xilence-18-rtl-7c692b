// tb_oscillator: runs the oscillator with a reference phase accumulator in
// the testbench and compares every sample for the pulse wave at several
// duty settings and for the sawtooth, and checks silence while note off.
module tb_oscillator;
  import synth_pkg::*;
  logic clk = 0, rst = 1, sample_en = 0;
  logic [31:0] note_word = 0;
  logic [11:0] duty = 12'h800;
  wave_t wave = WAVE_PULSE;
  logic signed [23:0] sample;
  logic gate;
  int checks = 0, failures = 0;
  localparam int AMP = (1 << 22) - 1;
  always #5 clk = ~clk;

  oscillator dut (.clk(clk), .rst(rst), .sample_en(sample_en), .note_word(note_word),
    .duty(duty), .wave(wave), .sample(sample), .gate(gate));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned ref_phase;
  int highs;
  task automatic run(input int n, input int unsigned incr);
    int expv;
    for (int i = 0; i < n; i++) begin
      sample_en <= 1; @(posedge clk); sample_en <= 0; #1;
      if (note_word[31] == 0) begin
        expv = 0; ref_phase = 0;
      end else begin
        if (wave == WAVE_SAW) expv = (int'(ref_phase) - (1 << 23)) >>> 1;
        else expv = ((ref_phase >> 12) < duty) ? AMP : -AMP;
        ref_phase = (ref_phase + incr) & 24'hFFFFFF;
      end
      if (expv > 0) highs++;
      checks++;
      if (sample !== 24'(expv)) begin
        failures++;
        if (failures < 10) $display("FAIL sample %0d got %0d expected %0d", i, sample, expv);
      end
      repeat (2) @(posedge clk);
    end
  endtask

  initial begin
    int unsigned incr;
    repeat (3) @(posedge clk);
    rst <= 0;
    ref_phase = 0;
    incr = 24'd167772;  // 1/100 of a period per sample
    run(5, incr);       // note off: silent
    note_word <= {1'b1, 7'd0, 24'(incr)};
    wave <= WAVE_PULSE;
    for (int d = 0; d < 4; d++) begin
      duty <= 12'(d * 1024 + 512);
      highs = 0;
      @(posedge clk);
      run(400, incr);
      // 400 samples = 4 periods; fraction high must follow the duty
      checks++;
      if (highs < (d * 1024 + 512) * 400 / 4096 - 8 || highs > (d * 1024 + 512) * 400 / 4096 + 8) begin
        failures++; $display("FAIL duty %0d: %0d of 400 samples high", d * 1024 + 512, highs);
      end
    end
    wave <= WAVE_SAW;
    @(posedge clk);
    run(300, incr);
    note_word <= {1'b1, 7'd0, 24'h0ABCDE};
    @(posedge clk);
    run(300, 24'h0ABCDE);
    note_word <= 0;
    @(posedge clk);
    run(10, 0);
    checks++;
    if (gate !== 0) begin failures++; $display("FAIL gate stays high"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
