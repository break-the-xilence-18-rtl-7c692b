// tb_i2s_transceiver: a codec model clocks the link at 64 bit clocks per
// frame. Random stereo words are presented on every `frame` pulse; each must
// arrive intact at the codec's DAC side, and the codec's ADC words must
// appear on left_out / right_out.
module tb_i2s_transceiver;
  logic clk = 0, rst = 1;
  logic bclk, lrclk, adc_sd, dac_sd;
  logic [23:0] left_in = 0, right_in = 0, left_out, right_out;
  logic [23:0] c_adc_l = 24'h123456, c_adc_r = 24'hFEDCBA, c_dac_l, c_dac_r;
  logic frame;
  int frames;
  int checks = 0, failures = 0;
  always #10.4ns clk = ~clk;   // 48 MHz

  i2s_transceiver dut (.clk(clk), .rst(rst), .bclk(bclk), .lrclk(lrclk), .sdata_in(adc_sd),
    .sdata_out(dac_sd), .left_in(left_in), .right_in(right_in), .left_out(left_out),
    .right_out(right_out), .frame(frame));
  i2s_codec_model #(.BCLK_HALF(163ns)) codec (.bclk(bclk), .lrclk(lrclk), .adc_sdata(adc_sd),
    .dac_sdata(dac_sd), .adc_left(c_adc_l), .adc_right(c_adc_r), .dac_left(c_dac_l),
    .dac_right(c_dac_r), .frames(frames));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [23:0] sent_l, sent_r;
    int f0, nframe;
    repeat (5) @(posedge clk);
    rst <= 0;
    nframe = 0;
    // Prepare the next pair; it is loaded at the following frame pulse
    for (int n = 0; n < 60; n++) begin
      sent_l = 24'($urandom); sent_r = 24'($urandom);
      left_in <= sent_l; right_in <= sent_r;
      @(posedge clk iff frame);
      nframe++;
      f0 = frames;
      c_adc_l <= 24'($urandom); c_adc_r <= 24'($urandom);
      wait (frames == f0 + 1);
      if (n > 1) begin
        checks += 2;
        if (c_dac_l !== sent_l || c_dac_r !== sent_r) begin
          failures++; $display("FAIL frame %0d: codec got %h/%h, sent %h/%h", n, c_dac_l, c_dac_r, sent_l, sent_r);
        end
      end
    end
    // ADC path: hold a pattern for two frames and compare
    c_adc_l <= 24'hA5C3E1; c_adc_r <= 24'h0F1E2D;
    repeat (3) @(posedge clk iff frame);
    repeat (2000) @(posedge clk);
    checks += 2;
    if (left_out !== 24'hA5C3E1 || right_out !== 24'h0F1E2D) begin
      failures++; $display("FAIL ADC words %h/%h", left_out, right_out);
    end
    checks++;
    if (nframe != 60) begin failures++; $display("FAIL frame pulses %0d", nframe); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
