// i2s_codec_model: behavioural model of the audio codec's serial port when
// the codec is clock master. It generates BCLK (period 2*BCLK_HALF) and
// LRCLK (SLOT bit clocks per channel, low = left), shifts adc_left/right
// out MSB first one BCLK after each LRCLK edge (changing data on falling
// edges), and samples the DAC line on rising edges, collecting the first W
// bits of each slot into dac_left / dac_right. `frames` counts complete
// stereo frames received.
module i2s_codec_model #(
  parameter int  W    = 24,
  parameter int  SLOT = 32,
  parameter time BCLK_HALF = 80ns
) (
  output logic         bclk,
  output logic         lrclk,
  output logic         adc_sdata,
  input  logic         dac_sdata,
  input  logic [W-1:0] adc_left,
  input  logic [W-1:0] adc_right,
  output logic [W-1:0] dac_left,
  output logic [W-1:0] dac_right,
  output int           frames
);
  int bitpos;             // bit clock index within the slot, 0 = LRCLK edge
  logic [W-1:0] rx;
  logic [SLOT-1:0] tx;

  initial begin
    bclk = 1; lrclk = 1; adc_sdata = 0; bitpos = SLOT - 1;
    dac_left = 0; dac_right = 0; frames = 0; rx = 0; tx = 0;
    forever begin
      #(BCLK_HALF);
      bclk = 0;
      // falling edge: advance slot position, change LRCLK and data
      bitpos = (bitpos + 1) % SLOT;
      if (bitpos == 0) begin
        lrclk = ~lrclk;
        tx = {(lrclk ? adc_right : adc_left), {(SLOT - W){1'b0}}};
        adc_sdata = 0;                  // delay bit
      end else begin
        adc_sdata = tx[SLOT - 1];
        tx = tx << 1;
      end
      #(BCLK_HALF);
      bclk = 1;
      // rising edge: data bits are bitpos 1..W
      if (bitpos >= 1 && bitpos <= W) rx = {rx[W-2:0], dac_sdata};
      if (bitpos == W) begin
        if (lrclk) begin dac_right = rx; frames++; end
        else dac_left = rx;
      end
    end
  end
endmodule
