// i2s_transceiver: serial audio link to the codec, codec as clock master.
// The codec drives BCLK and LRCLK. Rather than clocking logic from them,
// both are sampled by the 48 MHz design clock through two-flop synchronisers
// and their edges are detected (BCLK is about 3 MHz, so each half period
// spans several clocks). Framing is standard I2S: LRCLK low = left, each word
// MSB first, starting one BCLK after the LRCLK edge, W bits used of a slot.
// On a BCLK falling edge the transmitter puts out the next bit, loading the
// parallel word of the new channel when LRCLK has changed; on a rising edge
// the receiver shifts in the codec's ADC data and, after W bits, presents
// the word on left_out or right_out. `frame` pulses when the left word is
// loaded. Both words of a stereo pair are taken at that moment (the right
// word is held until its slot), so a pair always belongs to one instant.
// The oversampling scheme and 24-bit parallel stereo follow the document;
// the synchronisers and the exact framing are this design's choices.
module i2s_transceiver
  import synth_pkg::*;
#(
  parameter int unsigned W    = SAMPLE_W,
  parameter int unsigned SLOT = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         bclk,
  input  logic         lrclk,
  input  logic         sdata_in,
  output logic         sdata_out,
  input  logic [W-1:0] left_in,
  input  logic [W-1:0] right_in,
  output logic [W-1:0] left_out,
  output logic [W-1:0] right_out,
  output logic         frame
);
  logic [2:0] bclk_s, lr_s, din_s;
  logic       lr_tx;        // LRCLK as seen at the last falling edge
  logic       bfall, brise;
  logic [SLOT-1:0] tx_sh;
  logic [W-1:0]    rx_sh;
  logic [5:0]      rx_cnt;
  logic            rx_lr;
  logic [W-1:0]    right_hold;

  assign bfall = bclk_s[2] & ~bclk_s[1];
  assign brise = ~bclk_s[2] & bclk_s[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      bclk_s    <= '0;
      lr_s      <= '0;
      din_s     <= '0;
      lr_tx     <= 1'b0;
      tx_sh     <= '0;
      sdata_out <= 1'b0;
      rx_sh     <= '0;
      rx_cnt    <= '0;
      rx_lr     <= 1'b0;
      right_hold <= '0;
      left_out  <= '0;
      right_out <= '0;
      frame     <= 1'b0;
    end else begin
      bclk_s <= {bclk_s[1:0], bclk};
      lr_s   <= {lr_s[1:0], lrclk};
      din_s  <= {din_s[1:0], sdata_in};
      frame  <= 1'b0;

      if (bfall) begin
        sdata_out <= tx_sh[SLOT-1];
        lr_tx     <= lr_s[1];
        if (lr_s[1] != lr_tx) begin
          tx_sh  <= {(lr_s[1] ? right_hold : left_in), {(SLOT - W){1'b0}}};
          if (!lr_s[1]) right_hold <= right_in;
          frame  <= ~lr_s[1];
          rx_cnt <= '0;
          rx_lr  <= lr_s[1];
        end else begin
          tx_sh <= tx_sh << 1;
        end
      end

      if (brise) begin
        // Rising edge 1 after the LRCLK change is the delay bit; 2..W+1 are data
        if (rx_cnt != 6'h3f) rx_cnt <= rx_cnt + 1'b1;
        if (rx_cnt >= 1 && rx_cnt <= 6'(W)) rx_sh <= {rx_sh[W-2:0], din_s[1]};
        if (rx_cnt == 6'(W)) begin
          if (rx_lr) right_out <= {rx_sh[W-2:0], din_s[1]};
          else       left_out  <= {rx_sh[W-2:0], din_s[1]};
        end
      end
    end
  end
endmodule
