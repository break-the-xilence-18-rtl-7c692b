// pmod_ad2_ctrl: reader for one PmodAD2 (four-channel 12-bit I2C ADC).
// The parameter control unit's knobs and sliders are potentiometers wired to
// PmodAD2 modules. Every scan tick (100 Hz) this controller runs one I2C
// exchange with the module's AD7991 converter at 100 kHz SCL: it writes the
// configuration byte that selects the next channel, then reads the two
// result bytes (0 0 CH1 CH0 D11..D8, D7..D0) and stores the 12-bit value in
// value[channel]. The four channels are visited in turn, so each reading is
// refreshed every 40 ms. Missing acknowledges are counted in nack_cnt and the
// exchange goes on. The 100 kHz / 100 Hz rates and the four channels per
// module follow the document; the converter's byte protocol and address come
// from the converter's data sheet; mid-scale reset values are this design's.
// Bus: scl is driven push-pull (single master), sda is open drain: sda_oe=1
// pulls the line low, sda_i reads it. Each bit takes four I2C_QDIV periods.
module pmod_ad2_ctrl
  import synth_pkg::*;
#(
  parameter int unsigned I2C_QDIV  = 120,     // 48 MHz / (4 * 100 kHz)
  parameter int unsigned SCAN_DIV  = 480000,  // 48 MHz / 100 Hz
  parameter logic [6:0]  DEV_ADDR  = 7'h28,
  parameter logic [CTRL_W-1:0] RESET_VAL = 12'h800
) (
  input  logic              clk,
  input  logic              rst,
  output logic              scl,
  output logic              sda_oe,
  input  logic              sda_i,
  output logic [CTRL_W-1:0] value [4],
  output logic [7:0]        nack_cnt,
  output logic              done_evt   // pulse: one reading stored
);
  typedef enum logic [1:0] {OP_START, OP_TX, OP_RX, OP_STOP} op_kind_t;

  logic qtick, stick, unused_q, unused_s;
  clock_divider #(.DIV(I2C_QDIV)) u_qdiv (.clk(clk), .rst(rst), .en(1'b1), .tick(qtick), .sq(unused_q));
  clock_divider #(.DIV(SCAN_DIV)) u_sdiv (.clk(clk), .rst(rst), .en(1'b1), .tick(stick), .sq(unused_s));

  logic       busy, pending;
  logic [3:0] op_i;
  logic [3:0] bit_i;
  logic [1:0] q;
  logic [1:0] ch;
  logic [7:0] rxb, byte1;

  // The exchange as a fixed list of bus operations
  op_kind_t   kind;
  logic [7:0] tx_byte;
  logic       rx_ack;
  always_comb begin
    kind    = OP_STOP;
    tx_byte = 8'h00;
    rx_ack  = 1'b0;
    unique case (op_i)
      4'd0: kind = OP_START;
      4'd1: begin kind = OP_TX; tx_byte = {DEV_ADDR, 1'b0}; end
      4'd2: begin kind = OP_TX; tx_byte = 8'(8'h10 << ch); end  // select one channel
      4'd3: kind = OP_STOP;
      4'd4: kind = OP_START;
      4'd5: begin kind = OP_TX; tx_byte = {DEV_ADDR, 1'b1}; end
      4'd6: begin kind = OP_RX; rx_ack = 1'b1; end
      4'd7: begin kind = OP_RX; rx_ack = 1'b0; end
      default: kind = OP_STOP;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      scl      <= 1'b1;
      sda_oe   <= 1'b0;
      busy     <= 1'b0;
      pending  <= 1'b0;
      op_i     <= '0;
      bit_i    <= '0;
      q        <= '0;
      ch       <= '0;
      rxb      <= '0;
      byte1    <= '0;
      nack_cnt <= '0;
      done_evt <= 1'b0;
      for (int i = 0; i < 4; i++) value[i] <= RESET_VAL;
    end else begin
      done_evt <= 1'b0;
      if (stick) pending <= 1'b1;
      if (qtick) begin
        if (!busy) begin
          if (pending) begin
            busy    <= 1'b1;
            pending <= 1'b0;
            op_i    <= '0;
            bit_i   <= '0;
            q       <= '0;
          end
        end else begin
          q <= q + 1'b1;
          unique case (kind)
            OP_START: unique case (q)
              2'd0: begin scl <= 1'b1; sda_oe <= 1'b0; end
              2'd1: sda_oe <= 1'b1;           // SDA falls while SCL high
              2'd2: scl <= 1'b0;
              2'd3: begin op_i <= op_i + 1'b1; bit_i <= '0; end
            endcase
            OP_TX: unique case (q)
              2'd0: begin
                scl    <= 1'b0;
                sda_oe <= (bit_i < 8) ? ~tx_byte[3'(7 - bit_i)] : 1'b0;
              end
              2'd1: scl <= 1'b1;
              2'd2: if (bit_i == 8 && sda_i) nack_cnt <= nack_cnt + 1'b1;
              2'd3: begin
                scl <= 1'b0;
                if (bit_i == 8) begin op_i <= op_i + 1'b1; bit_i <= '0; end
                else bit_i <= bit_i + 1'b1;
              end
            endcase
            OP_RX: unique case (q)
              2'd0: begin
                scl    <= 1'b0;
                sda_oe <= (bit_i == 8) ? rx_ack : 1'b0;
              end
              2'd1: scl <= 1'b1;
              2'd2: if (bit_i < 8) rxb <= {rxb[6:0], sda_i};
              2'd3: begin
                scl <= 1'b0;
                if (bit_i == 8) begin
                  op_i  <= op_i + 1'b1;
                  bit_i <= '0;
                  if (rx_ack) byte1 <= rxb;
                end else bit_i <= bit_i + 1'b1;
              end
            endcase
            OP_STOP: unique case (q)
              2'd0: begin scl <= 1'b0; sda_oe <= 1'b1; end
              2'd1: scl <= 1'b1;
              2'd2: sda_oe <= 1'b0;           // SDA rises while SCL high
              2'd3: begin
                if (op_i == 4'd3) op_i <= op_i + 1'b1;
                else begin
                  // End of the read: store the result, move to the next channel
                  busy      <= 1'b0;
                  value[ch] <= {byte1[3:0], rxb};
                  ch        <= ch + 1'b1;
                  done_evt  <= 1'b1;
                end
              end
            endcase
          endcase
        end
      end
    end
  end
endmodule
