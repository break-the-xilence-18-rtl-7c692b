// ad7991_model: behavioural model of the four-channel 12-bit I2C ADC on a
// PmodAD2, enough for a bus master to be tested. It answers its 7-bit
// address, takes a configuration byte whose bits 7..4 select the channel,
// and on a read returns two bytes: 0 0 CH1 CH0 D11..D8, then D7..D0, where
// D is chan_val[selected channel]. The model drives SDA open-drain through
// s_oe; the testbench forms the line as ~(master_oe | s_oe).
module ad7991_model #(
  parameter logic [6:0] ADDR = 7'h28
) (
  input  logic        scl,
  input  logic        sda,
  output logic        s_oe,
  input  logic [11:0] chan_val [4],
  output int          reads,
  output logic [7:0]  cfg
);
  typedef enum {M_IDLE, M_ADDR, M_WRITE, M_READ} mode_t;
  mode_t      mode = M_IDLE;
  int         bitcnt = 0;
  logic [7:0] shreg = 0, txd = 0;
  logic       ack_phase = 0, matched = 0, rw = 0, mack = 0;
  int         byte_no = 0;
  logic [1:0] sel;

  initial begin s_oe = 0; reads = 0; cfg = 8'h10; end

  always_comb begin
    sel = 2'd0;
    for (int i = 3; i >= 0; i--) if (cfg[4 + i]) sel = 2'(i);
  end

  always @(negedge sda) if (scl) begin mode = M_ADDR; bitcnt = 0; ack_phase = 0; s_oe = 0; end
  always @(posedge sda) if (scl) begin mode = M_IDLE; s_oe = 0; end

  always @(posedge scl) begin
    if ((mode == M_ADDR || mode == M_WRITE) && bitcnt < 8 && !ack_phase) begin
      shreg = {shreg[6:0], sda}; bitcnt++;
    end else if (mode == M_READ) begin
      if (bitcnt < 8) bitcnt++;
      else begin mack = !sda; bitcnt++; end
    end
  end

  always @(negedge scl) begin
    case (mode)
      M_ADDR, M_WRITE: begin
        if (ack_phase) begin
          ack_phase = 0; s_oe = 0; bitcnt = 0;
          if (mode == M_ADDR) begin
            if (matched && rw) begin
              mode = M_READ; byte_no = 0;
              txd = {2'b00, sel, chan_val[sel][11:8]};
              s_oe = ~txd[7];
            end else if (matched) mode = M_WRITE;
            else mode = M_IDLE;
          end
        end else if (bitcnt == 8) begin
          if (mode == M_ADDR) begin
            matched = (shreg[7:1] == ADDR); rw = shreg[0];
            s_oe = matched;
          end else begin
            cfg = shreg; s_oe = 1;
          end
          ack_phase = 1;
        end
      end
      M_READ: begin
        if (bitcnt < 8) s_oe = ~txd[7 - bitcnt];
        else if (bitcnt == 8) s_oe = 0;
        else begin
          if (mack) begin
            byte_no++; txd = chan_val[sel][7:0]; bitcnt = 0; s_oe = ~txd[7];
          end else begin
            mode = M_IDLE; s_oe = 0; reads++;
          end
        end
      end
      default: ;
    endcase
  end
endmodule
