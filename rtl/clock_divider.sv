// clock_divider: clock-enable generator.
// Counts cycles in which `en` is high and raises `tick` for one cycle every
// DIV of them; `sq` toggles on every tick, giving a square wave of period
// 2*DIV enabled cycles. The whole design runs in the single 48 MHz clock
// domain, and the slower rates it needs (24 MHz codec master clock, 4.8 MHz
// arithmetic rate, 600 kHz sample rate, 100 kHz I2C, 100 Hz channel scan) are
// made by chaining these enables rather than by deriving new clocks.
// Timing: tick is registered and follows the DIV-th enabled cycle by one clock.
module clock_divider #(
  parameter int unsigned DIV = 2
) (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic tick,
  output logic sq
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
      sq   <= 1'b0;
    end else begin
      tick <= 1'b0;
      if (en) begin
        if (cnt == CW'(DIV - 1)) begin
          cnt  <= '0;
          tick <= 1'b1;
          sq   <= ~sq;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end
endmodule
