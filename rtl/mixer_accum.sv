// mixer_accum: the adder that merges all note banks into one channel.
// Rather than an adder tree, the bank outputs are captured on `in_valid` and
// added into an accumulator one bank per clock, which keeps the hardware the
// same for any NUM_BANKS (the document's reason for this structure). The
// accumulator has log2(NUM_BANKS) guard bits; the final sum is saturated to
// W bits, with `sat` marking a clipped sum (saturation is this design's
// choice). Timing: `out_valid` pulses NUM_BANKS+1 clocks after `in_valid`;
// a new in_valid must not come sooner.
module mixer_accum
  import synth_pkg::*;
#(
  parameter int unsigned NUM_BANKS = 4,
  parameter int unsigned W         = SAMPLE_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_s [NUM_BANKS],
  output logic signed [W-1:0] out_s,
  output logic                out_valid,
  output logic                sat
);
  localparam int unsigned GW = W + $clog2(NUM_BANKS + 1);
  localparam int unsigned IW = $clog2(NUM_BANKS + 1);
  localparam logic signed [GW-1:0] SMAX = GW'((2 ** (W - 1)) - 1);
  localparam logic signed [GW-1:0] SMIN = -GW'(2 ** (W - 1));

  logic signed [W-1:0]  held [NUM_BANKS];
  logic signed [GW-1:0] acc;
  logic [IW-1:0]        idx;
  logic                 busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_BANKS; i++) held[i] <= '0;
      acc       <= '0;
      idx       <= '0;
      busy      <= 1'b0;
      out_s     <= '0;
      out_valid <= 1'b0;
      sat       <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid && !busy) begin
        held <= in_s;
        acc  <= '0;
        idx  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        if (32'(idx) == NUM_BANKS) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
          if (acc > SMAX)      begin out_s <= W'(SMAX); sat <= 1'b1; end
          else if (acc < SMIN) begin out_s <= W'(SMIN); sat <= 1'b1; end
          else                 begin out_s <= W'(acc);  sat <= 1'b0; end
        end else begin
          acc <= acc + GW'(held[idx]);
          idx <= idx + 1'b1;
        end
      end
    end
  end

  a_spacing: assert property (@(posedge clk) disable iff (rst) in_valid |-> !busy)
    else $error("mixer_accum: in_valid while a sum is in progress");
endmodule
