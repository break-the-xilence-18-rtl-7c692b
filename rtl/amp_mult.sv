// amp_mult: fixed-point amplitude control.
// Multiplies a signed 24-bit sample by an unsigned 18-bit gain in Q0.18
// (0 .. just under 1.0) and keeps the high bits of the product, so the
// result is x*g/2^18 rounded toward minus infinity. In a note bank the gain
// is the amplitude envelope; the tremolo uses it with its LFO gain.
// Timing: `y` is registered on `en`, one clock of latency.
module amp_mult
  import synth_pkg::*;
#(
  parameter int unsigned W   = SAMPLE_W,
  parameter int unsigned G_W = ENV_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic signed [W-1:0] x,
  input  logic [G_W-1:0]      g,
  output logic signed [W-1:0] y
);
  logic signed [W+G_W:0] prod;
  assign prod = x * signed'({1'b0, g});

  always_ff @(posedge clk) begin
    if (rst)     y <= '0;
    else if (en) y <= W'(prod >>> G_W);
  end
endmodule
