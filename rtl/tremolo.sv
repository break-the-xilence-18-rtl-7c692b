// tremolo: low-frequency amplitude modulation of the mixed signal.
// A 24-bit phase accumulator advances by the 12-bit `rate` knob reading on
// each sample strobe and is folded into a triangle; the gain then swings
// between full scale and one half (depth 0.5) and is applied by amp_mult.
// A rate of zero turns the effect off: the phase is cleared and the gain is
// full scale. At 600 kHz sample rate one knob step is about 0.036 Hz, so the
// knob spans 0..146 Hz. The effect and its rate/off knob are the
// document's; the triangle shape, depth and rate scaling are this design's.
// Timing: y is registered, one clock after `en`.
module tremolo
  import synth_pkg::*;
#(
  parameter int unsigned PHASE_W = 24
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       en,
  input  logic [CTRL_W-1:0]          rate,
  input  logic signed [SAMPLE_W-1:0] x,
  output logic signed [SAMPLE_W-1:0] y,
  output logic                       active
);
  logic [PHASE_W-1:0] phase;
  logic [ENV_W-2:0]   tri_v;   // 0 .. 2^17-1
  logic [ENV_W-1:0]   gain;

  // Triangle from the top phase bits: rises in the first half, falls in the second
  assign tri_v  = phase[PHASE_W-1] ? ~phase[PHASE_W-2 -: ENV_W-1] : phase[PHASE_W-2 -: ENV_W-1];
  assign gain   = (rate == '0) ? {ENV_W{1'b1}} : ({ENV_W{1'b1}} - ENV_W'(tri_v));
  assign active = (rate != '0);

  always_ff @(posedge clk) begin
    if (rst)                     phase <= '0;
    else if (en && rate == '0)   phase <= '0;
    else if (en)                 phase <= phase + PHASE_W'(rate);
  end

  amp_mult #(.W(SAMPLE_W), .G_W(ENV_W)) u_mult (
    .clk(clk), .rst(rst), .en(en), .x(x), .g(gain), .y(y)
  );
endmodule
