// biquad_df1: second-order IIR filter in direct form 1.
//   y[n] = b0 x[n] + b1 x[n-1] + b2 x[n-2] - a1 y[n-1] - a2 y[n-2]
// Two delay registers hold past inputs and two hold past outputs, as in the
// direct-form-1 structure the document uses; coefficients are signed fixed
// point with CF fraction bits (from lpf_coeff). The five products are summed
// at full width, shifted right by CF (rounding toward minus infinity) and
// saturated to the W-bit output; the saturated value is what is fed back.
// Saturation and the rounding rule are this design's choices.
// Timing: on each `en` the filter takes `x` and `y` shows the new output one
// clock later; the coefficients may change between samples.
module biquad_df1
  import synth_pkg::*;
#(
  parameter int unsigned W   = SAMPLE_W,
  parameter int unsigned CF  = 30,
  parameter int unsigned C_W = 34
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  en,
  input  logic signed [W-1:0]   x,
  input  logic signed [C_W-1:0] b0,
  input  logic signed [C_W-1:0] b1,
  input  logic signed [C_W-1:0] b2,
  input  logic signed [C_W-1:0] a1,
  input  logic signed [C_W-1:0] a2,
  output logic signed [W-1:0]   y,
  output logic                  sat
);
  localparam int unsigned AW = W + C_W + 3;
  localparam logic signed [AW-1:0] YMAX = AW'((2 ** (W - 1)) - 1);
  localparam logic signed [AW-1:0] YMIN = -AW'(2 ** (W - 1));

  logic signed [W-1:0]  x1, x2, y1, y2;
  logic signed [AW-1:0] acc, acc_sh;

  always_comb begin
    acc = AW'(b0 * x) + AW'(b1 * x1) + AW'(b2 * x2) - AW'(a1 * y1) - AW'(a2 * y2);
    acc_sh = acc >>> CF;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      {x1, x2, y1, y2} <= '0;
      sat <= 1'b0;
    end else if (en) begin
      x1 <= x;
      x2 <= x1;
      y2 <= y1;
      if (acc_sh > YMAX) begin
        y1 <= W'(YMAX); sat <= 1'b1;
      end else if (acc_sh < YMIN) begin
        y1 <= W'(YMIN); sat <= 1'b1;
      end else begin
        y1 <= W'(acc_sh); sat <= 1'b0;
      end
    end
  end
  assign y = y1;
endmodule
