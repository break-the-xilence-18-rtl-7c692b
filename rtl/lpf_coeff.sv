// lpf_coeff: coefficient calculator of the resonant low-pass filter.
// The filter is the bilinear-style digital version of the analog second-order
// low-pass H(s) = w0^2 / (s^2 + (w0/Q) s + w0^2), with K = tan(pi f / Fs)
// approximated by pi f / Fs and supplied directly (here by the filter
// envelope) as an unsigned Q0.18 number, and Q = 4 (K/Q is a right shift by
// Q_SHIFT). With p = 1 / (1 + K/Q + K^2):
//   b0 = K^2 p,  b1 = 2 b0,  b2 = b0,  a1 = 2 (K^2 - 1) p,  a2 = (1 - K/Q + K^2) p.
// These formulas are the document's. The arithmetic here is fixed point:
// all coefficients are signed with CF = 30 fraction bits (C_W = 34 bits,
// range -8..8), which is this design's choice (the original used floating
// point). A three-stage pipeline (square, reciprocal, products) advances on
// each arithmetic enable `en` (4.8 MHz in the synthesizer, which gives the
// wide divider ten clocks); all five outputs change on the same clock.
// `valid` is high once three enables have passed with k unchanged, and the
// coefficients then belong to the current k.
module lpf_coeff
  import synth_pkg::*;
#(
  parameter int unsigned K_W     = ENV_W,
  parameter int unsigned Q_SHIFT = 2,
  parameter int unsigned CF      = 30,
  parameter int unsigned C_W     = 34
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  en,
  input  logic [K_W-1:0]        k,
  output logic signed [C_W-1:0] b0,
  output logic signed [C_W-1:0] b1,
  output logic signed [C_W-1:0] b2,
  output logic signed [C_W-1:0] a1,
  output logic signed [C_W-1:0] a2,
  output logic                  valid
);
  localparam int unsigned IW = CF + 4;                 // internal unsigned width
  localparam logic [IW-1:0] ONE = IW'(1) << CF;

  // Stage 1: K^2 and K/Q in CF fraction bits
  logic [IW-1:0] k2_s1, kq_s1, den_s1;
  // Stage 2: p = 1/den
  logic [IW-1:0] k2_s2, kq_s2, p_s2;
  logic [2:0]    age;
  logic [K_W-1:0] k_d;

  logic [2*K_W-1:0] ksq;
  logic [IW-1:0]    k_cf;
  assign ksq  = k * k;
  assign k_cf = IW'(k) << (CF - K_W);

  logic [2*CF+1:0] recip;
  assign recip = ((2*CF+2)'(1) << (2*CF)) / (2*CF+2)'(den_s1);

  // Stage 3 products
  logic [2*IW-1:0]        m_b0, m_a2;
  logic signed [2*IW:0]   m_a1;
  logic [IW-1:0]          n_a2;    // 1 - K/Q + K^2, always positive
  logic signed [IW:0]     n_a1;    // K^2 - 1
  assign n_a2 = ONE - kq_s2 + k2_s2;
  assign n_a1 = signed'({1'b0, k2_s2}) - signed'({1'b0, ONE});
  assign m_b0 = (2*IW)'(k2_s2) * (2*IW)'(p_s2);
  assign m_a2 = (2*IW)'(n_a2) * (2*IW)'(p_s2);
  assign m_a1 = (2*IW+1)'(n_a1) * (2*IW+1)'(signed'({1'b0, p_s2}));

  always_ff @(posedge clk) begin
    if (rst) begin
      {k2_s1, kq_s1, den_s1, k2_s2, kq_s2, p_s2} <= '0;
      {b0, b1, b2, a1, a2} <= '0;
      age   <= '0;
      k_d   <= '0;
      valid <= 1'b0;
    end else if (en) begin
      k2_s1  <= IW'(ksq >> (2*K_W - CF));
      kq_s1  <= k_cf >> Q_SHIFT;
      den_s1 <= ONE + (k_cf >> Q_SHIFT) + IW'(ksq >> (2*K_W - CF));
      k2_s2  <= k2_s1;
      kq_s2  <= kq_s1;
      p_s2   <= IW'(recip);
      b0 <= C_W'(m_b0 >> CF);
      b1 <= C_W'(m_b0 >> (CF - 1));
      b2 <= C_W'(m_b0 >> CF);
      a1 <= C_W'(m_a1 >>> (CF - 1));
      a2 <= C_W'(m_a2 >> CF);
      k_d <= k;
      if (k != k_d)      age <= '0;
      else if (age != 3) age <= age + 1'b1;
      valid <= (k == k_d) && (age >= 2);
    end
  end
endmodule
