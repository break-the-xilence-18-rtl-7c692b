// tb_biquad_df1: feeds random and step inputs through the filter with
// low-pass coefficient sets (computed in the testbench in double precision
// from the same design formulas, then quantised) and compares every output
// with a 64-bit integer model of the direct-form-1 equation. Also checks
// the unity DC gain of the low-pass after settling and output saturation.
module tb_biquad_df1;
  logic clk = 0, rst = 1, en = 0;
  logic signed [23:0] x = 0, y;
  logic signed [33:0] b0, b1, b2, a1, a2;
  logic sat;
  int checks = 0, failures = 0, sats = 0;
  always #5 clk = ~clk;

  biquad_df1 dut (.clk(clk), .rst(rst), .en(en), .x(x), .b0(b0), .b1(b1), .b2(b2),
    .a1(a1), .a2(a2), .y(y), .sat(sat));

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint mx1, mx2, my1, my2;
  task automatic set_k(input real kk);
    real p;
    p = 1.0 / (1.0 + kk / 4.0 + kk * kk);
    b0 = 34'($rtoi(kk * kk * p * 1073741824.0));
    b1 = 34'(2 * longint'(b0));
    b2 = b0;
    a1 = 34'($rtoi(2.0 * (kk * kk - 1.0) * p * 1073741824.0));
    a2 = 34'($rtoi((1.0 - kk / 4.0 + kk * kk) * p * 1073741824.0));
  endtask

  task automatic sample(input logic signed [23:0] xin);
    longint acc, yy;
    x <= xin; en <= 1; @(posedge clk); en <= 0; #1;
    acc = longint'(b0) * longint'(xin) + longint'(b1) * mx1 + longint'(b2) * mx2
        - longint'(a1) * my1 - longint'(a2) * my2;
    yy = acc >>> 30;
    if (yy > 8388607) yy = 8388607;
    if (yy < -8388608) yy = -8388608;
    mx2 = mx1; mx1 = longint'(xin); my2 = my1; my1 = yy;
    checks++;
    if (longint'(y) != yy) begin
      failures++; if (failures < 10) $display("FAIL y=%0d expected %0d", y, yy);
    end
    if (sat) sats++;
    @(posedge clk);
  endtask

  initial begin
    mx1 = 0; mx2 = 0; my1 = 0; my2 = 0;
    set_k(0.05);
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 2000; i++) sample(24'($signed(24'($urandom)) >>> 2));
    // Step response: DC gain of the low-pass is one
    for (int i = 0; i < 3000; i++) sample(24'sd1000000);
    checks++;
    if (y < 999000 || y > 1001000) begin failures++; $display("FAIL DC gain: y=%0d for x=1000000", y); end
    set_k(0.3);
    for (int i = 0; i < 1000; i++) sample((i % 40) < 20 ? 24'sd4000000 : -24'sd4000000);
    // Resonant peak (Q=4) with a full-scale square near cutoff must saturate
    set_k(0.25);
    for (int i = 0; i < 1000; i++) sample((i % 12) < 6 ? 24'sd8000000 : -24'sd8000000);
    checks++;
    if (sats == 0) begin failures++; $display("FAIL saturation never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
