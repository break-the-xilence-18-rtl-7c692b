// tb_tremolo: with rate 0 the sample passes at full gain; with a rate set,
// every output is compared with a testbench model of the triangle LFO
// (gain between one half and full scale), and the modulation must span
// that range over an LFO period.
module tb_tremolo;
  logic clk = 0, rst = 1, en = 0;
  logic [11:0] rate = 0;
  logic signed [23:0] x = 0, y;
  logic active;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  tremolo dut (.clk(clk), .rst(rst), .en(en), .rate(rate), .x(x), .y(y), .active(active));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int unsigned ph;
  task automatic smp(input logic signed [23:0] xin);
    longint g, tv, e;
    x <= xin; en <= 1; @(posedge clk); en <= 0; #1;
    if (rate == 0) begin g = 262143; ph = 0; end
    else begin
      tv = (ph >> 23) ? ((~ph >> 6) & 17'h1FFFF) : ((ph >> 6) & 17'h1FFFF);
      g = 262143 - tv;
      ph = (ph + rate) & 24'hFFFFFF;
    end
    e = (longint'(xin) * g) >>> 18;
    checks++;
    if (longint'(y) != e) begin failures++; if (failures < 10) $display("FAIL y=%0d expected %0d", y, e); end
  endtask

  initial begin
    int ymin, ymax;
    ph = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 100; i++) smp(24'($urandom));
    checks++;
    if (active) begin failures++; $display("FAIL active with rate 0"); end
    rate <= 12'd2048;   // period 8192 samples
    @(posedge clk);
    ymin = 1 << 30; ymax = 0;
    for (int i = 0; i < 9000; i++) begin
      smp(24'sd4000000);
      if (y < ymin) ymin = y;
      if (y > ymax) ymax = y;
    end
    checks++;
    if (ymax < 3990000 || ymin > 2010000 || ymin < 1990000) begin
      failures++; $display("FAIL modulation range %0d..%0d", ymin, ymax);
    end
    rate <= 12'd0;
    @(posedge clk);
    for (int i = 0; i < 50; i++) smp(24'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
