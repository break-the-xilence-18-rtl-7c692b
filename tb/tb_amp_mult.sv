// tb_amp_mult: random samples and gains, result must be floor(x*g / 2^18)
// one clock after the strobe, and must hold while the strobe is low.
module tb_amp_mult;
  logic clk = 0, rst = 1, en = 0;
  logic signed [23:0] x = 0, y;
  logic [17:0] g = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  amp_mult dut (.clk(clk), .rst(rst), .en(en), .x(x), .g(g), .y(y));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint p, e;
    logic signed [23:0] hold;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 2000; i++) begin
      x <= 24'($urandom); g <= 18'($urandom);
      if (i % 7 == 0) g <= 18'h3FFFF;
      if (i % 11 == 0) x <= 24'sh800000;
      en <= 1;
      @(posedge clk);
      en <= 0;
      #1;
      p = longint'(x) * longint'({14'd0, g});
      e = p >>> 18;
      checks++;
      if (longint'(y) != e) begin
        failures++; if (failures < 10) $display("FAIL x=%0d g=%0d y=%0d expected %0d", x, g, y, e);
      end
      hold = y;
      x <= 24'($urandom);
      @(posedge clk); #1;
      checks++;
      if (y !== hold) begin failures++; $display("FAIL output changed without strobe"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
