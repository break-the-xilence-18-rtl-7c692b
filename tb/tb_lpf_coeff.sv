// tb_lpf_coeff: compares the fixed-point coefficients with the low-pass
// design formulas evaluated in double precision, for K across its range,
// and checks the latency of three arithmetic enables and the valid flag.
module tb_lpf_coeff;
  logic clk = 0, rst = 1, en = 0;
  logic [17:0] k = 0;
  logic signed [33:0] b0, b1, b2, a1, a2;
  logic valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  // Arithmetic enable on every other clock
  always @(posedge clk) en <= ~en;

  lpf_coeff dut (.clk(clk), .rst(rst), .en(en), .k(k), .b0(b0), .b1(b1), .b2(b2), .a1(a1), .a2(a2), .valid(valid));


  // Waits for n clock edges at which the enable is high, judging the enable
  // by its settled value before each edge
  task automatic wait_en(input int n);
    int c;
    logic e;
    c = 0;
    #1;
    while (c < n) begin
      e = en;
      @(posedge clk);
      #1;
      if (e) c++;
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void cmp(string n, logic signed [33:0] got, real want);
    real g;
    g = real'(got) / real'(64'd1 << 30);
    checks++;
    if (g - want > 1.0e-7 || want - g > 1.0e-7) begin
      failures++;
      $display("FAIL %s = %f expected %f (k=%0d)", n, g, want, k);
    end
  endfunction

  initial begin
    real kk, p, e_b0, e_a1, e_a2;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 300; i++) begin
      if (i < 10) k <= 18'(i * 7 + 1);
      else if (i < 20) k <= 18'(1 << (i - 2));
      else k <= 18'($urandom);
      wait_en(1);
      // Latency: three arithmetic enables
      wait_en(2);
      checks++;
      if (valid) begin failures++; $display("FAIL valid raised too early"); end
      @(posedge clk); #1;
      kk = real'(k) / 262144.0;
      p = 1.0 / (1.0 + kk / 4.0 + kk * kk);
      e_b0 = kk * kk * p;
      e_a1 = 2.0 * (kk * kk - 1.0) * p;
      e_a2 = (1.0 - kk / 4.0 + kk * kk) * p;
      cmp("b0", b0, e_b0);
      cmp("b1", b1, 2.0 * e_b0);
      cmp("b2", b2, e_b0);
      cmp("a1", a1, e_a1);
      cmp("a2", a2, e_a2);
      wait_en(1);
      checks++;
      if (!valid) begin failures++; $display("FAIL valid not set"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
