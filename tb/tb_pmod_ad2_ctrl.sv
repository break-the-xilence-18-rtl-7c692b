// tb_pmod_ad2_ctrl: one controller talks to an ADC model at its address and
// a second controller to a model at another address (so every byte goes
// unacknowledged). Checks the readings of all four channels, their refresh
// after the values change, the SCL period (four I2C_QDIV clocks), one
// exchange per scan tick, and that missing acknowledges are counted.
module tb_pmod_ad2_ctrl;
  localparam int QDIV = 4, SDIV = 3000;
  logic clk = 0, rst = 1;
  logic scl, m_oe, s_oe, sda;
  logic scl2, m_oe2, s_oe2, sda2;
  logic [11:0] value [4], value2 [4];
  logic [7:0] nack, nack2;
  logic done, done2;
  logic [11:0] cv [4];
  logic [7:0] cfg, cfg2;
  int reads, reads2;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  assign sda  = ~(m_oe | s_oe);
  assign sda2 = ~(m_oe2 | s_oe2);

  pmod_ad2_ctrl #(.I2C_QDIV(QDIV), .SCAN_DIV(SDIV)) dut (.clk(clk), .rst(rst), .scl(scl),
    .sda_oe(m_oe), .sda_i(sda), .value(value), .nack_cnt(nack), .done_evt(done));
  ad7991_model #(.ADDR(7'h28)) adc (.scl(scl), .sda(sda), .s_oe(s_oe), .chan_val(cv), .reads(reads), .cfg(cfg));

  pmod_ad2_ctrl #(.I2C_QDIV(QDIV), .SCAN_DIV(SDIV)) dut2 (.clk(clk), .rst(rst), .scl(scl2),
    .sda_oe(m_oe2), .sda_i(sda2), .value(value2), .nack_cnt(nack2), .done_evt(done2));
  ad7991_model #(.ADDR(7'h29)) adc2 (.scl(scl2), .sda(sda2), .s_oe(s_oe2), .chan_val(cv), .reads(reads2), .cfg(cfg2));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // SCL period; the stop / start pair between the write and the read
  // of each exchange leaves one longer interval
  int last_rise = -1, cyc = 0, bad_period = 0, periods = 0;
  logic scl_d = 1;
  always @(posedge clk) begin
    cyc++;
    if (scl && !scl_d) begin
      if (last_rise >= 0 && cyc - last_rise < 100) begin
        periods++;
        if (cyc - last_rise != 4 * QDIV) bad_period++;
      end
      last_rise = cyc;
    end
    scl_d <= scl;
  end

  initial begin
    int dones;
    cv[0] = 12'h123; cv[1] = 12'hABC; cv[2] = 12'h005; cv[3] = 12'hFFF;
    repeat (3) @(posedge clk);
    rst <= 0;
    checks++;
    if (value[0] !== 12'h800) begin failures++; $display("FAIL reset value %h", value[0]); end
    dones = 0;
    while (dones < 4) begin @(posedge clk); if (done) dones++; end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (value[c] !== cv[c]) begin failures++; $display("FAIL ch%0d = %h expected %h", c, value[c], cv[c]); end
    end
    checks++;
    if (reads != 4) begin failures++; $display("FAIL %0d reads after 4 scan ticks", reads); end
    cv[0] = 12'h777; cv[1] = 12'h001; cv[2] = 12'h800; cv[3] = 12'h3C3;
    dones = 0;
    while (dones < 4) begin @(posedge clk); if (done) dones++; end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (value[c] !== cv[c]) begin failures++; $display("FAIL refresh ch%0d = %h expected %h", c, value[c], cv[c]); end
    end
    checks++;
    if (nack != 0) begin failures++; $display("FAIL %0d nacks from a present device", nack); end
    checks++;
    if (nack2 == 0) begin failures++; $display("FAIL absent device: no nack counted"); end
    checks++;
    if (periods < 50 || bad_period > 8) begin failures++; $display("FAIL SCL periods %0d bad %0d", periods, bad_period); end
    checks++;
    if (cyc > 9 * SDIV) begin failures++; $display("FAIL 8 readings took %0d cycles", cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
