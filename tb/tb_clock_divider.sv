// tb_clock_divider: checks the enable divider. With DIV=5 and `en` high on
// every other clock, a tick must come every 10 clocks, exactly once per
// 5 enabled cycles, and `sq` must toggle on each tick.
module tb_clock_divider;
  logic clk = 0, rst = 1, en = 0;
  logic tick, sq;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  clock_divider #(.DIV(5)) dut (.clk(clk), .rst(rst), .en(en), .tick(tick), .sq(sq));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int en_cnt, ticks, last_tick, cyc;
    logic sq_prev;
    repeat (3) @(posedge clk);
    rst <= 0;
    en_cnt = 0; ticks = 0; last_tick = -1; cyc = 0; sq_prev = 0;
    for (cyc = 0; cyc < 2000; cyc++) begin
      en <= (cyc % 2 == 0);
      @(posedge clk);
      if (en) en_cnt++;
      #1;
      if (tick) begin
        ticks++;
        checks++;
        if (en_cnt != ticks * 5) begin
          failures++; $display("FAIL tick after %0d enabled cycles, expected %0d", en_cnt, ticks * 5);
        end
        if (last_tick >= 0) begin
          checks++;
          if (cyc - last_tick != 10) begin failures++; $display("FAIL tick spacing %0d", cyc - last_tick); end
        end
        last_tick = cyc;
        checks++;
        if (sq == sq_prev) begin failures++; $display("FAIL sq did not toggle"); end
        sq_prev = sq;
      end
    end
    checks++;
    if (ticks != 200) begin failures++; $display("FAIL %0d ticks, expected 200", ticks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
