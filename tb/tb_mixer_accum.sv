// tb_mixer_accum: random bank samples; the sum must appear saturated to 24
// bits exactly NUM_BANKS+1 clocks after in_valid, with `sat` on clipping.
module tb_mixer_accum;
  localparam int NB = 5;
  logic clk = 0, rst = 1, in_valid = 0;
  logic signed [23:0] in_s [NB];
  logic signed [23:0] out_s;
  logic out_valid, sat;
  int checks = 0, failures = 0, sats = 0;
  always #5 clk = ~clk;

  mixer_accum #(.NUM_BANKS(NB)) dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in_s(in_s),
    .out_s(out_s), .out_valid(out_valid), .sat(sat));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sum;
    int lat;
    for (int i = 0; i < NB; i++) in_s[i] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int r = 0; r < 1000; r++) begin
      sum = 0;
      for (int i = 0; i < NB; i++) begin
        in_s[i] <= (r % 3 == 0) ? 24'($urandom) : 24'($signed(24'($urandom)) >>> 4);
      end
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      for (int i = 0; i < NB; i++) sum += longint'(in_s[i]);
      // Inputs change while the sum is in progress: it must use the captured ones
      for (int i = 0; i < NB; i++) in_s[i] <= 24'($urandom);
      lat = 0;
      do begin @(posedge clk); lat++; #1; end while (!out_valid && lat < 50);
      checks++;
      if (lat != NB + 1) begin failures++; $display("FAIL latency %0d", lat); end
      if (sum > 8388607) sum = 8388607;
      if (sum < -8388608) sum = -8388608;
      checks++;
      if (longint'(out_s) != sum) begin failures++; if (failures < 10) $display("FAIL sum %0d expected %0d", out_s, sum); end
      if (sat) sats++;
      checks++;
      if (sat != (sum == 8388607 || sum == -8388608)) begin failures++; $display("FAIL sat flag"); end
    end
    checks++;
    if (sats == 0) begin failures++; $display("FAIL saturation never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
