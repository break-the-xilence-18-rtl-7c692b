// tb_note_router: sends note-on and note-off words to every bank and to an
// out-of-range bank, and checks the per-bank registers and event pulses.
module tb_note_router;
  import synth_pkg::*;
  localparam int NB = 4;
  logic clk = 0, rst = 1, host_valid = 0;
  logic [31:0] host_word = 0;
  logic [31:0] bank_word [NB];
  logic on_evt, off_evt;
  logic [31:0] expect_w [NB];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  note_router #(.NUM_BANKS(NB)) dut (.clk(clk), .rst(rst), .host_valid(host_valid),
    .host_word(host_word), .bank_word(bank_word), .note_on_evt(on_evt), .note_off_evt(off_evt));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(input logic on, input int bank, input logic [23:0] incr);
    host_word  <= {on, 7'(bank), incr};
    host_valid <= 1;
    @(posedge clk);
    host_valid <= 0;
    #1;
    checks++;
    if (bank < NB) begin
      if (on_evt !== on || off_evt !== !on) begin failures++; $display("FAIL event pulses on=%0b off=%0b", on_evt, off_evt); end
      expect_w[bank] = {on, 7'(bank), incr};
    end else if (on_evt || off_evt) begin
      failures++; $display("FAIL event for out-of-range bank %0d", bank);
    end
    for (int i = 0; i < NB; i++) begin
      checks++;
      if (bank_word[i] !== expect_w[i]) begin
        failures++; $display("FAIL bank %0d word %h expected %h", i, bank_word[i], expect_w[i]);
      end
    end
    @(posedge clk); #1;
    checks++;
    if (on_evt || off_evt) begin failures++; $display("FAIL event pulse longer than one clock"); end
  endtask

  initial begin
    for (int i = 0; i < NB; i++) expect_w[i] = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int r = 0; r < 50; r++) begin
      int b;
      b = $urandom_range(0, NB + 2);
      send($urandom_range(0, 1), b, 24'($urandom));
    end
    for (int i = 0; i < NB; i++) send(1'b0, i, 24'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
