// tb_adsr_envelope: drives note on / note off sequences and compares the
// envelope level after every step with a reference ramp computed in the
// testbench (start + (target-start)*t/len for each phase). Also checks the
// latency of four arithmetic enables, the state sequence, a release that
// interrupts the attack, a retrigger during release and zero-length phases.
module tb_adsr_envelope;
  import synth_pkg::*;
  logic clk = 0, rst = 1, step_en = 0, gate = 0, op_en = 0;
  env_params_t prm;
  logic [17:0] level;
  env_state_t state;
  int checks = 0, failures = 0;
  int seen [5];
  always #5 clk = ~clk;
  // Arithmetic enable on every third clock
  int ecnt = 0;
  always @(posedge clk) begin op_en <= (ecnt % 3 == 0); ecnt++; end

  adsr_envelope dut (.clk(clk), .rst(rst), .step_en(step_en), .op_en(op_en), .gate(gate), .prm(prm),
    .level(level), .state(state));


  // Waits for n clock edges at which the enable is high, judging the enable
  // by its settled value before each edge
  task automatic wait_en(input int n);
    int c;
    logic e;
    c = 0;
    #1;
    while (c < n) begin
      e = op_en;
      @(posedge clk);
      #1;
      if (e) c++;
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model
  int m_state, m_t;
  longint m_start, m_level;
  function automatic longint ramp(longint s, longint tg, int t, int len);
    if (tg >= s) return s + ((tg - s) * t) / len;
    else return s - ((s - tg) * t) / len;
  endfunction
  task automatic model_step();
    case (m_state)
      0: if (gate) begin m_state = 1; m_t = 0; m_start = m_level; end
      1: if (!gate) begin m_state = 4; m_t = 0; m_start = m_level; end
         else if (m_t + 1 >= prm.attack_len) begin m_state = 2; m_t = 0; m_start = prm.peak; m_level = prm.peak; end
         else begin m_t++; m_level = ramp(m_start, prm.peak, m_t, prm.attack_len); end
      2: if (!gate) begin m_state = 4; m_t = 0; m_start = m_level; end
         else if (m_t + 1 >= prm.decay_len) begin m_state = 3; m_t = 0; m_level = prm.sustain; end
         else begin m_t++; m_level = ramp(m_start, prm.sustain, m_t, prm.decay_len); end
      3: if (!gate) begin m_state = 4; m_t = 0; m_start = m_level; end
         else m_level = prm.sustain;
      4: if (gate) begin m_state = 1; m_t = 0; m_start = m_level; end
         else if (m_t + 1 >= prm.release_len) begin m_state = 0; m_t = 0; m_level = 0; end
         else begin m_t++; m_level = ramp(m_start, 0, m_t, prm.release_len); end
      default: ;
    endcase
  endtask

  task automatic step();
    logic [17:0] lvl_prev;
    lvl_prev = level;
    step_en <= 1; @(posedge clk); step_en <= 0;
    model_step();
    // The level must not move before the fourth arithmetic enable
    wait_en(3);
    if (m_level != longint'(lvl_prev) && (m_state == 1 || m_state == 2 || m_state == 4) && m_t != 0) begin
      checks++;
      if (level !== lvl_prev) begin failures++; $display("FAIL level changed before the arithmetic finished"); end
    end
    wait_en(1);
    checks++;
    if (longint'(level) != m_level || int'(state) != m_state) begin
      failures++;
      if (failures < 15) $display("FAIL level %0d state %0d, expected %0d state %0d", level, state, m_level, m_state);
    end
    seen[int'(state)]++;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    m_state = 0; m_t = 0; m_start = 0; m_level = 0;
    prm.attack_len = 20; prm.decay_len = 13; prm.release_len = 27;
    prm.peak = 18'h3F000; prm.sustain = 18'h12345;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (3) step();
    gate <= 1;
    repeat (60) step();        // full attack, decay and sustain
    prm.sustain <= 18'h20000;  // sustain follows the slider
    repeat (3) step();
    gate <= 0;
    repeat (35) step();        // full release to idle
    gate <= 1;
    repeat (8) step();         // part of the attack
    gate <= 0;
    repeat (10) step();        // release from mid-attack
    gate <= 1;
    repeat (30) step();        // retrigger from mid-release
    gate <= 0;
    repeat (30) step();
    // Zero-length phases jump straight to their targets
    prm.attack_len = 0; prm.decay_len = 0; prm.release_len = 0;
    gate <= 1;
    repeat (5) step();
    gate <= 0;
    repeat (3) step();
    for (int s = 0; s < 5; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("FAIL state %0d never reached", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
