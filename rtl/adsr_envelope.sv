// adsr_envelope: attack / decay / sustain / release envelope generator.
// On note on the level ramps linearly from its current value to `peak` in
// attack_len steps, then to `sustain` in decay_len steps, and holds the
// sustain level (following the slider) until note off; it then ramps to zero
// in release_len steps and goes idle. A note on during release restarts the
// attack from the current level; a zero length jumps to the target at once.
// Every ramp point is computed exactly as start + (target - start) * t / len
// by a small sequencer that does one operation per arithmetic enable
// (`op_en`, the 4.8 MHz rate in the synthesizer, so each operation has ten
// 48 MHz clocks and can be constrained as a multicycle path) -- subtract,
// multiply, divide, add -- so a new level appears on the fourth op_en after
// the step strobe that asked for it. Steps must come at least five op_en
// apart; an assertion flags a step that arrives while the sequencer is busy.
// The ADSR shape, its five settings and the one-operation-per-cycle
// arithmetic follow the document; fixed-point (instead of floating-point)
// arithmetic and the retrigger rule are this design's choices.
module adsr_envelope
  import synth_pkg::*;
(
  input  logic             clk,
  input  logic             rst,
  input  logic             step_en,
  input  logic             op_en,
  input  logic             gate,
  input  env_params_t      prm,
  output logic [ENV_W-1:0] level,
  output env_state_t       state
);
  typedef enum logic [2:0] {OP_NONE, OP_SUB, OP_MUL, OP_DIV, OP_ADD} op_t;

  op_t                    op;
  logic [LEN_W-1:0]       t;          // steps taken in the current phase
  logic [ENV_W-1:0]       start_lvl;  // level when the phase began
  // Job operands latched when a ramp point is requested
  logic [ENV_W-1:0]       tgt_j;
  logic [LEN_W-1:0]       len_j, t_j;
  logic                   up;
  logic [ENV_W-1:0]       diff;
  logic [ENV_W+LEN_W-1:0] prod, quo;

  logic [LEN_W-1:0] t_next;
  assign t_next = t + 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      op        <= OP_NONE;
      state     <= ENV_IDLE;
      t         <= '0;
      start_lvl <= '0;
      level     <= '0;
      tgt_j     <= '0;
      len_j     <= '0;
      t_j       <= '0;
      up        <= 1'b0;
      diff      <= '0;
      prod      <= '0;
      quo       <= '0;
    end else begin
      // Arithmetic sequencer: one operation per arithmetic enable
      if (op_en) unique case (op)
        OP_SUB: begin
          up   <= (tgt_j >= start_lvl);
          diff <= (tgt_j >= start_lvl) ? tgt_j - start_lvl : start_lvl - tgt_j;
          op   <= OP_MUL;
        end
        OP_MUL: begin
          prod <= diff * t_j;
          op   <= OP_DIV;
        end
        OP_DIV: begin
          quo <= prod / (ENV_W + LEN_W)'(len_j);
          op  <= OP_ADD;
        end
        OP_ADD: begin
          level <= up ? start_lvl + ENV_W'(quo) : start_lvl - ENV_W'(quo);
          op    <= OP_NONE;
        end
        default: ;
      endcase

      if (step_en && op == OP_NONE) begin
        unique case (state)
          ENV_IDLE: if (gate) begin
            state <= ENV_ATTACK; t <= '0; start_lvl <= level;
          end
          ENV_ATTACK: begin
            if (!gate) begin
              state <= ENV_RELEASE; t <= '0; start_lvl <= level;
            end else if (t_next >= prm.attack_len) begin
              state <= ENV_DECAY; t <= '0; start_lvl <= prm.peak; level <= prm.peak;
            end else begin
              t <= t_next; t_j <= t_next; tgt_j <= prm.peak; len_j <= prm.attack_len; op <= OP_SUB;
            end
          end
          ENV_DECAY: begin
            if (!gate) begin
              state <= ENV_RELEASE; t <= '0; start_lvl <= level;
            end else if (t_next >= prm.decay_len) begin
              state <= ENV_SUSTAIN; t <= '0; level <= prm.sustain;
            end else begin
              t <= t_next; t_j <= t_next; tgt_j <= prm.sustain; len_j <= prm.decay_len; op <= OP_SUB;
            end
          end
          ENV_SUSTAIN: begin
            if (!gate) begin
              state <= ENV_RELEASE; t <= '0; start_lvl <= level;
            end else begin
              level <= prm.sustain;
            end
          end
          ENV_RELEASE: begin
            if (gate) begin
              state <= ENV_ATTACK; t <= '0; start_lvl <= level;
            end else if (t_next >= prm.release_len) begin
              state <= ENV_IDLE; t <= '0; level <= '0;
            end else begin
              t <= t_next; t_j <= t_next; tgt_j <= '0; len_j <= prm.release_len; op <= OP_SUB;
            end
          end
          default: state <= ENV_IDLE;
        endcase
      end
    end
  end

  // A step that arrives while a ramp point is still being computed is lost.
  a_step_spacing: assert property (@(posedge clk) disable iff (rst) step_en |-> op == OP_NONE)
    else $error("adsr_envelope: step_en while the arithmetic sequencer is busy");
endmodule
