// Combination lock: a clocked Mealy state machine with one serial input X and
// two outputs, UNLK and HINT.
//
// UNLK is 1 exactly when the machine is in state H (the last seven inputs were
// 0110111) and the present X is 0. HINT is 1 exactly when the present X is the
// symbol that moves the machine closer to unlocking. A wrong symbol sends the
// machine back to A (after a wrong 1) or B (after a wrong 0), except in G,
// where a wrong 0 leaves the tail "0110" in place and the machine goes to E.
// After unlocking, the closing 0 counts as the first symbol of a new attempt
// (H -> B).
//
// Interface and timing:
//   clk      state register updates on the rising edge
//   reset_n  asynchronous, active low: forces state A at once, without a clock
//   x        the serial combination input, sampled at every rising edge
//   unlk     combinational from state and x (Mealy)
//   hint     see REGISTERED_HINT
//   state    the present state, brought out for observation
//
// REGISTERED_HINT selects between the two HINT behaviours the lock's
// description gives. At 0 (default) HINT is the Mealy output of the state and
// output table: a combinational function of the present state and the present
// X, so a user can see whether X is right before the clock edge. At 1 HINT is
// registered together with the state, so it shows, during a clock period,
// whether the symbol taken at the previous edge was right. Like the reference
// VHDL, this HINT flip-flop is not reset: it holds its value while reset_n is
// low and is defined from the first rising edge after reset. The transitions
// and UNLK are the same in both modes. The next-state and output table, the
// reset behaviour and UNLK follow the description; the state encoding and the
// Mealy default for HINT are this design's own choices.
//
// Lint reports reset_n as used both asynchronously and synchronously: the
// synchronous use is only the disable condition of the assertion below.
module comb_lock
  import comb_lock_pkg::*;
#(
  parameter bit REGISTERED_HINT = 1'b0
) (
  input  logic   clk,
  input  logic   reset_n,
  input  logic   x,
  output logic   unlk,
  output logic   hint,
  output state_e state
);

  state_e state_next;
  logic   hint_now;   // Mealy HINT of the present state and x

  // State and output table: next state and HINT for each state and X.
  always_comb begin
    state_next = ST_A;
    hint_now   = 1'b0;
    unique case (state)
      ST_A: if (!x) begin state_next = ST_B; hint_now = 1'b1; end
            else    begin state_next = ST_A; hint_now = 1'b0; end
      ST_B: if (x)  begin state_next = ST_C; hint_now = 1'b1; end
            else    begin state_next = ST_B; hint_now = 1'b0; end
      ST_C: if (x)  begin state_next = ST_D; hint_now = 1'b1; end
            else    begin state_next = ST_B; hint_now = 1'b0; end
      ST_D: if (!x) begin state_next = ST_E; hint_now = 1'b1; end
            else    begin state_next = ST_A; hint_now = 1'b0; end
      ST_E: if (x)  begin state_next = ST_F; hint_now = 1'b1; end
            else    begin state_next = ST_B; hint_now = 1'b0; end
      ST_F: if (x)  begin state_next = ST_G; hint_now = 1'b1; end
            else    begin state_next = ST_B; hint_now = 1'b0; end
      ST_G: if (x)  begin state_next = ST_H; hint_now = 1'b1; end
            else    begin state_next = ST_E; hint_now = 1'b0; end
      ST_H: if (!x) begin state_next = ST_B; hint_now = 1'b1; end
            else    begin state_next = ST_A; hint_now = 1'b0; end
      default:      begin state_next = ST_A; hint_now = 1'b0; end
    endcase
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) state <= ST_A;
    else          state <= state_next;
  end

  assign unlk = (state == ST_H) && !x;

  generate
    if (REGISTERED_HINT) begin : g_hint_reg
      // Not reset: while reset_n is low the flip-flop keeps its value, as
      // the state register ignores the clock then too. Its value is defined
      // from the first rising edge after reset is released.
      logic hint_q;
      always_ff @(posedge clk) begin
        if (reset_n) hint_q <= hint_now;
      end
      assign hint = hint_q;
    end else begin : g_hint_mealy
      assign hint = hint_now;
      // Opening the lock is always a correct move.
      a_unlk_hint : assert property (@(posedge clk) disable iff (!reset_n) unlk |-> hint);
    end
  endgenerate

endmodule
