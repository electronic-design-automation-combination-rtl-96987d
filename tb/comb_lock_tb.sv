// End-to-end, self-checking testbench of the combination lock at its default
// parameters (Mealy HINT).
//
// A 100 ns clock drives the lock. The input X changes on the falling edge and
// every output is compared a quarter period later, before the rising edge,
// with a reference model that knows only the combination (comb_lock_ref_pkg):
// the state, UNLK and HINT. The run replays the four situations of the lock's
// reference waveforms (the correct sequence 0110111 followed by 0, the wrong
// sequence 0100101, a wrong 0 in state G, and a reset in mid-sequence) and
// then several thousand cycles of inputs that mostly follow the combination,
// with occasional asynchronous resets. Each mechanism of the lock is counted,
// and one that never happened is a failure.
module comb_lock_tb;
  import comb_lock_pkg::*;
  import comb_lock_ref_pkg::*;

  timeunit 1ns;
  timeprecision 100ps;

  localparam time         T           = 100ns;
  localparam int unsigned RANDOM_STEPS = 4000;

  logic   clk = 1'b0;
  logic   reset_n = 1'b1;
  logic   x = 1'b0;
  logic   unlk, hint;
  state_e state;

  comb_lock dut (.clk, .reset_n, .x, .unlk, .hint, .state);

  always #(T/2) clk = ~clk;

  int unsigned checks = 0, failures = 0;

  // Reference: input history since reset, latest input in bit 0.
  logic [31:0] hist = '0;
  int unsigned nvalid = 0;

  // Mechanism counters.
  int unsigned n_unlock = 0, n_restart_after_unlock = 0, n_g_to_e = 0;
  int unsigned n_wrong1_to_a = 0, n_wrong0_to_b = 0, n_advance = 0;
  int unsigned n_hint0 = 0, n_hint1 = 0, n_async_reset = 0;
  bit          last_unlock = 1'b0;

  task automatic check_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %0t %s: got %0b expected %0b", $time, what, got, exp);
    end
  endtask

  task automatic check_state(int unsigned k);
    checks++;
    if (state.name() != state_name(k)) begin
      failures++;
      $display("FAIL %0t state: got %s expected %s", $time, state.name(), state_name(k));
    end
  endtask

  // One clock period with input xv: drive on the falling edge, check, then
  // let the rising edge take it. Returns at the next falling edge.
  task automatic step(logic xv);
    int unsigned k;
    logic right;
    x = xv;
    #(T/4);
    k = progress(hist, nvalid);
    right = (xv == right_symbol(k));
    check_state(k);
    check_bit("unlk", unlk, (k == CODE_LEN) && !xv);
    check_bit("hint", hint, right);
    // The state check above has just seen B right after an opening.
    if (last_unlock) n_restart_after_unlock++;
    last_unlock = (k == CODE_LEN) && !xv;
    if (last_unlock) n_unlock++;
    if (k == 6 && !xv) n_g_to_e++;
    if (!right && xv) n_wrong1_to_a++;
    if (!right && !xv && k != 6) n_wrong0_to_b++;
    if (right && k < CODE_LEN) n_advance++;
    if (right) n_hint1++; else n_hint0++;
    @(posedge clk);
    hist = {hist[30:0], xv};
    if (nvalid < 32) nvalid++;
    @(negedge clk);
    #1;
  endtask

  task automatic step_seq(string bits);
    foreach (bits[i]) step(bits[i] == "1");
  endtask

  // Reset in the low phase of the clock, away from any rising edge: the
  // state must be A at once. Reset is held over one rising edge and released
  // on a falling edge.
  task automatic async_reset();
    #(T/8);
    reset_n = 1'b0;
    last_unlock = 1'b0;
    #1;
    check_state(0);
    check_bit("unlk in reset", unlk, 1'b0);
    n_async_reset++;
    @(posedge clk);
    #1;
    check_state(0);
    @(negedge clk);
    reset_n = 1'b1;
    hist = '0;
    nvalid = 0;
    #1;
  endtask

  initial begin
    // Watchdog.
    repeat (RANDOM_STEPS + 500) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Power-up reset: a falling edge on reset_n, as the state register
    // reacts to the edge.
    $timeformat(-9, 1, " ns", 10);
    #1;
    reset_n = 1'b0;
    #1;
    check_state(0);
    repeat (2) @(negedge clk);
    reset_n = 1'b1;
    #1;

    // The correct combination, the opening 0, then two more 0s (H -> B -> B).
    step_seq("01101110");
    check_state(1);
    step_seq("00");
    // A wrong sequence.
    async_reset();
    step_seq("0100101");
    // A wrong 0 in state G.
    async_reset();
    step_seq("011011");
    check_state(6);
    step_seq("0");
    check_state(4);
    step_seq("111");
    // Reset in the middle of a sequence (state E).
    async_reset();
    step_seq("0110");
    check_state(4);
    async_reset();
    step_seq("11100");

    // Inputs that mostly follow the combination, occasional resets.
    for (int n = 0; n < RANDOM_STEPS; n++) begin
      int unsigned k;
      k = progress(hist, nvalid);
      if ($urandom_range(0, 199) == 0) async_reset();
      else if ($urandom_range(0, 99) < 80) step(right_symbol(k));
      else step(1'($urandom_range(0, 1)));
    end

    $display("mechanisms: unlock=%0d restart_after_unlock=%0d g_to_e=%0d wrong1_to_a=%0d wrong0_to_b=%0d advance=%0d hint0=%0d hint1=%0d async_reset=%0d",
             n_unlock, n_restart_after_unlock, n_g_to_e, n_wrong1_to_a, n_wrong0_to_b,
             n_advance, n_hint0, n_hint1, n_async_reset);
    if (n_unlock == 0)               begin failures++; $display("FAIL never unlocked"); end
    if (n_restart_after_unlock == 0) begin failures++; $display("FAIL no restart after unlock"); end
    if (n_g_to_e == 0)               begin failures++; $display("FAIL no G to E"); end
    if (n_wrong1_to_a == 0)          begin failures++; $display("FAIL no wrong 1"); end
    if (n_wrong0_to_b == 0)          begin failures++; $display("FAIL no wrong 0"); end
    if (n_advance == 0)              begin failures++; $display("FAIL never advanced"); end
    if (n_hint0 == 0 || n_hint1 == 0) begin failures++; $display("FAIL hint never toggled"); end
    if (n_async_reset == 0)          begin failures++; $display("FAIL no reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
