# Combination lock state machine

A serial combination lock: one input bit `x` arrives per clock, and the lock
opens when the last seven bits were `0110111` and the present bit is `0`. A
second output, `hint`, tells the user whether the bit now on `x` is the right
one. It goes low before the clock edge when the bit is wrong, so the user can
change `x` in time.

The lock is a Mealy machine. Both outputs depend on the present input as well
as on the state. It has eight states, one clock input, an asynchronous
active-low reset and nothing else: 3 flip-flops plus a small amount of logic.

## Files

| File | Contents |
|------|----------|
| `rtl/comb_lock_pkg.sv` | `state_e`, the state enumeration `ST_A` .. `ST_H` |
| `rtl/comb_lock.sv` | the lock; also the top of the design |
| `tb/comb_lock_ref_pkg.sv` | reference model used by both testbenches |
| `tb/comb_lock_tb.sv` | end-to-end test at the default parameters |
| `tb/comb_lock_reghint_tb.sv` | the same test with `REGISTERED_HINT = 1` |

## Ports

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | the state changes on the rising edge |
| `reset_n` | in | 1 | asynchronous, active low; forces state A immediately |
| `x` | in | 1 | the serial combination input |
| `unlk` | out | 1 | 1 when the state is H and `x` is 0 (combinational) |
| `hint` | out | 1 | 1 when `x` is the bit that moves the lock towards opening |
| `state` | out | 3 (`state_e`) | the present state, brought out for observation |

## How the states work

Each state records how much of the combination has been entered so far:

| State | Bits received | Right next bit | Next state, `x`=0 | Next state, `x`=1 |
|-------|---------------|----------------|-------------------|-------------------|
| A | nothing | 0 | B | A |
| B | `0` | 1 | B | C |
| C | `01` | 1 | B | D |
| D | `011` | 0 | E | A |
| E | `0110` | 1 | B | F |
| F | `01101` | 1 | B | G |
| G | `011011` | 1 | **E** | H |
| H | `0110111` | 0 (opens) | B | A |

`hint` is 1 exactly when `x` equals the "right next bit" column. `unlk` is 1
only in the H row with `x` = 0. Every other entry gives 0.

The wrong-bit arcs are the hardest part of the table to follow. They are not
arbitrary, and the rule behind them is this: after any wrong bit, the lock
keeps the longest tail of the bits received that is still a beginning of
`0110111`. That is why:

* a wrong `1` (in A, D or H) always goes back to A. The bits received then
  end in `1` or `111`, and no beginning of `0110111` matches such a tail;
* a wrong `0` usually goes to B, because the `0` just received can itself
  start a new attempt;
* a wrong `0` in G goes to **E**, not B. `011011` followed by `0` ends in
  `0110`, which is already four bits of the combination;
* the opening `0` in H also counts as the first bit of the next attempt, so H
  goes to B after the lock opens. `unlk` is high for exactly one clock
  period.

This is the next-state function of a string matcher (a Knuth-Morris-Pratt
automaton) for the pattern `01101110`. The testbenches use that rule, and not
the table, as their reference model.

## The two readings of HINT

The lock's specification describes `hint` in two ways that do not agree.

* **As a Mealy output (default, `REGISTERED_HINT = 0`).** `hint` is a
  combinational function of the present state and the present `x`, as in
  the table above. Its purpose is to warn the user about a wrong bit before
  the clock edge, and only this reading can do that.
* **As a registered output (`REGISTERED_HINT = 1`).** In this reading the
  table's `hint` value is stored in a flip-flop on the same edge that takes
  the state transition. During a clock period `hint` then shows whether the
  *previous* bit was right. The reference VHDL and the published
  simulation waveforms behave this way. For example, `hint` stays low
  through the first clock period after reset and rises on the first edge.

Both settings give the same state sequence and the same `unlk`. As in the
original, the registered `hint` flip-flop has no reset. It keeps its value
while `reset_n` is low, because the clocked update is skipped during reset.
So after reset, `hint` can still show 1 while the state is already A. Its
value is defined from the first rising edge after reset is released; do not
rely on it before then.
In the default mode an assertion checks that opening the lock always counts
as a right bit (`unlk |-> hint`).

## Timing

* The state register updates on the rising edge of `clk`.
* `reset_n` low forces state A at once, without waiting for a clock edge. It
  is edge-triggered like any asynchronous flip-flop reset, so hold it low
  from a high level at power-up (a simulation that starts with `reset_n` at
  0 sees no falling edge).
* `unlk` and the default `hint` are combinational from `x`, so `x` must be
  stable for the logic delay before the rising edge. These two outputs can
  glitch while `x` changes.
* The original design was simulated with a 100 ns clock, and the testbenches
  use the same period. The gate delays of that implementation are not
  modelled; the RTL has none.

## Verification

Both testbenches drive `x` on the falling edge of `clk`. They check `state`,
`unlk` and `hint` a quarter period later, against the matcher model in
`tb/comb_lock_ref_pkg.sv`. Each run:

1. replays four directed cases:
   * the correct combination followed by the opening `0`;
   * the wrong sequence `0100101`;
   * a wrong `0` in state G;
   * a reset in the middle of an attempt;
2. runs 4000 cycles in which `x` follows the combination 80 % of the time and
   is random otherwise. About one cycle in 200 is an asynchronous reset,
   applied between clock edges and checked before the next rising edge.

The testbenches count how often the lock:
* opens;
* restarts in B after opening;
* goes from G to E;
* returns to A after a wrong 1, or to B after a wrong 0;
* is reset.

A count of zero is a failure. Each testbench prints one line,
`TB_RESULT checks=<n> failures=<n>`. A typical run makes about 12,000
checks, with several hundred openings and several dozen G-to-E returns.

To simulate with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
  rtl/comb_lock_pkg.sv tb/comb_lock_ref_pkg.sv rtl/comb_lock.sv tb/comb_lock_tb.sv \
  --top-module comb_lock_tb
./obj_dir/Vcomb_lock_tb
```

To run the registered-HINT test, use `tb/comb_lock_reghint_tb.sv` and
`--top-module comb_lock_reghint_tb` instead.

## Design choices not fixed by the original specification

* The state encoding is 3-bit binary in the order A=0 to H=7. To change it,
  edit `state_e`; nothing else depends on the values.
* `reset_n` is named for its polarity. The original port was called `reset`
  and was also active low.
* The `state` output exists only so that the state can be observed, as in
  the original waveforms. It can be left unconnected.
* By default `hint` is the Mealy output of the table, not the registered
  output of the original implementation (see above).
* Verilator's lint reports `reset_n` as "used both synchronously and
  asynchronously". The synchronous use is the `disable iff` of the
  assertion, not logic.
