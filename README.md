# Concurrent error detection for control FSMs

Soft errors caused by particle strikes can flip a bit in a flip-flop or glitch a gate. In control logic
such an error sends the design into the wrong state, or makes it drive the wrong control output, and it
does so without any sign. *Concurrent error detection* (CED) adds redundant logic. This logic watches
the FSM while it runs and raises an error flag in the same clock cycle in which a corrupted state or
output shows up.

This RTL shows four ways to add CED to a finite state machine. Each costs a different amount of logic
and catches a different share of errors:

| scheme | state register | what is checked | checker |
|---|---|---|---|
| parity (`ced_parity`) | original code plus an odd-parity bit as MSB | state and outputs together, through one combined check bit | one parity checker |
| one-hot (`ced_onehot`) | re-encoded one-hot | state: exactly one bit set; outputs: parity against a predicted parity bit | one-hot checker + parity checker |
| hybrid parity (`ced_hybrid`) | original code plus parity bit | state parity; outputs compared with a second copy of the output logic | parity checker + equality checker |
| duplication (`ced_dup`) | two full copies of the FSM | outputs of copy A against copy B | equality checker |

All four schemes protect the same example FSM. The top level, `ced_top`, holds one FSM per scheme,
side by side. It merges their error indications into a single global error signal.

In rough terms, parity is the cheapest scheme, then one-hot, then hybrid. Duplication costs the most.
Coverage rises in about the same order. Parity and one-hot cannot see an error that flips an even
number of bits in the word they check. Duplication sees any difference at the outputs.

## The idea: re-encode the constants, keep the FSM code

Every scheme except duplication changes only the *state code*. The FSM is written once
(`ex_fsm_next`, `ex_fsm_out`), and every state constant goes through `ced_pkg::enc_state()`. The
`ENC` parameter selects the code:

| state | binary (`ENC_BINARY`) | parity (`ENC_PARITY`) | one-hot (`ENC_ONEHOT`) |
|---|---|---|---|
| S0 | `2'b00` | `3'b100` | `4'b0001` |
| S1 | `2'b01` | `3'b001` | `4'b0010` |
| S2 | `2'b10` | `3'b010` | `4'b0100` |
| S3 | `2'b11` | `3'b111` | `4'b1000` |

In the parity code, the MSB makes the number of ones odd. The all-zero word therefore never appears in
normal operation, and neither does a word that has lost or gained one bit. The one-hot code sets bit
*i* for state *i*.

The case statement of the next-state logic compares `ps` with these constants and assigns them to
`ns`. Synthesis therefore derives the parity bit, or the one-hot bits, of the next state from the same
logic that computes the rest of the state. No separate encoder exists that could fail on its own. For
the parity code, the two low state bits are the original code unchanged. Any logic that reads the
state register directly therefore still works. The one-hot code does not have this property.

A code word that is not a state takes the `default` branch. That branch leads to S3.

## The example FSM

It has four states, a synchronous reset, two inputs (`go`, `sigY`) and four outputs. The output
vector `y` is `{sigX, ld, busy, done}`, with bit 3 being `sigX`.

```
reset          -> S0
S0 -> S1                    sigX = sigY & (state == S2)
S1 -> S2 if go else S1      ld   = go   & (state == S1)
S2 -> S3                    busy = (state != S0)
S3 -> S0 if go else S3      done = (state == S3)
other codes -> S3
```

The state register loads on the rising edge of `clk`. Reset is part of the next-state logic, so the
FSM is in S0 one clock after a cycle in which `reset` is high. The outputs are combinational in the
state and the inputs (Mealy).

The parts of this FSM that come from the published example are:

- the 2-bit state;
- reset to `00`;
- `00 -> 01`;
- the default branch to `11`;
- `sigX = sigY & (state == 10)`.

The rest is this design's own completion, made so that every state is reached and the outputs carry
several bits for the parity checks: `go`, the other transitions, and `ld`/`busy`/`done`.

## How each check works

**Two-rail error signals.** Every checker reports on a pair of wires. `01` or `10` means no error.
`00` or `11` means an error. A single stuck wire inside a checker then turns a good result into `00`
or `11`; it cannot pass for a clean result forever. Pairs are merged with the two-rail checker cell
`trc`: `z0 = a0&b0 | a1&b1`, `z1 = a0&b1 | a1&b0`. The output is valid only if both inputs are valid.
`trc_tree` chains N−1 of these cells into a tree.

**Output parity prediction** (`ex_fsm_outpar`). A separate case statement on the present state
computes the parity that `y` should have, without looking at the output logic:

| state | predicted parity |
|---|---|
| S0 | 0 |
| S1 | `~go` |
| S2 | `~sigY` |
| S3 | 0 |
| any non-state code | 1 |

For a non-state code the output logic drives only `busy`, whose parity is 1, so the prediction agrees
with it. As a result, a corrupted state word is reported by the state check and is not cancelled out
by an output-parity mismatch.

**Parity scheme: one checker for state and outputs.** The stored parity bit `p` (the MSB of `ps`) and
the predicted output parity `py` are folded into a single check bit `c = p ^ py`. The word
`{c, y, ps[1:0]}` then has odd parity whenever the state has odd parity and `y` has its predicted
parity. One 7-bit parity checker (`parity_checker`) covers both. Errors in both parts at once cancel
out. This is the price of using only one checker.

**One-hot scheme.** `onehot_checker` splits the state into a low group A and a high group B. It forms
two rails:

- `z0 = OR(A) | two_or_more(B)`
- `z1 = OR(B) | two_or_more(A)`

If exactly one bit is set, the rails differ. If no bit is set, both rails are 0. If two or more bits
are set, both rails are 1. In addition, a parity checker checks that `{py, y}` has even parity.

**Hybrid scheme.** A parity checker checks the 3-bit state. A second `ex_fsm_out` computes the outputs
again from the same state and inputs, and `eq_checker` compares the two copies.

**Equality checker** (`eq_checker`). For each bit, the pair `(a[i], ~b[i])` is a valid two-rail word
exactly when `a[i] == b[i]`. A `trc_tree` merges these pairs.

**Duplication.** Two complete binary FSMs run side by side, and `eq_checker` compares their outputs.
Only the outputs are compared. A state difference is flagged in the first cycle in which it changes an
output. For this FSM, any single-bit state difference changes `busy` or `done` at once.

**Timing.** All checks are combinational. An error is flagged in the same cycle in which the corrupted
state or output is present.

## Top level: `ced_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `reset` | in | 1 | shared clock and synchronous reset |
| `go`, `sigY` | in | 4 | inputs of FSM *k* (k = 0 parity, 1 one-hot, 2 hybrid, 3 duplication) |
| `y` | out | 4×4 | `y[k]` = outputs of FSM *k* |
| `err_fsm` | out | 4×2 | two-rail error pair of FSM *k* |
| `err` | out | 2 | global two-rail error pair (`trc_tree` over `err_fsm`) |

In a real design each FSM would have its own scheme. This top level holds one example of each scheme so
that all four, and the merging of their error signals, can be simulated and synthesized together.

## How far to trust it, and where it departs

- The protected FSM is a small example. The method is generic, but the RTL does not rewrite arbitrary
  FSMs. Protecting another FSM means writing its next-state and output logic with
  `enc_state()`-style constants, plus its own output parity predictor.
- The one-hot checker detects every word that is not one-hot. It has not been proven self-testing for
  every stuck-at fault inside it. The parity, equality and two-rail checkers are the standard
  self-checking constructions.
- The duplicate logic in `ced_dup` and `ced_hybrid` is logically identical to the logic it checks. A
  synthesis tool will merge the copies unless told to keep them (for example with hierarchy
  preservation or keep attributes). The same applies to the output parity predictor, which a tool may
  partly share with the output logic. Sharing lowers the coverage a gate-level fault simulation would
  measure.
- None of the protected FSMs brings its state register out as a port. With the parity code, such a
  port could simply carry `ps[1:0]`, because the added bit is a separate MSB. With the one-hot code it
  could not.
- The clock, the synchronous reset, the `go` input, the three extra outputs, the two-rail convention,
  the checker circuits and the prediction for non-state codes are choices of this design.
- Coverage, area, delay and power figures for real control designs are not reproduced here; they need
  those designs and a gate-level fault simulator.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ced_pkg.sv tb/tb_ref_pkg.sv tb/tb_ced_top.sv --top-module tb_ced_top -o sim
./obj_dir/sim
```

Replace `tb_ced_top` with any testbench below.

| testbench | what it shows |
|---|---|
| `tb_ced_top` | all four schemes at once: 2000 fault-free random cycles with no false alarms and outputs equal to the reference model, then 400 injected single-bit errors (state register bits and output bits). Each must raise its own FSM's error pair and the global pair, and leave the other FSMs' pairs clean. |
| `tb_ced_parity`, `tb_ced_onehot`, `tb_ced_hybrid`, `tb_ced_dup` | one scheme: fault-free run, then 300 single-bit errors of every kind the scheme covers (state bits, output bits, predicted parity or duplicate outputs) |
| `tb_ced_coverage` | stuck-at fault coverage of each scheme, measured as described below |
| `tb_ex_fsm` | the FSM in all three codes against the reference model, state words checked bit for bit, default branch |
| `tb_ex_fsm_outpar` | the parity predictor for every state, input and non-state code |
| `tb_parity_checker`, `tb_onehot_checker`, `tb_eq_checker`, `tb_trc_tree` | exhaustive checker tests |

Errors are injected with `force`/`release`. At the falling clock edge the testbench forces a register
or net to its current value with one bit inverted. It checks the error pair, then releases the signal.
`tb_ref_pkg` holds the reference model, which is written from the state table on plain integers.

## Measuring coverage

`tb_ced_coverage` measures coverage with the usual three observation points.

**Fault list.** Each bit of the following signals is stuck at 0 and then at 1:

- the next-state signal, the state register and the outputs of every protected FSM;
- the redundant signals: predicted parity, check bit, duplicate copies and checker rails.

**Runs.** For each fault the testbench applies reset and then 64 random cycles. It records whether the
fault reached the functional outputs, the error pair, or either. Let f1 be the set of faults seen at
either point, f2 the set seen at the outputs, and f3 the set seen at the error pair. Then

    coverage = (f3 - (f1 - f2)) / f2

Faults that only ever reach the error pair sit in the checking logic itself and are not counted.

**Results.** With this RTL fault list every scheme reaches 100%. Each fault here corrupts exactly one
bit of a checked word, and all four schemes catch any single-bit error. The schemes differ after
synthesis. There, one gate fault inside shared next-state or output logic can corrupt several bits at
once. That case is where parity and one-hot lose coverage and the duplicated output logic of the
hybrid scheme wins it back. Measuring that needs a gate-level netlist and a fault simulator.

## Files

- `rtl/ced_pkg.sv`: state type, encodings, two-rail type.
- `rtl/ex_fsm*.sv`: the example FSM, its next-state and output logic, and the output parity predictor.
- `rtl/parity_checker.sv`, `rtl/onehot_checker.sv`, `rtl/eq_checker.sv`, `rtl/trc.sv`,
  `rtl/trc_tree.sv`: the checkers.
- `rtl/ced_parity.sv`, `rtl/ced_onehot.sv`, `rtl/ced_hybrid.sv`, `rtl/ced_dup.sv`: the four protected
  FSMs.
- `rtl/ced_top.sv`: the top level.
