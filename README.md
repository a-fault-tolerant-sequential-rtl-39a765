# Fault-tolerant synchronous sequential circuit: one self-checking copy, one plain copy, one multiplexer

Triple modular redundancy masks a fault in one copy of a circuit by voting over three copies.
This design masks the same class of faults with two copies and a cheap checker. The copies are:

- **SCSC1**, a *self-checking* copy of the state machine. Its combinational part K1 emits
  extra check bits, so every output word is a code word. A fault in SCSC1 can only disturb the
  word in one direction (some bits go 0→1, or some go 1→0, never both), and the code is chosen
  so that such an error always gives a word that is not a code word.
- **SC2**, a *plain* copy of the same machine with the same state encoding. It has no check
  bits and can be built as cheaply as synthesis allows.

The checker **Ch** looks only at K1's output word. If the word is a code word (checker output
`u1 u2 = 1 0`), the multiplexer **MUX** passes SCSC1's outputs. Otherwise it passes SC2's. The
selected next state goes back into the state flip-flops of *both* copies. So whichever copy went
wrong is back on the correct state after the next clock edge.

```
 x ─┬──► K1 ──(y', chk, z')──► Ch ──(u1, u2)──┐
    │    ▲     │                               ▼
    │    d'    └──────(y', z')──────────────► MUX ──► y
    │                                          ▲  └──► z ──┐
    └──► K2 ──────────(y'', z'')───────────────┘           │
         ▲                                                 │
         d''          d' and d'' both load z ◄─────────────┘
```

## Why one faulty module never reaches the outputs

A fault may be transient or intermittent. Only one module is faulty at a time, and a new fault
appears only after the previous one has gone. Under these rules each case is covered:

| faulty module | what happens | outputs come from |
|---|---|---|
| SCSC1 (stuck-at fault in K1) | unidirectional error on K1's word, not a code word, `u1 u2 ≠ 1 0` | SC2, fault-free |
| SCSC1 (path delay fault in K1) | one K1 output still shows its previous value: a single-bit error, not a code word | SC2, fault-free |
| SC2 (any fault, flip-flops included) | K1's word is a correct code word, `u1 u2 = 1 0` | SCSC1, fault-free |
| Ch (any fault) | `u1 u2` may take any value | either copy; both are fault-free |
| MUX (lines swapped between sources) | some lines come from the other copy | both copies agree |

A path delay fault shows only when the input of the delayed path changes between two
consecutive evaluations. The wrong value it leaves is the previous one, which differs from the
correct value in exactly one output bit. A single-bit error is unidirectional, so it is caught.

The error-free cases depend on SC2 holding the correct state whenever SCSC1 is faulty, and the
other way round. Feeding the *selected* next state to both state registers keeps this true.
Even a copy that was faulty in the previous cycle starts the next cycle in the right state.

## The code and the checker

The extra outputs of K1 form a **Berger code**. The information bits are the outputs y' and
the next-state lines z', k = m + p bits in all. The check symbol is the number of zeros among
them, written in binary on s = ⌈log2(k+1)⌉ bits.

Why this detects every unidirectional error: suppose some bits fall 1→0, in the information
part, the check part or both. Then the zeros count of the information bits can only rise, and
the binary check value can only fall. If anything changed, the two no longer match. Errors that
go 0→1 give the mirror argument. With the default sizes (m = 2, p = 3) there are k = 5
information bits and s = 3 check bits, so 32 of the 256 eight-bit words are code words.

`berger_checker` recomputes the zeros count from the received y', z' and compares it with the
received check bits. A match gives `u1 u2 = 1 0`, and a mismatch gives `0 1`. This checker is
not self-testing: a fault inside it is not guaranteed to show. That is acceptable here, because a
checker fault can only make the multiplexer choose between two correct copies. `ft_mux` passes
K1's lines only for exactly `1 0`; `0 0`, `0 1` and `1 1` all select SC2.

## The protected machine

The scheme works for any finite state machine. The machine is defined once, in
`rtl/ft_fsm_pkg.sv`, by its sizes and the function `fsm_step(x, z)`, which returns the outputs
and the next state. K1 and K2 both call this function, so they realise the same machine with the
same encoding.

The machine shipped is an example: an up/down counter modulo 8 with enable.

| signal | meaning |
|---|---|
| `x[0]` | enable |
| `x[1]` | direction, 1 = up |
| `z` (3 bits) | state; next = state ± 1 when enabled, otherwise unchanged |
| `y[0]` | carry: enabled, counting up, state 7 |
| `y[1]` | borrow: enabled, counting down, state 0 |

The outputs are Mealy outputs: they depend on the present state and x.

To protect another machine, change `N_IN`, `M_OUT`, `P_STATE` and `fsm_step`. The number of
check bits `S_CHK` follows from `M_OUT + P_STATE`. The testbenches carry their own model of the
counter, so they must be updated as well.

## Modules

| module | part of the scheme | contents |
|---|---|---|
| `ft_fsm_pkg` | – | sizes, types, `fsm_step`, `berger_check` |
| `k1_comb` | K1 | `fsm_step` plus the Berger check bits |
| `k2_comb` | K2 | `fsm_step` only |
| `state_reg` | d', d'' | P_STATE flip-flops, asynchronous active-low reset to `RESET_STATE` |
| `scsc1` | SCSC1 | `state_reg` + `k1_comb`; the flip-flops load `z_fb` |
| `sc2` | SC2 | `state_reg` + `k2_comb`; the flip-flops load `z_fb` |
| `berger_checker` | Ch | zeros count, compare, two-rail `u1 u2` |
| `ft_mux` | MUX | passes K1's lines only for `u1 u2 = 1 0` |
| `ft_seq_top` | whole scheme | everything above, wired as in the diagram |

### `ft_seq_top` interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | all flip-flops on the rising edge |
| `rst_n` | in | 1 | asynchronous reset, active low; both copies go to `RESET_STATE` (default 0) |
| `x` | in | `N_IN` | primary inputs |
| `y` | out | `M_OUT` | primary outputs (Mealy, combinational in x and state) |
| `z` | out | `P_STATE` | selected next state; both registers load it at the next edge |
| `err` | out | 1 | 1 while the checker output is not `1 0`, i.e. while SC2 drives the outputs |

The outputs are valid in the same cycle as x: the path runs through K1, the checker and the
multiplexer, with no pipeline. The state advances once per clock. Masking a fault costs no
cycles. `err` is an observation output added for test and logging. With no fault present it
stays 0.

## What to watch when implementing it

- **Keep the two copies apart in synthesis.** K1 and K2 compute the same function, and SCSC1 and
  SC2 hold the same state, so a flattening synthesis flow will merge them. The result is a
  single copy with 3 flip-flops, and the checker folds away so that `err` becomes the constant 0.
  The protection exists only if the copies stay physically separate. Synthesise `scsc1`, `sc2`,
  `berger_checker` and `ft_mux` as separate, preserved blocks, for example with hierarchy kept
  and don't-touch on their instances.
- **K1's gate netlist must produce only unidirectional errors.** The claim that every single
  stuck-at fault at a gate pole of K1 gives a unidirectional error holds only for a K1 netlist
  built with a suitable technique: a synthesis method for self-checking machines that limits how
  errors can spread. The RTL states K1's function and says nothing about its gates. Ordinary
  synthesis can build a K1 in which one internal fault flips some outputs up and others down.
- **SCSC1's own flip-flops.** The scheme counts stuck-at faults on the poles of d' among the
  faults it masks, on the grounds that they too appear as unidirectional errors at K1. With an
  RTL-level K1 and the example counter that is not the case. A wrong present state in d' makes
  K1 produce the *correct code word for the wrong state*. The checker accepts it, and both
  registers load the wrong next state. Such faults are therefore not injected by the tests.
  Upsets in SC2's flip-flops, d'', are masked and tested.
- **Path delay faults** are masked only as long as they disturb a single K1 output at a time.
  The clock period must still meet the fault-free delay of K1 → Ch → MUX → flip-flops, plus K2
  → MUX → flip-flops.

## Where this RTL makes its own choices

The scheme fixes the block structure, the selection rule (`1 0` selects SCSC1) and the feedback
of the selected next state to both registers. The following are this design's choices:

- the example machine and its sizes (2 inputs, 2 outputs, 3 state bits);
- the Berger code as the unordered code on K1's outputs, with zeros counted;
- `0 1` as the checker's answer for a non-code word;
- asynchronous active-low reset of both registers to state 0;
- the `err` observation output.

## Simulating

Every module has a self-checking testbench in `tb/`, named `tb_<module>`. Each prints
`TB_RESULT checks=N failures=F` and stops itself with a watchdog if it hangs. For example, with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ft_fsm_pkg.sv tb/tb_ft_seq_top.sv \
          --top-module tb_ft_seq_top -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_k1_comb`, `tb_k2_comb` | all 32 (x, state) pairs against an integer model of the counter; every K1 word is a code word |
| `tb_state_reg` | reset takes effect with no clock edge; one cycle from d to q; a non-zero reset value |
| `tb_scsc1`, `tb_sc2` | the registers load `z_fb`, not their own next state; outputs against the model |
| `tb_berger_checker` | all 256 words classified correctly; all 1,224 unidirectional errors on the 32 code words detected |
| `tb_ft_mux` | every `u1 u2` value selects the right source |
| `tb_ft_seq_top` | 4,000 random cycles at default sizes with faults injected (see below) |

`tb_ft_seq_top` injects faults by forcing internal nets, one module at a time. Each fault lasts
one cycle, or a run of 2–4 cycles for an intermittent fault. The fault classes are:

- a stuck-at set of K1 output bits (unidirectional);
- one K1 output held at its previous value (path delay);
- random errors on K2's outputs;
- an upset of SC2's flip-flops;
- forced checker outputs;
- a forced multiplexer select.

Every cycle, y and z must match the model and both registers must hold the model's state. The
testbench also counts how often each mechanism occurred. These are: outputs taken from SCSC1,
outputs taken from SC2, each fault class taking effect, SCSC1 re-synchronising after a K1 error,
and SC2 re-synchronising after an upset. A mechanism that never occurs counts as a failure.
