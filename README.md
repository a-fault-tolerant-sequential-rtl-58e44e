# Fault-tolerant FSM from one fault-secure copy and one plain copy

This is a synchronous finite state machine that keeps giving correct outputs
when one of its parts has a transient or intermittent fault: a stuck-at fault
on a gate or a flip-flop, or a path delay fault. Triple modular redundancy
does this with three copies and a voter. This design gets by with two copies
and no voter:

* **FSSC1** is a *fault-secure* copy. Under any single fault it can
  produce, its output word is either correct or visibly wrong (not a code
  word). It never produces a wrong word that looks right.
* **SC2** is an ordinary, unprotected copy of the same FSM, with the same
  state codes.
* A **checker (Ch)** looks at FSSC1's word. If the word is a code word, the
  **MUX** passes FSSC1's outputs and next state. Otherwise it passes SC2's.

The point is that only FSSC1 needs self-checking logic. SC2 may be built in
whatever way is cheapest. The checker does not need to be self-testing,
because a wrong checker decision only swaps one correct copy for the other.

```
            +-------------- FSSC1 ---------------+
   x ------>|  K1 (monotone AND-OR) <-- d' bank   |--- y'1..y's ------+-----> Ch --u1u2--+
      |     |        |                  ^         |                   |       ^          |
      |     |        +-- z'1..z'p ------|---------|--+-> XOR -- y's+1 -|-------+          v
      |     +-----------------------------|-------+  |                +--------------->  MUX --> y1..ym
      |     +-------------- SC2 ----------|-------+  +------------------------------->  MUX
      +---->|  K2 (decode/lookup) <-- d'' bank    |--- y''1..y''m, z''1..z''p ------->  MUX
            +-----------------------------^-------+                                    |
                                          +----------- z1..zp (selected next state) ----+
                                          (loaded into both d' and d'')
```

The selected next state z1..zp is loaded into **both** flip-flop banks. After
a fault in FSSC1, the next clock edge therefore gives FSSC1 the correct state
that SC2 computed. A fault lasts for some cycles and then goes away. Once it
is gone, both copies are back in step. No explicit recovery logic is needed.

## Why FSSC1 is fault-secure

There are two encodings, and K1 is built in a particular way.

**State code.** Every state has a code word of the same weight: a (q,p)
constant-weight code with p bits and q ones. This design uses 2-out-of-4.
Its six words 0011, 0101, 0110, 1001, 1010 and 1100 are states 0 to 5.

**Output code.** The m primary outputs get s−m extra check outputs. Together
they form an (h,s) constant-weight word. Here the check outputs are simply
the complements of the primary outputs (m = 3, s = 6, h = 3). In K1 they are
not made with inverters. Each is its own OR of product terms.

**Monotone K1.** K1 has one AND term per transition of the state graph
(present state *i*, input value *v*). The term ANDs only the state lines that
are 1 in state *i*'s code; its 0s count as "don't care". It also ANDs the full
input minterm `x == v`. Each output line and each next-state line is the OR
of the terms whose target code has a 1 there. In a proper state exactly
one term per input value can fire, because any other code word has a 1 that
the present code lacks. A single stuck-at fault on a term, on one of its
inputs, on an OR gate or on a flip-flop can then only push outputs in one
direction (some 0s become 1s, or some 1s become 0s). That is a
*unidirectional* error. It always changes the weight of the output word.
There are two exceptions: the fault may hit only the next-state lines, or it
may do nothing at all.

**Parity of the next state.** The XOR tree adds one more checked bit,
y'ₛ₊₁ = z'₁ ⊕ … ⊕ z'ₚ. For a proper state code its value is fixed: 1 if q is
odd, 0 if q is even. So the checker expects an (h+1, s+1) word for odd q and
an (h, s+1) word for even q. In this design that is 3 ones out of 7. A fault
that changes only the next-state lines, by an odd number of bits, flips this
bit and is caught. Each copy of the XOR tree is fan-out free, so a fault
inside it can corrupt only its single output. The checker then rejects the
word, and SC2's correct word is used.

**Checker outputs.** u1u2 = `10` means "code word". For every other word the
checker gives `01`. Any value other than `10` makes the MUX choose SC2, so a
faulty checker that gives `00` or `11` is harmless as well.

## What happens under each single fault

| Faulty module | What the faulty module gives | Who drives y and z |
|---|---|---|
| K1 gate or d' flip-flop (stuck-at) | unidirectional error: weight of y'1..y's changes, or the next-state parity flips | checker rejects, SC2 |
| K1 path delay | one output line keeps its old value: a single-bit, unidirectional error | checker rejects, SC2 |
| SC2 (anything) | FSSC1 is correct and the checker accepts it | FSSC1 |
| XOR | parity bit wrong, word rejected | SC2, which is correct |
| Ch | any u1u2 value | FSSC1 or SC2, both correct |
| MUX (lines swapped) | some lines taken from the other copy | both copies correct |

This needs two things: only one module is faulty at a time, and each fault
ends before the next begins. Faults on the primary input lines x and
the primary output lines y themselves are outside the model. K1 is
monotone only in the state lines and uses both polarities of x. One case is not covered. A fault that flips an
even number of next-state lines and no output line gives a wrong state of
the right parity. That wrong state is then loaded into both banks. With
the encodings used here, no single fault on a K1 gate or flip-flop does
this. A term that switches on wrongly also switches on its output bits,
which changes the output word's weight. A dead term clears every output.
If you change the state graph or the codes, check this again.

## The example state machine

The architecture works for any state graph. The graph to build is defined
in `rtl/ft_pkg.sv`, and K1 and K2 are generated from it. The graph in this
package is an example:

* a modulo-6 up/down counter;
* `x[1]` enables counting and `x[0]` selects counting down;
* the Mealy output `y` is the binary index of the next state.

This choice makes every fault on a K1 product term visible on the output
word. Two different transitions with the same input lead to different
states, so they give different output words.

To use another FSM, edit the package:

* `stg_next` and `stg_out` define the graph;
* `state_code` gives the state codes. They must be distinct words of one
  weight `Q_W`;
* `out_code` builds the output code;
* `N_IN`, `M_OUT`, `P_ST`, `Q_W` and `NUM_STATES` are the sizes.

The checker weight `CHK_W` follows from them.

## Modules

| File | Role |
|---|---|
| `rtl/ft_pkg.sv` | sizes, codes, example state graph, checker constants |
| `rtl/ft_seq_top.sv` | top: FSSC1, SC2, XOR, Ch and MUX wired together |
| `rtl/fssc1.sv` | fault-secure copy: K1 and the d' flip-flops |
| `rtl/k1_comb.sv` | monotone two-level next-state and output logic with check outputs |
| `rtl/sc2.sv` | plain copy: K2 and the d'' flip-flops |
| `rtl/k2_comb.sv` | exact decode of the state, table lookup, re-encode (built differently from K1 on purpose) |
| `rtl/parity_xor.sv` | fan-out-free XOR tree over z'1..z'p |
| `rtl/code_checker.sv` | constant-weight checker: population count compared with the weight |
| `rtl/ft_mux.sv` | selects FSSC1 on `10`, otherwise SC2, with a per-line select vector |

**Top interface.** `clk`, `rst_n` (asynchronous, active low, puts both banks
in state 0), `x[1:0]` and `y[2:0]`. The output `y` is combinational in `x` and
the present state. The state advances on each rising edge. The checker
outputs and the state are internal. In simulation they can be read
hierarchically, as `u` and `z_sel` in `ft_seq_top`.

## Choices made in this design

These are not fixed by the scheme:

* the example FSM, the 2-out-of-4 state code and the complement output code;
* the reset: asynchronous, active low, to state 0 in both banks;
* the non-code checker value `01`;
* the gate structure of K1 (one product term per transition) and of K2;
* the heap-shaped layout of the XOR tree;
* the per-line select of the MUX.

**Synthesis caution.** Both flip-flop banks load the same signal. A
synthesis tool will merge them into one bank, and may share logic between
K1 and K2, which removes the redundancy. Yosys, for example, merges the
banks. A real implementation must stop this with the flow's dont-touch or
keep-hierarchy settings for `u_fssc1` and `u_sc2`. It is also advisable to
synthesize K1 and K2 separately, since they are meant to be structurally
different.

## Testbenches and simulation

Each module has a self-checking testbench in `tb/`. Every testbench ends
with a `TB_RESULT checks=N failures=M` line. `tb/tb_ref_pkg.sv` is a
reference model of the example counter, written independently of the RTL.

* `tb_k1_comb` and `tb_k2_comb`: every proper state for every input. K1 is
  also checked on non-code states, where the outputs must be the OR of the
  covered transitions (monotone behaviour). K2 is checked to fall back to
  state 0.
* `tb_parity_xor` and `tb_code_checker`: exhaustive. The checker is also
  tried with weight 4, the weight used when state codes have odd weight.
* `tb_ft_mux`: random data under all four checker values.
* `tb_fssc1` and `tb_sc2`: clocked. Sometimes the testbench loads a state
  other than the copy's own next state, which shows that the bank follows
  the MUX.
* `tb_ft_seq_top`: end-to-end test at the default size. It runs 20,000
  cycles with random inputs. In three cycles out of four, one module is
  made faulty for that one cycle with `force`/`release`:
  * a K1 product term inverted;
  * a K1 output line inverted;
  * a path delay, where a K1 line keeps last cycle's value;
  * a d' flip-flop inverted;
  * random SC2 outputs;
  * the XOR output inverted;
  * a random checker output;
  * random MUX line selects.

  A second phase of 20,000 cycles injects *intermittent* faults. Each
  episode holds one fault for 2 to 5 consecutive cycles:
  * a K1 product term, K1 line or d' flip-flop stuck at 0 or 1;
  * one K1 line delayed in every cycle of the episode;
  * a fixed wrong value on SC2, the XOR, the checker or the MUX.

  Gaps with no fault fall between some episodes.

  Every cycle, `y` and the selected next state are compared with the
  reference. After each edge, the testbench also checks that both banks
  hold the same correct state. Fault-free cycles must never raise the
  checker. Every K1 line fault, every flip-flop fault, every delay fault
  that changes a line, and every XOR fault must be caught. In the intermittent phase, every cycle in which a stuck K1 line,
  flip-flop, delayed line or XOR output differs from its fault-free value
  must be caught. SC2 faults must never be flagged. If a fault class, a delay manifestation, an up or down
  wrap-around or a hold never occurred, that counts as a failure. In the
  default run, all of them occur hundreds of times, and the outputs are
  correct in every cycle. A stuck-at-1 product term whose transition has
  the same target as the active one changes nothing, so it is not flagged.
  It is also harmless.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/ft_pkg.sv tb/tb_ref_pkg.sv tb/tb_ft_seq_top.sv \
    --top-module tb_ft_seq_top -Mdir obj_top
./obj_top/Vtb_ft_seq_top
```

Substitute the testbench name for the others. Verilator finds the RTL
modules through `-Irtl`. The end-to-end testbench forces internal
variables, and Verilator reports this with MULTIDRIVEN warnings. That is why
`-Wno-fatal` is needed for that testbench. The warnings are expected there
and say nothing about the RTL.
