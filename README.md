# Digital lac operon: the lac control region as a finite state machine

The *lac* operon of *E. coli* switches the genes for lactose use on and off.
Three kinds of protein decide this by binding to the DNA just upstream of
the genes:

- the lac repressor, which blocks transcription;
- CAP, which boosts it;
- RNA polymerase, which transcribes.

This design turns that binding process into a synchronous circuit. A
19-state machine holds which protein sits on which site. Each clock it
makes one transition, chosen by:

- two environment inputs: is repressor present (R), is CAP present (C);
- five pseudo-random bits from an on-chip LFSR.

When the polymerase leaves the promoter, the machine reports a
transcription event on a 2-bit output. That output is graded by how much
CAP helped. Run long enough under random conditions, the circuit behaves
like a stochastic model of the operon: how often each state is visited, and
how often transcription fires, can be counted in hardware.

## The state space

The control region is abstracted as three sites. Each state is named by
three letters, one per site:

| letter | site        | values                                   |
|--------|-------------|------------------------------------------|
| 1st    | first outer | `e` empty, `r` repressor, `c` CAP         |
| 2nd    | promoter    | `e` empty, `p` RNA polymerase             |
| 3rd    | third outer | `e` empty, `r` repressor, `c` CAP         |

That gives 3 x 2 x 3 = 18 states. A 19th state, `fef`, holds the two outer
sites together. It is entered from `eee` and left only when repressor is
absent. The 5-bit codes of the states are in `rtl/lac_pkg.sv`
(`lac_state_e`). The other 13 codes are unused; if one is ever reached, the
machine goes to `eee`.

## The `mem` register: deferred and fresh bindings

The hardest part of the machine to follow is the 3-bit register `mem`. It
carries one fact from one transition to the next:

| `mem` | meaning                                                        |
|-------|----------------------------------------------------------------|
| `000` | nothing pending                                                |
| `100` | a repressor arrived but its binding was deferred               |
| `101` | a repressor has just bound at the first site                   |
| `110` | a repressor has just bound at the third site                   |

It works like this:

- **Arrival with a free outer site** ({R,C} = 10). The random bits decide
  what happens. With `f[0]=0, loc[0]=0` the repressor binds at once. With
  `f[0]=0, loc[0]=1` it is deferred (`mem` = 100). With `f[0]=1` it binds and
  is recorded as fresh (101 or 110). If a deferral is already pending, the
  repressor binds.
- **Arrival from `eee` or `epe`.** Here both outer sites are free. The whole
  of `f` and `loc` is used to choose the site, the deferral or, from `eee`,
  the looped state `fef`.
- **Arrival with no site to bind.** A first arrival is deferred. A second
  one triggers the state's other pending event instead. In states holding
  polymerase, that event is the polymerase leaving.
- **Repressor absent** ({R,C} = 00). A bound repressor leaves. There is one
  exception: with a deferral pending and `loc[0]=1`, the deferral is
  cancelled instead (`mem` back to 000). A repressor recorded as fresh
  clears `mem` when it leaves.
- **CAP states with {R,C} = 00.** `sel` decides between clearing a pending
  `mem` and letting CAP go.

`mem` therefore gives the repressor a short memory. A repressor that just
arrived behaves differently from one that has been bound for a while.

## The output

`out` is 00 on every transition except those in which the polymerase
leaves the promoter and transcribes:

| `out` | transitions                                         | reading                |
|-------|-----------------------------------------------------|------------------------|
| `01`  | `epe -> eee`, `rpe -> ree`                          | basal transcription    |
| `10`  | `epc -> eec`, `cpe -> cee`, `rpc -> rec`            | CAP at one site        |
| `11`  | `cpc -> cec`                                        | CAP at both sites      |

`out` is registered. It shows the code of the transition made at the last
clock edge.

## Blocks

| module    | file               | what it is                                              |
|-----------|--------------------|---------------------------------------------------------|
| `dlo`     | `rtl/dlo.sv`       | top: the Lac FSM fed by the LFSR                         |
| `lac_fsm` | `rtl/lac_fsm.sv`   | the 19-state machine with `mem` and `out`                |
| `lfsr`    | `rtl/lfsr.sv`      | leap-forward Fibonacci LFSR, the random bit source       |
| `lac_pkg` | `rtl/lac_pkg.sv`   | state enum, `mem` and `out` codes, structs               |

### `dlo` (top)

| port    | dir | width | meaning                                              |
|---------|-----|-------|------------------------------------------------------|
| `clk`   | in  | 1     | one FSM transition per rising edge                   |
| `rst`   | in  | 1     | synchronous, active high: `eee`, `mem`=000, `out`=00, LFSR to seed |
| `r_in`  | in  | 1     | R: lac repressor present                             |
| `c_in`  | in  | 1     | C: CAP present                                       |
| `state` | out | 5     | current state code                                   |
| `mem`   | out | 3     | `mem` register                                       |
| `out`   | out | 2     | output code of the last transition                   |
| `rnd`   | out | 5     | `{f, loc, sel}` to be used at the next edge          |

The parameters `LFSR_WIDTH` (16), `LFSR_TAPS` (`16'hD008`, the polynomial
x^16+x^15+x^13+x^4+1) and `LFSR_SEED` (`16'hACE1`) set the random source.
The LFSR advances five positions per clock, so every transition draws five
new bits: `f = q[4:3]`, `loc = q[2:1]`, `sel = q[0]`. At 5 positions per
clock the 16-bit register repeats after 13107 clocks. For longer
independent runs, use a longer register (set `LFSR_WIDTH` and matching
taps).

R and C are plain inputs. To run the machine "in random conditions",
drive them from a second random source, as the end-to-end test bench does.

### `lac_fsm`

`lac_fsm` is the machine on its own, with `f`, `loc` and `sel` as inputs.
The next-state logic is one `always_comb` block with a `case` per state. It
has four helper functions for the patterns that recur across states:

- `bind_outer`: a repressor arrives at a free outer site;
- `release_one`: a single bound repressor leaves;
- `release_two`: one of two bound repressors leaves;
- `defer_or`: the arrival has no site to bind.

## How far to trust it, and where it departs from its source

The transition table comes from a published 19-state truth table. That
table fixes:

- the state codes;
- the inputs and the 3-bit `mem` register;
- the result of every listed input combination.

This design's own choices are listed below. All of them are also noted in
the file headers.

- **Reset, clocking, registered output.** The published table has an
  "any state, any input" row that goes to `eee` / 000 / 00. Here it is a
  synchronous active-high reset. `out` is registered.
- **Unlisted combinations** hold state and `mem` and give `out` = 00. In
  random runs from reset, no unlisted combination ever occurs, once the
  row below is restored.
- **Rows split on a random bit.** A few pairs of rows had the same
  conditions but different results. They are split on `loc[0]` or `f[0]`,
  exactly as the neighbouring states split the same pair. These are
  `eee` with CAP arriving, `eee` with a pending repressor, and the deferral
  rows of `eer`, `eec` and `ree`.
- **Rows completed by analogy.** Three rows lacked a result or were
  missing. Each follows the matching row of its neighbouring state:
  - `rpc` with nothing pending and {R,C} = 00, `sel`=0: goes to `epc`, like
    `rec` goes to `eec`;
  - `cpe` likewise: goes to `epe`, like `cee` goes to `eee`;
  - `cer` with `mem`=100 and `sel`=1: goes to `eer`, like `cpr` goes to
    `epr`.
- **Release rows of `ree` and `cpr`.** The source gives `ree` a release
  row for `mem`=110 and `cpr` one for `mem`=101. Every other one-repressor
  state releases on the value it stores when the repressor binds. `ree` is
  entered with 101 and `cpr` with 110. The design follows that pattern: 101
  for `ree`, 110 for `cpr`. Otherwise a fresh repressor in those two states
  could never leave under {R,C} = 00.
- **The random source.** An LFSR supplies `f`, `loc` and `sel`, as
  published. The following are this design's choices:
  - its length, polynomial and seed;
  - the five-step leap per clock;
  - the bit assignment.
- **Interpretation.** The three-site reading of the state names and the
  meanings of `mem` and `out` above are interpretations. They rename
  nothing and change no transition.

The source describes the machine only at the level of its truth table. It
says nothing about clock rate, FPGA resources or how R and C were
generated. The design has not been checked against any measured operon
behaviour, only against the table.

## Verification

Each test bench prints `TB_RESULT checks=N failures=M` and has a watchdog.

- `tb/tb_lac_fsm.sv` runs 300,000 random transitions, with random resets.
  A shadow copy of the state is stepped by a separate reference model,
  `tb/lac_ref_pkg.sv`, in lock step with the DUT. That model holds the
  truth table as data, one row per call, matched first-hit-wins. Each cycle
  the test compares `state`, `mem` and `out`. It fails if any table row is
  never exercised or any state never visited.
- `tb/tb_lfsr.sv` checks two instances against a bit-serial model. The
  default instance returns to its seed after exactly 13107 clocks. A 5-bit
  instance is checked at one step per clock, period 31. Both must hold
  when `en` is low, reload on reset and never reach zero. The LFSR also
  asserts that it never reaches the all-zero state.
- `tb/tb_dlo.sv` is the end-to-end test at default parameters. It runs six
  phases of 20,000 transitions:
  - random R and C;
  - each fixed environment ({R,C} = 00, 01, 10, 11) in turn;
  - random R and C again.

  Its own 16-bit LFSR model and the table model are compared with `rnd`,
  `state`, `mem` and `out` every clock. It counts how often each mechanism
  occurs: every state, each nonzero `out` code, deferral, fresh binding at
  each site, a cancelled deferral, entry into `fef`, and reset. It fails
  if any count is zero.

To run one with Verilator, for example the top:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/lac_pkg.sv tb/lac_ref_pkg.sv rtl/lfsr.sv rtl/lac_fsm.sv rtl/dlo.sv \
  tb/tb_dlo.sv --top-module tb_dlo -o sim
./obj_dir/sim
```

The reference table in `tb/lac_ref_pkg.sv` is the readable form of the
machine. To change a transition, edit the matching branch in
`rtl/lac_fsm.sv` and the matching `add(...)` row, then rerun
`tb_lac_fsm`.
