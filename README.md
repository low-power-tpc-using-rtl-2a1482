# Low-power test-per-clock BIST with a bit-swapping LFSR

Built-in self-test usually feeds the circuit under test (CUT) with
pseudo-random vectors from an LFSR. Two successive LFSR states differ in about
half their bits, so the CUT switches far more during test than in normal use,
and test power becomes the limit. This design generates *multiple single input
change* (MSIC) patterns instead. A slow pseudo-random **seed** is XORed with a
fast **twisted ring (Johnson) counter**. While one seed is held, the counter
changes exactly one bit per clock, so each new test vector differs from the
previous one in a single CUT input. The seed moves only once every 2n vectors.
Three seed generators are available:

- a bit-swapping LFSR (BS-LFSR), the default;
- a plain LFSR;
- a hybrid rule-90/150 cellular automaton (HCA).

The vectors are applied one per clock (test-per-clock). The responses are
compacted in a MISR. A comparator then checks the signature against a golden
value. The same pattern scheme is also provided for circuits with scan chains.

The RTL is SystemVerilog-2017, synthesizable. It has been checked with
Verilator 5 (lint and simulation) and with the slang front end of Yosys.

## Contents

```
rtl/bist_pkg.sv          shared enums: seed generator choice, controller states, scan phases
rtl/lfsr.sv              Fibonacci LFSR
rtl/bs_lfsr.sv           bit-swapping LFSR (LFSR + swap multiplexers)
rtl/hca.sv               rule 90/150 hybrid cellular automaton, null boundary
rtl/rtrc.sv              reconfigurable twisted ring counter (start / circular shift / normal)
rtl/msic_tpg.sv          test-per-clock MSIC generator: seed XOR counter, seed every 2n clocks
rtl/msic_scan_tpg.sv     MSIC generator for scan chains
rtl/misr.sv              multiple-input signature register
rtl/tra.sv               signature comparator (test response analyzer)
rtl/bist_controller.sv   session FSM: idle, init, running, compare
rtl/bist_top.sv          top: controller + generator + MISR + comparator, and the scan generator
tb/                      one self-checking testbench per module, plus tb_bist_configs
```

## How an MSIC pattern sequence is built

Take n as the number of CUT inputs (36 by default). `msic_tpg` holds two
registers of n bits:

- **seed** `C`, from the seed generator;
- **ring** `K`, from the twisted ring counter `rtrc` in its normal mode.

The pattern is `C ^ K`, one XOR gate per CUT input.

Starting from all zeros, the ring steps through 2n states. In each step, the
complement of its last bit enters at bit 0:

```
k = 0      000...000
k = 1      000...001
k = 2      000...011
  ...
k = n      111...111
k = n+1    111...110
  ...
k = 2n-1   100...000
k = 2n     000...000   (back to the start)
```

Consecutive states differ in exactly one bit, so consecutive patterns do too.
A small counter in `msic_tpg` counts the 2n ring steps. On the clock where the
ring wraps back to zero, it also clocks the seed generator (`seed_step`). The
first pattern of a new group is therefore `C_new ^ 0`. Only at these group
boundaries does a pattern differ from the previous one in several bits.

In the original two-clock picture, the seed generator has its own clock
(Clock1) that fires once per 2n pulses of the counter clock (Clock2). Here both
are one clock with two enables, and seed and ring change on the same edge.

Measured in `tb_msic_tpg` over 3000 patterns of 36 bits:

| source of patterns                  | input bit transitions |
|-------------------------------------|-----------------------|
| LFSR state applied directly         | 53 515                |
| MSIC, plain-LFSR seed               | 3 701                 |
| MSIC, HCA seed                      | 3 700                 |
| MSIC, bit-swapping-LFSR seed        | 3 557                 |

The BS-LFSR on its own also switches less than the plain LFSR.
`tb_bs_lfsr` measures about 23 % fewer output transitions over 5000 steps.
These are bit-transition counts from simulation. No power figures are
produced by this RTL.

## The seed generators

All three have the same interface: `clk`, `rst_n`, `load`, `en`, and `q[N-1:0]`.
Reset and `load` put `SEED` into the register. `en` moves it one step.

**lfsr.** This is a Fibonacci LFSR. It shifts towards bit N-1 and feeds bit 0
with the XOR of the stages selected by `TAPS`. The default `TAPS` realizes the
primitive trinomial x^36 + x^25 + 1, giving a period of 2^36 - 1.

**bs_lfsr.** This is an `lfsr` followed by a row of 2:1 multiplexers. The last
flip-flop `r[N-1]` drives every select line:

- when it is 0, the outputs equal the flip-flops;
- when it is 1, neighbouring outputs trade places: `q[2k] = r[2k+1]` and
  `q[2k+1] = r[2k]`.

The pairs are (0,1), (2,3), …, and both members of a pair must lie below the
select bit. For N = 36 that is 17 pairs. Bit 34 and the select bit 35 pass
straight through. Swapping only reorders the outputs; the register still steps
as a plain LFSR. The pairing is a choice of this implementation.

**hca.** This is a row of cells with a null boundary: a missing end neighbour
reads as 0.

- A rule-90 cell becomes `left ^ right`.
- A rule-150 cell becomes `left ^ self ^ right`.
- Bit i of `RULES` set makes cell i a rule-150 cell.

The default `RULES = 36'h4_208D_A619` was found by searching for a rule vector
whose characteristic polynomial over GF(2) is primitive. That gives the maximal
period 2^36 - 1. The 4-cell example 90-150-90-150 has period 15, which
`tb_hca` checks.

The default seed of all three is `36'h9_E37A_5C4B`. It is dense on purpose. A
1000-pattern session moves the seed only 13 times. With a seed such as 1, the
BS-LFSR select bit would never become 1 within one session.

## The reconfigurable twisted ring counter

`rtrc` is an N-stage shift register. Its first stage is driven by
`start & (m0 ? q[N-1] : ~q[N-1])`:

| m0 | start | mode           | effect                                              |
|----|-------|----------------|-----------------------------------------------------|
| 1  | 0     | start          | zeros shift in; N clocks or more clear the counter   |
| 1  | 1     | circular shift | the code rotates and repeats every N clocks          |
| 0  | 1     | normal         | Johnson counting: 2N single-bit-change vectors       |
| 0  | 0     | (not a named mode) | also shifts zeros in                             |

`en` is the clock enable. A synchronous reset clears the counter.

## A test-per-clock session (`bist_top`)

The CUT is not part of the RTL:

- the pattern leaves on `cut_in`;
- the response must come back on `cut_out` in the same clock (a combinational
  CUT).

`bist_controller` runs one session while `start` is held high:

| state   | length                  | what happens                                                                 |
|---------|-------------------------|------------------------------------------------------------------------------|
| IDLE    | while `start` = 0       | nothing moves                                                                |
| INIT    | N_IN + 1 = 37 clocks    | seed loaded, ring cleared in start mode, MISR cleared                        |
| RUNNING | TEST_LENGTH = 1000 clocks | one pattern per clock; the MISR takes its response; the generator steps    |
| COMPARE | until `start` = 0       | `done` = 1; `result` = 1 if the signature equals `golden_sig`                |

Timing rules:

- `done` rises exactly 37 + 1000 + 1 clocks after the first clock that sees
  `start` high.
- `done` and `result` hold until `start` falls.
- Dropping `start` in any state aborts to IDLE.
- A new session always starts from the same seed and gives the same signature.

The MISR (`misr`) is 7 bits wide by default, one bit per CUT output. On each
enabled clock it computes `sig <= {sig[5:0], sig[6]^sig[5]} ^ d`, which is the
polynomial x^7 + x^6 + 1. `tra` is an equality comparator gated by `done`.
`golden_sig` is an input port, so it can be tied to the constant of a
particular CUT. Find that constant by simulating the fault-free CUT. The
testbenches compute it from a reference model.

Status outputs:

- `state` is the controller state.
- `seed_step` marks each change of seed.
- `signature` shows the MISR contents.

## MSIC patterns for scan chains (`msic_scan_tpg`)

Some circuits have N scan chains of L cells and n primary inputs. For these,
the same idea is arranged differently:

- The seed `C` (n bits) drives the primary inputs.
- An L-bit `rtrc` holds a codeword `K`.
- Loading one vector takes L clocks with `scan_en` high. During these clocks
  the counter runs in circular-shift mode, and chain j receives
  `C[j] ^ K[L-1-j]`. After L clocks:
  - chain j holds `K` rotated left by j, XOR the seed bit `C[j]`;
  - the counter holds `K` again.
- One capture clock follows (`scan_en` low, `capture` high). On it, the counter
  makes one normal-mode step to the next codeword.
- The seed moves on the capture clock of every 2L-th vector.

From one vector to the next within a seed, every chain changes in exactly one
cell.

When `run` rises, L + 1 start-mode clocks come first. The defaults are 36
inputs and 8 chains of 16 cells, and these sizes are this implementation's
choice. `N_CHAINS` must not exceed `N_PI` or `L`. In `bist_top` this generator
sits beside the test-per-clock session, with its own `scan_*` ports. It shares
the seed generator type (`SEED_GEN`) but no state. Scan capture and
compaction of scan-out data belong to the scan circuit and are not included.

## Parameters of `bist_top`

| parameter     | default                  | meaning                                                |
|---------------|--------------------------|--------------------------------------------------------|
| `N_IN`        | 36                       | CUT inputs = width of seed, ring and pattern           |
| `N_OUT`       | 7                        | CUT outputs = MISR width                               |
| `TEST_LENGTH` | 1000                     | patterns per session                                   |
| `SEED_GEN`    | `SG_BSLFSR`              | `SG_LFSR`, `SG_BSLFSR` or `SG_HCA`                     |
| `LFSR_TAPS`   | `36'h8_0100_0000`        | LFSR feedback mask (x^36+x^25+1)                       |
| `HCA_RULES`   | `36'h4_208D_A619`        | 1 = rule-150 cell                                      |
| `SEED`        | `36'h9_E37A_5C4B`        | seed loaded at the start of each session (non-zero)    |
| `MISR_TAPS`   | `7'h60`                  | MISR feedback mask (x^7+x^6+1)                         |
| `SCAN_PI`, `SCAN_CHAINS`, `SCAN_L` | 36, 8, 16 | sizes of the scan-chain generator                 |

The defaults fit a 36-input, 7-output circuit such as the ISCAS-85 benchmark
c432. For c3540 (50 inputs, 22 outputs), use `N_IN = 50` and `N_OUT = 22`,
together with polynomials of those sizes. The configuration used in
`tb_bist_configs` is:

- `LFSR_TAPS = 50'h3_0000_00C0_0000` (x^50+x^49+x^24+x^23+1);
- `HCA_RULES = 50'h3278_FB47_EC80`;
- `MISR_TAPS = 22'h30_0000` (x^22+x^21+1).

When you change `N_IN`, change `LFSR_TAPS`, `HCA_RULES` and `SEED` with it. The
defaults are cut to N_IN bits, which only gives a sensible polynomial at 36.

## Where this implementation makes its own choices

The original scheme fixes the structure: the blocks, the MSIC formation, the
counter modes, the bit-swapping rule, the 90/150 null-boundary automaton, the
36-bit width and the 1000-pattern session. The following points are this
implementation's own:

- **Polynomials, rule vector, seed, MISR structure.** None are specified in the
  scheme.
- **INIT state.** The controller has an INIT state, so that the counter's start
  mode gets its more-than-n clocks. The scheme names only idle, running and
  compare.
- **COMPARE hold.** COMPARE holds `done` until `start` falls.
- **Golden signature as a port.** It is an input rather than a stored
  constant.
- **Single clock.** One clock with enables replaces the two generator clocks.
- **Swap pairing.** The BS-LFSR pairs exclude the select bit. For even N, bit
  N-2 also passes through.
- **Scan generator details.** The chain-to-counter-bit pairing, the one capture
  clock per vector and the default sizes.
- **Synchronous reset.** All reset is synchronous and active low (`rst_n`).

## Verification

Two assertions are part of the RTL:

- `msic_tpg` asserts the single-input-change property. While the ring holds a
  Johnson codeword, every pattern inside a seed group must differ from the one
  before in exactly one bit.
- `bist_controller` asserts that initialise, run and compare never overlap.

Simulate with `--assert` to enable them.

Every module has a self-checking testbench that prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. The testbenches compare
against bit-level reference models that are written independently of the RTL
(`tb/bist_ref_pkg.sv`):

- `tb_lfsr`: the 8-bit LFSR (x^8+x^6+x^5+x^4+1) must have period 255; the
  36-bit LFSR must match the model step by step; load and hold.
- `tb_bs_lfsr`: the swapped output matches the model for 5000 steps, and the
  swapping reduces transitions.
- `tb_hca`: the Wolfram rule tables are used as the model; the 4-cell period
  must be 15.
- `tb_rtrc`: all three modes; the single-bit-change property; return to zero
  after 2N steps.
- `tb_misr`: the per-bit model; clear and hold; a single response error must
  change the signature.
- `tb_tra`: exhaustive over 7 bits.
- `tb_bist_controller`: the state lengths (37 init, 1000 running), `done`
  latency, hold, abort and restart.
- `tb_msic_tpg`: three generators side by side against the model, over 3000
  patterns. Checks: one bit change inside a group; seed every 72 clocks; no
  repeats within a group.
- `tb_msic_scan_tpg`: model scan chains are checked on each capture against
  the rotated codeword XOR the seed bit.
- `tb_bist_top`: the full default configuration end to end. It is described
  below.
- `tb_bist_configs`: complete pass and fail sessions for six configurations.
  These are the 36/7 and 50/22 sizes, each with LFSR, BS-LFSR and HCA seeds.

`tb_bist_top` runs at the default parameters. It checks every applied pattern
against the model and checks the 1038-clock latency. It runs these sessions:

- pass;
- abort in mid-run;
- pass again;
- a CUT with a stuck-at fault, which must fail;
- a wrong golden value, which must fail.

It then runs the scan generator for three seeds. It counts how often each
mechanism occurred: init, single input change, seed change, bit swap, ring
wrap, pass, fail, abort, scan shift/capture/seed change. Every one must have
occurred at least once. The CUT in these testbenches is a small stand-in
function (parities plus AND terms) defined in `bist_ref_pkg`. It is not c432
or c3540.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/bist_pkg.sv tb/bist_ref_pkg.sv tb/tb_bist_top.sv --top-module tb_bist_top
./obj_dir/Vtb_bist_top
```

Every simulation finishes in well under a second.

## Limits

- The benchmark circuits themselves (c432, c3540) are not included. Their
  netlists come from the ISCAS-85 suite. Connect them to `cut_in`/`cut_out`,
  then simulate the fault-free circuit once to obtain `golden_sig`.
- The area and power comparisons the scheme was evaluated with came from
  180 nm synthesis and gate-level power analysis. They cannot be reproduced
  from RTL simulation. Only the bit-transition counts above are given here.
- Driving the CUT with an LFSR, BS-LFSR or HCA alone, without the ring
  counter, is a comparison point rather than a mode of `bist_top`. The three
  generators are available as separate modules for that.
