# Reduced BIST: one MISR per loop

A circuit whose registers form loops is hard to self-test with pattern generators on
its inputs and a signature register on its outputs alone: the patterns reaching the logic
inside a loop are whatever the loop's own registers happen to hold. The classic fix puts
a CBILBO (concurrent BILBO) in every loop, a register that generates patterns and compacts
responses in the same clock. CBILBOs are expensive because every bit needs a second
flip-flop.

The reduced-BIST method ("Test Register Insertion at RTL Based on Reduced BIST",
Paraman, Ooi, Sha'ameri and Fujiwara) replaces the CBILBO with a plain MISR (multiple-input
signature register). A MISR that is fed by the logic in front of it compacts that logic's
response, and its state is already a pseudo-random word that serves as the pattern for the
logic behind it. So one existing register per loop, converted into a MISR, breaks the loop
for test purposes. The conversion costs three gates per bit. Sometimes several loops share
one wire. In that case a single *transparent* MISR inserted on the wire can break all of
them at once. It costs more per bit than a conversion, so it only pays when it replaces
enough conversions. A small cost model makes that choice.

This repository holds that method's test registers and the example circuit it is
explained on, fully wired for a test-per-clock self-test: all logic is tested at once,
one pattern per clock.

## The example circuit

Two 8-bit primary inputs, three combinational blocks, two registers:

```
          PI1                 PI2
           |                   |
         [TPG1]              [TPG2]          (pattern generators, test mode only)
           |                   |
   +---> CLB1                CLB2 <------+
   |       |                   |         |
   |      R2 (T5)              |         |
   |       |                   |         |
   |      CLB3 <---------------+         |
   |       |                             |
   |     [T7]      (transparent MISR, alternative configuration)
   |       |                             |
   +-------+                             |
           |                             |
          R3 (T6) ----------------------+
           |
           +--> PO
           +--> [RA]   (response analyser, test mode only)
```

* `R2 <= CLB1(PI1, CLB3 out)`: loop 1 runs R2 -> CLB3 -> CLB1 -> R2.
* `R3 <= CLB3(R2, CLB2(PI2, R3))`: loop 2 runs R3 -> CLB2 -> CLB3 -> R3.
* The CLB3 output lies on both loops.

There are two ways to give every loop a test register:

| configuration | test registers | added gate equivalents |
|---|---|---|
| `DFT_MISR_LOOPS` | R2 becomes MISR T5, R3 becomes MISR T6 | 2 x 5 x W = 80 at W = 8 |
| `DFT_TRANSPARENT` | transparent MISR T7 on the CLB3 output, before the branch back to CLB1 | 12 x W = 96 at W = 8 |

The parameter `DFT_CHOICE` defaults to `DFT_AUTO`. That setting compares the two costs
at elaboration time and builds the cheaper configuration. For this circuit the cheaper one
is always the two MISRs, at any width. Each cost counts only the gates added to the circuit,
in 2-input-NAND equivalents.

In both configurations an LFSR pattern generator sits on each primary input, and a MISR
response analyser sits on the primary output.

## The test registers

### MISR built from an existing register (`misr_test_register`)

The original flip-flop stays. In front of each bit sit one AND, one NOR and one XOR. This
is the BILBO cell, controlled by two mode bits `{B1,B2}`:

```
d[i] = (B1 & z[i]) ^ ~(B2 | ~s[i])        s[i] = q[i-1],  s[0] = B1 ? feedback : scan_in
feedback = ^(q & TAPS)
```

| `{B1,B2}` | `tr_mode_e` | next state |
|---|---|---|
| 11 | `TR_NORMAL` | `z` (the register as it was) |
| 10 | `TR_MISR` | `z ^ {q[W-2:0], feedback}` |
| 00 | `TR_SHIFT` | `{q[W-2:0], scan_in}` |
| 01 | `TR_CLEAR` | 0 |

The self-test uses only normal and MISR mode. Shift and clear come with the cell and are
brought out, but the example circuit does not use them. The cost model charges 5 units per
bit: AND 1, NOR 1 and XOR 3. It does not charge the bit-0 feedback XOR tree or the
feedback/scan-in multiplexer, so the real overhead is a little higher.

### Transparent MISR (`transparent_misr`)

This is a new register row inserted on a wire. Each bit adds one XOR, one flip-flop and
one multiplexer:

```
r <= a ^ {r[W-2:0], ^(r & TAPS)}      (always clocked)
y  = test ? r : a
```

In normal mode it is a wire, so it adds no latency. In test mode the logic downstream sees
the MISR state, and the MISR compacts what arrives on the wire. It costs 12 units per bit:
XOR 3, multiplexer 3 and flip-flop 6.

### Pattern generators and response analyser

* `lfsr_tpg` is a maximal-length LFSR with a bypass multiplexer. In test mode it outputs its
  state and steps once per clock. In normal mode it passes the primary input through and
  holds its state. After reset it holds `SEED`.
* `misr_ra` is a MISR that uses the same equation as the test registers. It compacts
  while `en` is high and holds its value otherwise, so the signature can be read after a
  session.

All of these registers shift towards the MSB. The new bit 0 is the XOR of the state bits
selected by `TAPS`. By default `TAPS` comes from `bist_pkg::lfsr_taps(W)`. That table
holds primitive polynomials for widths 2 to 32, with mask bit k-1 standing for x^k. At
W = 8 the polynomial is x^8+x^6+x^5+x^4+1, mask `8'hB8`.

## Running a self-test

Top module: `reduced_bist_circuit`.

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | rising edge |
| `rst_n` | in | 1 | asynchronous, active low: registers go to 0 and generators load `SEED1`/`SEED2` |
| `test` | in | 1 | 1 = self-test, 0 = normal operation |
| `pi1`, `pi2` | in | W | primary inputs |
| `po` | out | W | primary output (state of R3/T6) |
| `signature` | out | W | response analyser |

A session works like this:

1. Pulse `rst_n` low.
2. Hold `test` high for N clocks. On every clock the generators step, the test registers
   take one MISR step, and the analyser takes in `po`.
3. Drop `test`. The circuit returns to normal operation, and `signature` holds the session's
   result for comparison with a known-good value.

With the same N after reset, the session always gives the same signature. The
primary-input values do not matter during the session.

The design has no session counter and no pass/fail comparator. The environment chooses
N and knows the good signature. For the defaults (W = 8, seeds `8'h01`/`8'h80`, automatic
choice), the reference model in `tb/` gives signature `8'h30` after 7000 clocks.

Each LFSR repeats after 2^W - 1 clocks, which is 255 at W = 8. Longer sessions therefore
reuse patterns. For sessions of tens of thousands of distinct patterns, raise `W`.

## How well the self-test detects faults

`tb_reduced_bist_coverage` injects stuck-at-0 and stuck-at-1 faults on every bit of the
three CLB outputs, 48 faults in all, into both configurations. For each fault it runs a
session from reset and compares the signature with the fault-free one after 20, 60, 255
and 1000 clocks. Each length counts as its own session, because a real test reads the
signature only at the end.

| session length | detected, one MISR per loop | detected, transparent MISR |
|---|---|---|
| 20 | 48 / 48 | 48 / 48 |
| 60 | 48 / 48 | 48 / 48 |
| 255 | 48 / 48 | 48 / 48 |
| 1000 | 48 / 48 | 47 / 48 (1 aliased) |

The one miss is CLB3 bit 3 stuck-at-1 in the transparent configuration, at 1000 clocks.
The same fault is caught at every shorter length. The faulty response stream happens to
compact to the good signature, which is called aliasing. With an 8-bit signature the
chance is about 1 in 256 per faulty stream. A wider signature register makes aliasing
rarer.

Word-level output faults are easy targets. Gate-level faults inside the CLBs need more
patterns, and fault coverage then grows with session length.

The patterns inside the loops come from MISR states, so they depend on the responses that
came before. Some combinations are therefore never produced, and that is the price paid
for dropping the CBILBO. In practice, in a fault-free 1000-clock session CLB3 receives
996 distinct operand pairs with one MISR per loop, and 994 with the transparent MISR.
That is far more than the 255 patterns an 8-bit input generator repeats through.

## What is fixed by the method and what is chosen here

These parts follow the method:
* the loop structure of the example;
* the kind and position of every test register (T5/T6, or T7 ahead of the feedback
  branch);
* the gate make-up and per-bit costs of both register kinds;
* the choice of the cheaper set;
* LFSRs on the inputs and a MISR on the output;
* testing everything at once, one clock per pattern.

These are this design's own choices:
* **CLB functions.** The method treats CLB1 to CLB3 as arbitrary combinational logic.
  Here CLB1 is `a + b`, CLB2 is `a ^ rotl(b, 1)` and CLB3 is `a - b`, so that the example
  has real logic.
* **Width.** 8 bits (`W`), with every module parameterised.
* **Gate wiring.** The gates of the MISR cell are wired as in the standard BILBO cell.
  That wiring supplies the shift and clear modes.
* **Polynomials, seeds and reset.** The polynomials, the seeds and the asynchronous
  active-low reset are this design's.
* **Test control.** One `test` input drives the generators, the test registers and the
  analyser together.
* **Bypass multiplexers.** The generators pass the primary inputs through in normal mode.
* **Free-running T7.** The transparent MISR's flip-flops are clocked in both modes. Reset
  makes a session repeatable.
* **CLB2's destination.** CLB2 feeds CLB3, so each loop holds exactly one of R2 and R3.
  That is the reading under which converting both R2 and R3 is needed at all. If CLB2 fed
  R2 instead, R2 would sit on both loops, and converting R2 alone would be enough.

## Not included

* The design-time flow that finds the test registers for an arbitrary circuit: a register
  graph with "dummy" vertices for possible transparent registers, and a minimum-cost
  feedback vertex set. It is software, not hardware. For this example, its result is the
  cost comparison above.
* The benchmark circuits (ITC'99 b01 to b14) that the method was evaluated on. Their logic
  is not reproduced here. The test-register modules can be instantiated at any width from
  2 to 32 to convert such a circuit's registers by hand.
* Gate-level fault simulation. The coverage testbench injects only word-level faults on
  the CLB outputs.

## Files

| file | contents |
|---|---|
| `rtl/bist_pkg.sv` | mode and configuration enums, gate costs, polynomial table |
| `rtl/misr_test_register.sv` | register converted into a MISR (BILBO cell) |
| `rtl/transparent_misr.sv` | inserted transparent MISR |
| `rtl/lfsr_tpg.sv` | input pattern generator |
| `rtl/misr_ra.sv` | output response analyser |
| `rtl/clb1.sv`, `rtl/clb2.sv`, `rtl/clb3.sv` | the example's combinational blocks |
| `rtl/reduced_bist_circuit.sv` | top: the example circuit made self-testable |
| `tb/reduced_bist_ref_pkg.sv` | clock-by-clock reference model of the top |
| `tb/tb_*.sv` | self-checking testbenches: one per module, plus `tb_misr_widths`, `tb_reduced_bist_coverage` and `tb_reduced_bist_full` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and exits. For example:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_reduced_bist_circuit \
    rtl/bist_pkg.sv tb/reduced_bist_ref_pkg.sv tb/tb_reduced_bist_circuit.sv
./obj_dir/Vtb_reduced_bist_circuit
```

List the packages first. Verilator finds the modules in `rtl/` through `-Irtl`. For a
unit testbench, use `rtl/bist_pkg.sv tb/tb_<module>.sv`.

What each testbench checks:
* **`tb_misr_test_register`**: random modes and data against the mode table. Also checks
  that in MISR mode with zero input the register runs through all 255 states.
* **`tb_transparent_misr`**: with `test` low, the output equals the input in the same
  cycle. With `test` high, the output follows the MISR model, and `test` toggles at random.
* **`tb_lfsr_tpg`**: the bypass works and the state holds in normal mode. The generator
  covers 255 distinct non-zero patterns in 255 clocks.
* **`tb_misr_ra`**: compaction and hold match the model. A single flipped bit in a
  64-word stream changes the signature.
* **`tb_clb1` to `tb_clb3`**: corner and random operands.
* **`tb_reduced_bist_circuit`**: three instances side by side (automatic, forced MISRs,
  forced transparent), compared with the reference model on every clock. The run covers
  normal operation, sessions, mode switches both ways, signature hold and resets, and
  counts each of them. It also checks the cost figures (80 and 96), the automatic choice,
  repeatable signatures, and that the two configurations produce different signatures.
* **`tb_misr_widths`**: the three register kinds at 3 and 10 bits, sizes typical of
  small controller state registers. Each runs through 7 or 1023 distinct states, and the
  converted register loads its data in normal mode.
* **`tb_reduced_bist_coverage`**: the fault-injection runs described above.
* **`tb_reduced_bist_full`**: the top at its default parameters runs normal operation and
  then a 7000-clock session twice, compared with the model on every clock.
