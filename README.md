# Self-testing, self-repairing TSV link

Dies in a 3-D stack talk through through-silicon vias (TSVs). Some TSVs come
out of manufacturing broken: open, shorted to a rail, or bridged to a
neighbour. This RTL builds a die-to-die TSV link that finds its own broken
TSVs and routes the data around them. It also builds a stack of such links
that are all tested at once.

- **Built-in self-test.** The lower die drives pseudo-random vectors on every
  TSV. The upper die XORs what arrives with its own copy of the same vectors.
  The result is an *error signature* with one bit per TSV (1 = defective).
- **Built-in self-repair.** The data TSVs come in groups. Each group has one
  spare TSV. One broken TSV in a group is repaired by shifting its bit and
  the bits above it one TSV along, onto the spare. More broken TSVs than
  spares are handled by **time division**: the group's bits go across in two
  consecutive slots. In the second slot every healthy TSV is free again, so
  all of them act as spares.

The design follows the technique of the paper *An Efficient Fault Tolerance
Technique for Through-Silicon-Vias in 3-D ICs*. Its defaults are that
paper's example: 8 data bits, in groups of 4 data TSVs plus 1 spare. Where
the paper gives only what a block does, the details are this design's own.
They are listed under "Where this design departs or decides" below.

## The link at a glance

```
 lower die                                           upper die
 ----------------------------                        -----------------------------
 in_valid/in_data/in_ready                           out_valid/out_data
        |                                                    ^
   bisr_tx  --- test-pattern mux <- lfsr                bisr_rx (lane select + per-bit FIFO)
        |     repair muxes, slot control                     ^
        v                                                    |
  tsv_data_tx[DATA_BITS]  ====== TSVs (outside) ======>  tsv_data_rx
  tsv_spare_tx[GROUPS]    ==============================> tsv_spare_rx ---> ibist_analyzer
  tsv_ctrl_tx[3]          ==============================> tsv_ctrl_rx        (lfsr copy, XOR,
                                                                              signature reg)
 ibist_controller (test sequencing)      repair_register (signature + decoded selects,
                                           one repair_decoder per group)
```

`tsv_repair_top` holds everything except the TSVs. The values the lower die
drives leave on `tsv_*_tx`. The values the upper die receives come in on
`tsv_*_rx`. Whatever sits between them (a real stack, a board, or the fault
model used by the testbenches) is outside the RTL.

**TSV numbering.** The signature and the LFSR vectors are
`DATA_BITS + GROUPS` bits wide:

- bits `0 .. DATA_BITS-1` are the data TSVs;
- bit `DATA_BITS + g` is the spare of group `g`.

Inside group `g`, the TSVs are called *lanes*:

- lanes `0 .. GROUP_BITS-1` are data TSVs `g*GROUP_BITS + lane`;
- lane `GROUP_BITS` is the group's spare.

**Control TSVs.** The three control TSVs carry:

| bit | name         | meaning                                     |
|-----|--------------|---------------------------------------------|
| 0   | `CTRL_TEST`  | self-test vectors are on the TSVs           |
| 1   | `CTRL_VALID` | a data slot is on the TSVs                  |
| 2   | `CTRL_SLOT`  | that slot is slot 1, the second of a word   |

The control TSVs are taken to be good. They are not tested or repaired.

## The stack

`tsv_stack_top` is the top level. It stacks `LAYERS` dies (default 3: a
bottom, a middle and a top die) joined by `LAYERS-1` links. Each link is one
`tsv_repair_top`, indexed `k = 0 .. LAYERS-2`, and joins die `k` to die
`k+1`.

- **Parallel test.** One `bist_start` pulse tests every link in the same
  cycles. Each middle die checks the vectors arriving from below while it
  drives its own vectors upward. Testing the whole stack therefore takes
  `TEST_VECTORS + 1` cycles, whatever the number of dies.
- **Status.** `test_done` rises when every link has loaded its repair
  register. `repair_fail` is the OR of the per-link `link_fail`. Each link
  keeps its own repair register and is repaired independently.
- **Data.** The data and TSV ports of every link are arrays indexed by `k`.
  The logic of die `k` sends on `in_*[k]`, and the logic of die `k+1`
  receives on `out_*[k]`.
- **Passing data upward.** To pass data up through a die, connect
  `out_*[k-1]` to `in_*[k]` through a small FIFO. The FIFO is needed
  because a link in time division takes words at half rate.

## Operating sequence

1. **Before any test.** Out of reset the repair register holds an all-zero
   signature, so every bit uses its own TSV. Data can flow right away.
2. **Self-test.** A pulse on `bist_start` makes `ibist_controller` raise
   test mode for `TEST_VECTORS` cycles (default 32). `test_busy` is high
   and no data is accepted.
3. **Load.** In the next cycle `repair_register` stores the analyzer's
   signature. At the same time it stores the selects that one
   `repair_decoder` per group works out from it.
4. **Repaired operation.** `test_done` is high. `error_sig`,
   `group_mode[]`, `multi_defect` (time division in use) and `repair_fail`
   (some group is beyond repair) report the outcome.

Another `bist_start` re-runs the test at any time. A word caught between its
two slots is dropped from the TSVs. It is sent again from slot 0 afterwards,
because the sender still holds it under the handshake.

## Self-test vectors and the signature

Both dies hold an `lfsr` with the same seed. While test mode is low, each
LFSR is held at its seed. From the first test cycle, each advances one
vector per cycle. The sender's LFSR is driven by the controller's test mode;
the receiver's by the test control TSV. So the two stay in step without the
expected vector ever crossing the TSVs.

- **Sequence.** A Fibonacci LFSR of `DATA_BITS + GROUPS` bits, with
  maximal-length taps for the widths in `tsv_pkg::lfsr_taps`. Each state is
  sent twice: once as it is, then bitwise complemented. Within any two
  consecutive vectors, every TSV therefore carries both a 0 and a 1, so
  every stuck-at defect shows up whatever the link width.
- **Seed.** `0101…`, so neighbouring TSVs start with opposite values. A
  short between neighbours shows up on the first vectors.
- **Signature.** `ibist_analyzer` XORs each received vector with its own
  copy. It ORs the result into the signature register. The first test cycle
  overwrites the register, which clears the previous result.

## Repair mapping: what goes on which TSV

This is the core of the design. `repair_decoder` looks at one group's
`GROUP_BITS + 1` signature bits and deals the group's data bits out to the
healthy lanes:

1. List the healthy lanes in order: data lanes `0..GROUP_BITS-1` first, the
   spare last. Call their number `H`.
2. Bits `0..H-1` go in **slot 0**, on healthy lanes `0..H-1`.
3. Bits `H..GROUP_BITS-1` go in **slot 1**, on healthy lanes `0, 1, …`.

The repair classes follow from `H`:

| case (N = `GROUP_BITS`)           | `mode`        | slots | effect                                              |
|-----------------------------------|---------------|-------|-----------------------------------------------------|
| no defective data TSV             | `MODE_NORMAL` | 1     | every bit on its own TSV                            |
| one defective data TSV, good spare| `MODE_SPARE`  | 1     | bits from the faulty TSV up move one TSV up; the last moves onto the spare |
| `N/2 <= H < N`                    | `MODE_TDMA`   | 2     | two bundles: `H` bits, then `N-H` bits               |
| `H < N/2`                         | `MODE_FAIL`   | 2     | two bundles are not enough; `repair_fail` set        |

Worked example, one group of four with TSVs 1 and 2 broken (lanes 1 and 2).
The healthy lanes are 0, 3 and the spare (S), so `H = 3`:

| bit | slot | lane |
|-----|------|------|
| 0   | 0    | 0    |
| 1   | 0    | 3    |
| 2   | 0    | S    |
| 3   | 1    | 0    |

So the first bundle of three bits uses the two good data TSVs and the spare.
The last bit follows in the next slot, when all three healthy TSVs are free.

A group of four stays repairable with up to three of its five TSVs broken. A
group of ten stays repairable with up to six of its eleven TSVs broken.

`repair_register` decodes at load time and keeps, for every data bit, its
lane (`bit_lane`) and its slot (`bit_slot`). The transmitter's repair muxes
and the receiver's lane selects are both driven from these stored selects,
so the two sides always agree.

## Time division and the data interface

Both the sender and the receiver run on one clock.

**Sending** (`bisr_tx`). A word is offered with `in_valid`/`in_data` and is
taken in a cycle where `in_valid && in_ready`.

- With no group in time division, a word crosses in one cycle and
  `in_ready` is high whenever `enable` is high and no test is running.
- With any group in time division (`multi_defect`), **every** word takes two
  cycles: slot 0, then slot 1. `in_ready` is high only in slot 1.
  - Groups that do not need the second slot send nothing in it.
  - The word must stay on `in_data` from slot 0 until it is taken. An
    assertion in `bisr_tx` checks this.
- Lanes that carry nothing in a slot are driven to 0.

**Receiving** (`bisr_rx`). Each data bit is copied from its lane into its
own one-entry FIFO in the slot it belongs to. After the word's last slot,
`out_valid` pulses for one cycle with the full word on `out_data`. The
latency is one cycle after the last slot leaves the sender. There is no
backpressure on the output.

**Rate.** One word per cycle without time division. One word per two cycles
with it.

## Files

| file | contents |
|------|----------|
| `rtl/tsv_pkg.sv` | control-TSV bit positions, repair-mode and controller-state enums, LFSR taps table, default seed |
| `rtl/lfsr.sv` | test vector generator (true/complement pairs) |
| `rtl/ibist_controller.sv` | self-test sequencer: IDLE → TEST → LOAD → RUN |
| `rtl/ibist_analyzer.sv` | receiving-side XOR compare and signature register |
| `rtl/repair_decoder.sv` | one group: signature → per-bit lane/slot, repair mode (combinational) |
| `rtl/repair_register.sv` | stored signature and decoded selects for all groups |
| `rtl/bisr_tx.sv` | sending side: test-pattern muxes, repair muxes, slot control, control TSVs |
| `rtl/bisr_rx.sv` | receiving side: per-bit lane select, per-bit FIFO, output |
| `rtl/tsv_repair_top.sv` | one die-to-die link |
| `rtl/tsv_stack_top.sv` | the stack: `LAYERS-1` links tested in parallel (top level) |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `tsv_repair_sizes_tb` |
| `tb/tsv_fault_model.sv` | TSV bundle with stuck-at-0, stuck-at-1 and wired-AND bridge defects |
| `tb/tsv_ref_pkg.sv` | reference repair mapping used by the testbenches |
| `tb/tsv_link_harness.sv` | random-defect driver for one link of any size |

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `LAYERS` | 3 | dies in the stack (`tsv_stack_top` only) |
| `DATA_BITS` | 8 | data bits per word = data TSVs per link; a multiple of `GROUP_BITS` |
| `GROUP_BITS` | 4 | data TSVs per group; each group has one spare |
| `TEST_VECTORS` | 32 | self-test length in cycles (this design's choice) |

The LFSR accepts 2 to 256 TSVs. Widths in the taps table get maximal-length
sequences. Other widths use taps `{w, w-1}`, which still toggle every TSV
(the complement pairs guarantee that) but may repeat sooner.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. Build and run one with plain Verilator,
from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/tsv_pkg.sv tb/tsv_ref_pkg.sv tb/tsv_repair_top_tb.sv \
    --top-module tsv_repair_top_tb -Mdir obj -o sim
./obj/sim
```

`-Irtl -Itb` lets Verilator find every other module by its file name.

- **`tsv_stack_top_tb`** runs the default three-die stack. Each link has
  its own fault model. It checks that both links are in test mode in exactly
  the same 32 cycles, checks each link's signature and repair flags, and
  streams data on both links at once with random `enable` stalls.
- **`tsv_repair_top_tb`** drives a single link at its default size through the
  fault model. It covers:
  - no defect, one defect, two and three defects in a group, a bridge, a
    broken spare, an unrepairable group, and random patterns;
  - streams with random valid gaps and `enable` stalls;
  - a self-test started while a two-slot word is half sent.

  The expected signature is computed independently from the polynomial. It
  counts how often each mechanism happened (spare repair, time division,
  unrepairable, bridge found, enable stall, second-slot hold) and fails if
  any never did.
- **`tsv_repair_sizes_tb`** runs the same kind of random scenarios on links
  of 4, 8, 16, 32 and 64 data bits (groups of 4), and on 100 data bits with
  10, 2 and 1 spares (groups of 10, 50 and 100), side by side.
- **The module testbenches** check their blocks against reference models
  written in the testbench. `repair_decoder_tb` checks every signature of
  a group of 4 and of a group of 8.

All of them finish in seconds.

## Where this design departs or decides

- **One clock.** The paper runs the TSVs at a higher clock than the logic,
  so that two slots cost no time. Here both sides share one clock, and time
  division halves the word rate. To get the paper's behaviour, clock the
  link at twice the word rate.
- **Two bundles at most.** A group with fewer than half its lanes healthy is
  reported in `repair_fail` and is not repaired. Its words are still sent,
  but corrupted.
- **One LFSR pair per link.** In the paper's test architecture, each
  layer's single LFSR both checks the link below and drives the link above.
  Here every link has its own sending and checking LFSR. They produce the
  same vectors, at the cost of one extra LFSR per middle die.
- **Spares belong to their group.** The paper's grouping drawings give each
  group its own spare, and that is what is built. Its yield discussion also
  mentions spares shared among all clusters; that variant is not built.
- **Repair-register placement.** The repair information is described as kept
  in a register on the bottom die. The signature is formed on the upper die.
  How it travels down is not given, so both sides read the same
  `repair_register` here. In a stack, either a copy per die or a path for
  the signature is needed.
- **Control TSVs.** The three control TSVs are assumed defect-free. What they
  carry (test, valid, slot) is this design's choice.
- **This design's choices.** The test vectors (true/complement pairs, the
  `0101…` seed, 32 vectors), the order in which bits are dealt to healthy
  lanes, the one-entry FIFOs, the valid/ready handshake, the reset values
  and the identity mapping before the first test.
- **Not built.**
  - A "backup register" in the test controller, which the paper mentions
    only as an area saving.
  - The analog TSV drivers and receivers, and the TSVs themselves.
  - Telling defect kinds apart. The signature only says which TSVs are
    defective, not whether each is open, shorted or bridged. The paper
    mentions identifying the kind of defect but does not say how.
  - The reparability curves of the paper's evaluation. They are
    probability calculations, not hardware.
