# Two-core processor PUF with aging-based response tuning

A strong physical unclonable function (PUF) answers a challenge with a response
that depends on the manufacturing variation of one particular chip. This
design gets one almost for free from a multi-core processor. Two identical
cores run the same addition in the same clock cycle. Because of process
variation, sum bit *i* of one core's ripple-carry adder settles a few
picoseconds before the same bit of the other core. One arbiter per bit records
which core won. The carry chain makes the racing paths depend on the operands,
so every operand pair (2^64 of them for a 32-bit ALU) is a different
challenge. The only added hardware is 32 arbiters, 32 selection MUXes and
flip-flops, an optional bank of 16 XOR gates and an output register.

A second mechanism improves the statistics after fabrication. Intentional NBTI
aging raises the threshold voltage, and so the delay, of chosen gates. Two
special operand vectors fed to a core age the XOR1 and NAND1 gates of selected
full adders, which lie off the carry chain. This slows sum bit *i* of that core
without touching the adder's critical path. The decision which adders to age
is made off-chip from measured response statistics. The hardware provides the
aging-vector mode that carries it out.

## Block diagram

```
            challenge A,B, start          age_en, age_mask0/1
                      |                         |
                +-----v-------------------------v-----+
                |            puf_sequencer            |  same operands to
                +-----+-------------------------+-----+  both cores per cycle
                      | op0                     | op1
              +-------v------+          +-------v------+
              | puf_rca      |          | puf_rca      |   32 x puf_full_adder
              | Core0 adder  |          | Core1 adder  |   (XOR1 XOR2 NAND1-3)
              +-------+------+          +-------+------+
                 sum0 |----------+   +----------| sum1      -> alu_sum0 / alu_sum1
                      |      32 x puf_arbiter   |
                      |      (1 = Core0 first)  |
                      v            | arb        |
              +------------------------------+
              | puf_valid_select (MUX + temp) |  keep only single transitions
              +---------------+--------------+
                              | resp[31:0]
              puf_xor_obfuscation (resp[i] ^ resp[i+16])  (optional mode)
                              |
                          puf_srp  -> srp[31:0], srp_valid
```

## One query, cycle by cycle

A query is four additions on both adders, one per clock cycle. The first two
form the *rise* phase and the last two the *fall* phase.

| cycle after the edge that samples `start` | adder operands | what happens |
|---|---|---|
| 1 `INIT_LO`   | 0 + 0            | every sum bit and carry goes to 0 |
| 2 `EVAL_RISE` | A + B            | sum bits that end at 1 rise; the arbiters race; capture at the end of the cycle |
| 3 `INIT_HI`   | 0 + 0xFFFFFFFF   | every sum bit goes to 1, carries stay 0 |
| 4 `EVAL_FALL` | A + B            | sum bits that end at 0 fall; the arbiters race; capture at the end |
| 5 `WRITE`     | (unchanged)      | the response goes to Srp; `srp_valid` rises at the end of this cycle |

Why two phases? The arbiter is only meaningful when a sum bit makes exactly one
transition. In a ripple-carry adder a sum bit changes at most twice per
addition: once when the operands arrive and once when the carry arrives. The
carry never goes back from 1 to 0 within one add. Starting from an all-zero
sum, a bit that *ends* at 1 has therefore made a single 0->1 transition.
Starting from an all-one sum, a bit that ends at 0 has made a single 1->0
transition. A bit that ends where it started either did not move or made a
double transition (0->1->0, 1->0->1), and its arbiter decision is ignored.

`puf_valid_select` implements that rule with one 2:1 MUX per bit in front of
the temporary response register. The MUX control is the final sum bit S_i in
the rise phase and ~S_i in the fall phase. Because both phases add the same A
and B, S_i is the same in both. So every response bit is loaded in exactly one
phase, and no clearing is needed between queries.

The clock period must be longer than the slowest adder settling time plus the
arbiter decision. With the nominal gate delays of this model, a full 32-bit
carry ripple takes 640 ps. The testbenches use a 2 ns clock.

## The arbiter and the response convention

`puf_arbiter` is a behavioural model, because on silicon the arbiter is a
custom latch that resolves an analog race. It is a dual-trigger latch. Core0's
sum bit is the data input and Core1's sum bit triggers it on both edges. On
each trigger it stores whether Core0's bit had already reached the new level.
**Response bit = 1 means Core0's adder was faster for that bit**, in both
phases. `T_META` (ps) adds a metastability window: transitions closer than
this give a random outcome. The default of 0 is an ideal arbiter. Synthesis
tools do not accept this model (it uses `$time`), so the top has no synthesis
size of its own. The other blocks synthesise.

## XOR obfuscation and the Srp register

With `xor_en` high, the 32 response bits are folded to 16 (bit *i* XOR bit
*i*+16). This raises the Hamming distance between responses to different
challenges. A full 32-bit output then needs two queries with different
challenges. `puf_srp` fills the lower half first and the upper half second.
`srp_valid` is low between the two. In plain mode each query replaces the
whole register.

## Intentional aging mode

Hold `age_en` high while the PUF is idle. The sequencer then alternates two
vectors every cycle on each core *c*:

| vector | A | B | C0 | full adders in the mask | other full adders |
|---|---|---|---|---|---|
| 1 | all ones | 0 | 1 | state 5 (A=1,B=0,C=1) | state 5 |
| 2 | 0 | `age_mask`*c* | 0 | state 2 (A=0,B=1,C=0) | state 0 |

A gate ages (NBTI stress) while its output is high. In the masked full adders,
XOR1 and NAND1 are then high all the time. XOR2, NAND2 and NAND3 are high half
the time, so they recover as much as they are stressed. In the other full
adders XOR1 is high half the time. Which bits to age, and how long, is an
off-chip decision:

* **Raising the difference between chips.** For each bit, measure over many
  chips how often the response is 1. If it is 1 at least 60% of the time, age
  that full adder in Core0. If it is 1 at most 40% of the time, age it in
  Core1. Repeat.
* **Lowering the noise within one chip.** For each bit, measure one chip under
  varied voltage and temperature. Age the slower core's full adder further, so
  that the two delays move apart. Repeat.

Each step is one small threshold-voltage increment, set by how long `age_en`
is held at the aging temperature. The two masks let one pass age adders in
both cores.

## Files

| file | content |
|---|---|
| `rtl/puf_pkg.sv` | width, per-gate delay record `fa_delay_t`, nominal delays, phase enum |
| `rtl/puf_full_adder.sv` | five-gate full adder with a delay parameter per gate and observable gate outputs |
| `rtl/puf_rca.sv` | ripple-carry adder of one core (C0 input, per-adder delays) |
| `rtl/puf_arbiter.sv` | behavioural dual-trigger arbiter with optional metastability |
| `rtl/puf_valid_select.sv` | valid-output MUX and temporary response register |
| `rtl/puf_xor_obfuscation.sv` | bit *i* XOR bit *i*+WIDTH/2 |
| `rtl/puf_srp.sv` | output register, whole or half writes |
| `rtl/puf_sequencer.sv` | lockstep query sequence and aging vectors |
| `rtl/two_core_puf.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, `tb_two_core_puf_64.sv` for the 64-bit variant and `tb_two_core_puf_full.sv` at default parameters |

Top-level ports: `clk`, `rst_n` (synchronous, active low), `start`,
`challenge_a`, `challenge_b`, `xor_en`, `age_en`, `age_mask0`, `age_mask1`,
`busy`, `aging`, `srp`, `srp_valid`, `alu_sum0`, `alu_sum1`. Parameters:
`WIDTH` (32), `DLY_CORE0` / `DLY_CORE1` (per-gate delays of each adder),
`T_META` (0).

## Modelling process variation

The adder gates carry continuous-assignment delays taken from `fa_delay_t`
parameters, in picoseconds. Synthesis ignores them. In an event-driven
simulation they play the part of the silicon. Give the two cores different
delay arrays and the arbiters see real races. At the defaults, both cores get
the same nominal delays (XOR 20 ps, NAND 10 ps, chosen as round numbers).
Every race is then a tie and the response bits are not meaningful. To
simulate a population of chips, give each instance its own delay arrays.
`tb_two_core_puf.sv` shows one way to do this: a constant function draws each
full adder's delays from a seeded palette with ±20% spread per gate. Aging a
gate means adding to its delay. Delays are elaboration-time parameters, so an
aged chip is a second instance with the increased delay.

Every distinct delay set becomes a separate module in Verilator, and the
timing code grows with the number of delayed gates. Building a testbench with
six 32-bit chips takes about two minutes.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
  rtl/puf_pkg.sv tb/tb_two_core_puf.sv --top-module tb_two_core_puf -o sim
./obj_dir/sim
```

Replace the testbench name to run another one.

| testbench | what it establishes |
|---|---|
| `tb_puf_full_adder` | all 8 input states against the full-adder truth table including every internal gate; exact sum and carry delays |
| `tb_puf_rca` | 300 random additions; gate states under both aging vectors; worst-case ripple time of 31 x 20 + 20 = 640 ps |
| `tb_puf_arbiter` | rising and falling races won by either side, hold without trigger, metastability window gives both outcomes |
| `tb_puf_valid_select` | random captures against a bit-level reference; full two-phase query |
| `tb_puf_xor_obfuscation` | one-hot and random patterns at WIDTH 32 and 64 |
| `tb_puf_srp` | plain writes, half writes, valid protocol, mode change |
| `tb_puf_sequencer` | operands of every cycle of a query, capture/phase strobes, 4 adds and write on the 5th cycle, start ignored while busy, aging alternation with two masks |
| `tb_two_core_puf` | six chips sharing inputs: chips with one core uniformly 20% slower answer all ones / all zeros; aging XOR1 of full adder 9 in Core0 by 100 ps flips exactly bit 9 for a challenge that drives bit 9 through XOR1; random-variation chips repeat their answers exactly and differ from each other (mean inter-chip distance about 13 of 32 bits over 60 challenges); XOR responses equal the fold of the same chip's plain responses; stress duty of every gate during aging matches the table above; rise/fall captures, discarded double transitions, XOR half fills and aging cycles each counted |
| `tb_two_core_puf_64` | the same end to end at `WIDTH = 64` on three chips: all-ones biased chip, repeatability, chips differ (about 29 of 64 bits over 20 challenges), XOR fold, aging duty |
| `tb_two_core_puf_full` | the top at its default parameters: latency, adder results, Srp valid protocol in both modes, repeatability, aging vectors |

## Design decisions and departures

* **Query issued by hardware.** The original scheme runs the four additions as
  a short program in each core, started in the same cycle. Here a state
  machine drives both adders, because the cores themselves are not part of
  this RTL. To use real cores, remove `puf_sequencer`, drive the adders from
  the cores' execute stages, and generate `capture`/`phase` from the program.
  The adder results are brought out as `alu_sum0/1` for the cores' result
  registers.
* **Rest of the processor not included.** This RTL has no fetch, decode,
  register file, operating system, thermal sensors (used to equalise core
  temperatures before a query) or aging sensors (suggested against malicious
  aging). The off-chip tuning procedures are not included either.
* **Response polarity** (1 = Core0 faster), **lower-half-first Srp fill**, the
  **`srp_valid` flag**, **synchronous reset to zero**, **one mask per core in
  aging mode** and the **nominal gate delays** are choices of this design.
* **Adder style.** The adder is a plain ripple chain of the five-gate full
  adder. The published evaluation used a vendor "fast ripple-carry" adder
  model. The valid-output selection relies on the plain ripple chain's
  property that a sum bit changes at most twice per addition; another adder
  structure would need that property checked again.
* **Gate count.** The published overhead estimate (96 2:1 MUXes or 288 NANDs,
  128 XORs, 32 arbiters, 32 flip-flops) is for a PUF built without an
  underlying processor, so it includes the adders. Built on existing ALUs, this RTL adds 32 MUXes, 32 temporary flops,
  16 XORs, the 32-bit Srp, 32 arbiters and the small sequencer.
* **Not verified here:** the statistical results of the original evaluation
  (about 39% inter-chip and 8% intra-chip Hamming distance with a quad-tree
  variation model over 1,000 chips and 10^6 challenges, and the gains from
  aging). They need a calibrated transistor-level delay model and populations
  far beyond an RTL simulation. The testbenches check the mechanisms on a few
  chips with a simple uniform variation model.
* **64-bit variant.** Set `WIDTH = 64` (64 arbiters, 32 XOR pairs).
  `tb_two_core_puf_64` simulates it end to end. The clock must then cover a
  64-stage carry ripple (about 1.3 ns nominal).
