# Multiple-polynomial LFSR pseudorandom number generator for EPC Gen2 tags

EPC Class 1 Gen2 RFID tags need an on-chip 16-bit random number generator for
anti-collision and to protect password operations. Because the chip is
passive, it has only a few hundred gates to spare. A plain LFSR is small but
linear: 32 observed bits reveal its polynomial and state. This generator keeps
the LFSR but changes its feedback polynomial at run time. Eight primitive
degree-16 polynomials sit on a *wheel*. Once per 16-bit output word, a true
random bit (`trn`) from an on-tag noise source moves the wheel on by one
polynomial (`trn = 0`) or by two (`trn = 1`). The move happens near the end
of the word. Each word is therefore produced by at least two polynomials, and
an observer cannot know which polynomials were used.

The RTL is SystemVerilog (IEEE 1800-2017) and synthesizable. It uses 25
flip-flops and a few dozen gates.

## Block structure

```
            +-------------------------- mp_lfsr_prng ---------------------------+
 run  ----->| decoding_logic --shift_en/out_en--> mp_lfsr (S16 ... S1) --&--> prng_out
 trn  ----->|   (frame counter,      rotate              ^        |            |
 trn_req <--|    trn latch)            v                 | fb     | state      |
            |                    poly_selector ----------+--------+            |
            |                  (wheel, decoder, poly_feedback tap network)     |
            +-------------------------------------------------------------------+
```

| Module | File | Role |
|---|---|---|
| `mp_lfsr_prng` | `rtl/mp_lfsr_prng.sv` | top level |
| `decoding_logic` | `rtl/decoding_logic.sv` | word sequencer: shift enable, output gate, trn sampling, wheel steps |
| `poly_selector` | `rtl/poly_selector.sv` | 3-bit wheel position register, one-hot decoder |
| `poly_feedback` | `rtl/poly_feedback.sv` | tap network: feedback bit of the selected polynomial |
| `mp_lfsr` | `rtl/mp_lfsr.sv` | 16-cell register and output AND gate |
| `prng_pkg` | `rtl/prng_pkg.sv` | sizes, reset state, polynomial table |

The true random bit source and the 100 kHz tag clock are analog parts. They
are outside the RTL: `trn`/`trn_req` and `clk` are ports. For simulation,
`tb/trng_model.sv` is a behavioural jittered-oscillator stand-in.

## The register and its polynomials

Cells are named S1..S16, held in `state[15:0]` with `state[k-1]` = S_k. On each
shift, every cell moves one place towards S1. S1 leaves as the output bit, and
the feedback bit enters S16. Polynomial coefficient x^j taps cell S_(17-j). So
x^1 taps S16 and x^16 taps S1. The reset state is `0x0001`, which is S1 = 1.

| | polynomial (all primitive, degree 16) |
|---|---|
| p1 | 1 + x + x^5 + x^6 + x^7 + x^11 + x^16 |
| p2 | 1 + x^4 + x^5 + x^6 + x^7 + x^11 + x^16 |
| p3 | 1 + x + x^3 + x^4 + x^5 + x^6 + x^7 + x^11 + x^16 |
| p4 | 1 + x^3 + x^5 + x^6 + x^10 + x^11 + x^16 |
| p5 | 1 + x^5 + x^6 + x^11 + x^16 |
| p6 | 1 + x^5 + x^6 + x^10 + x^11 + x^13 + x^16 |
| p7 | 1 + x^4 + x^5 + x^6 + x^10 + x^11 + x^16 |
| p8 | 1 + x + x^3 + x^4 + x^5 + x^6 + x^10 + x^11 + x^16 |

In `prng_pkg::POLY_COEF`, bit j-1 of each word is the coefficient of x^j. The
constant term is implied.

`poly_feedback` builds the feedback as a sum of products. For each cell, the
tap is enabled by the OR of the select lines of those polynomials that have
the matching coefficient. The enabled taps are ANDed with the cells and XORed
together. The RTL is generic, and constant folding decides what is left for
this table:

- x^5, x^6, x^11 and x^16 (cells S12, S11, S6 and S1) are shared by all eight
  polynomials. They go straight into the XOR.
- x^1, x^3, x^4, x^7, x^10 and x^13 each keep one AND gate, enabled by an OR of
  select lines.
- The other coefficients appear in no polynomial and disappear.

You can replace the table through the `COEF` parameter. The structure stays
correct for any set of M polynomials.

## The wheel schedule

This is the part that needs care. The output is organised in **frames** of 16
shifts, one per 16-bit word. `decoding_logic` counts the frame's shifts
1..16:

- **Shift 1:** `trn_req` is high, and the bit on `trn` is latched at that
  clock edge. There is one random bit per word.
- **Shifts 1..14:** the polynomial left by the previous word is used.
- **End of the update period (l = 15):** the wheel moves one step on the
  clock edge of shift 15. If the latched bit is 1, it also moves one step on
  the edge of shift 14.

The polynomial used for each shift of a word, where `P` is the polynomial in
use at the start of the word:

| latched trn | shifts 1-14 | shift 15 | shift 16 | next word starts with |
|---|---|---|---|---|
| 0 | P | P | P+1 | P+1 |
| 1 | P | P+1 | P+2 | P+2 |

The wheel wraps from p8 to p1. After reset it is at p1.

The reference example is 32 shifts from `0x0001` with random bits 0 and
then 1:

| shifts | polynomial |
|---|---|
| 1-15 | p1 |
| 16-30 | p2 |
| 31 | p3 |
| 32 | p4 |

The register reads `0x3E9F` after shift 16 and `0xDC2F` after shift 32,
written S16..S1 as a hex number. The end-to-end testbench reproduces this
example bit for bit.

Because the update comes before the word's last shift, no 16-bit word is ever
made by a single polynomial. The skipped polynomial of a `trn = 1` step is
used for exactly one shift.

Word content: the 16 bits a frame shifts out are exactly the register state at
the start of the frame, S1 first. A word therefore equals the LFSR state, and
the LFSR never reaches the all-zero state. As a result, **the value 0x0000 is
never produced**. The other 65535 values occur uniformly in simulation.
Strictly, the EPC Gen2 rule "every 16-bit value has probability between
0.8/2^16 and 1.25/2^16" does not hold for 0x0000. If that matters, map the
missing value in the logic that consumes the words.

## Interface and timing

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | tag clock (100 kHz nominal) |
| `rst_n` | in | 1 | synchronous, active low: register 0x0001, wheel at p1, idle |
| `run` | in | 1 | produce words while high |
| `trn` | in | 1 | true random bit; must be valid at the clock edge where `trn_req` is high |
| `trn_req` | out | 1 | TRNG sample request, first cycle of each word |
| `seed_load` | in | 1 | load `seed` into the register (has priority over shifting) |
| `seed` | in | 16 | seed value; 0 would lock the register at zero |
| `prng_out` | out | 1 | output bit: S1 AND the output enable, 0 when idle |
| `out_valid` | out | 1 | `prng_out` carries a word bit |
| `frame_start` | out | 1 | first bit of a word |
| `frame_end` | out | 1 | last bit of a word |
| `poly_idx` | out | 3 | polynomial in use, 0 = p1 |

Timing:

- The first bit appears on the cycle after `run` is first seen high.
- Each word takes 16 cycles, one bit per cycle.
- Words follow each other with no gap while `run` stays high.
- A word that has started always completes, even if `run` drops.
- At 100 kHz, one word takes 160 µs.

Parameters of `mp_lfsr_prng` and their defaults:

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 16 | LFSR cells |
| `M` | 8 | polynomials on the wheel |
| `FR` | 16 | shifts per word |
| `L` | 15 | update period; 3 ≤ L < FR is required |
| `SEED` | 0x0001 | reset state |
| `COEF` | — | polynomial table |

## How far the RTL follows the published design, and where it departs

Taken from the published design:

- the cell count, the shift direction and the output AND gate;
- the eight polynomials;
- the one-or-two-position wheel driven by one random bit per word;
- the 15-shift update period;
- the initial state;
- the 3-bit wheel register and decoder, and the OR/AND/XOR tap network;
- the exact rotation placement, which the published 32-shift example pins
  down.

Choices of this design:

- the `run`/frame handshake;
- sampling `trn` on the first shift of a word;
- the seed load port;
- synchronous active-low reset.

Known gaps:

- The published gate budget lists a 6-flip-flop "64 cycle clock" in the
  decoding logic and 76 GE of "additional control". Neither is described
  further, so neither is built.
- If the bit after the example is 0, this design uses p4 for 15 shifts of the
  next word. The published text says 14 shifts, which matches a following
  bit of 1.
- The TRNG (an oscillator-based high-frequency sampler) is not designed here.
  Only a simulation model is provided.
- The RTL has 25 flip-flops: 16 in the register, 3 in the wheel, 4 for the
  frame position, 1 busy flag and 1 latched random bit. The published budget
  has 29, which includes the unexplained 6-bit counter.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/prng_ref_pkg.sv` is a
reference model written separately from the RTL: the polynomials are exponent
lists and the state is an array of cells. It also holds the published example
states.

| Testbench | What it checks |
|---|---|
| `tb_mp_lfsr` | register against the published example (shifts 1-8, 15, 16, 30-32, every output bit), hold, load, output gate |
| `tb_poly_feedback` | every tap of every polynomial separately, plus random states |
| `tb_poly_selector` | stepping, p8→p1 wrap, one-hot decode, feedback of the selected polynomial |
| `tb_decoding_logic` | cycle-exact comparison with a model: rotations on shift 15 (and 14), one `trn_req` and 16 shifts per word, stop and restart |
| `tb_mp_lfsr_prng` | whole generator at default sizes and 100 kHz; see below |
| `tb_prng_stats` | 4,194,304 words with an ideal random bit source; see below |
| `tb_prng_population` | 2,000 generators with random seeds, 1,000 words in lock step: pair collision rate |

`tb_mp_lfsr_prng` first replays the published example. It then runs over 600
words with the behavioural TRNG, random reseeds and idle gaps, and checks
every output bit, `poly_idx`, the frame strobes and the cycle timing. It
counts one-step rotations, two-step rotations, wheel wraps, seed loads and
restarts, and fails if any of these never happens.

`tb_prng_stats` checks:

- 0x0000 never appears;
- chi-square uniformity of the other 65535 values;
- bit balance;
- lag-1 correlation of the bits and of consecutive words.

The published evaluation used 30 million words. This test is scaled to 4.2
million so that it runs in about a minute.

`tb_prng_population` models the EPC Gen2 rule that two tags among 10,000
rarely produce the same word at the same time. It uses 2,000 tags, which keeps
the build to about a minute. It measures a pair collision rate of about
0.0015%, which is 1/65535 as for uniform words, against a limit of 0.1%.

What is not verified: the published 0.8/1.25 frequency bounds, which need
about 30 million words.

## Simulating

With Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -y rtl -y tb +libext+.sv \
  rtl/prng_pkg.sv tb/prng_ref_pkg.sv tb/tb_mp_lfsr_prng.sv --top-module tb_mp_lfsr_prng
./obj_dir/Vtb_mp_lfsr_prng
```

- `--timescale 1ns/1ps` is needed: the testbenches and the TRNG model use
  delays without their own time unit.
- Testbenches that use the reference model need `tb/prng_ref_pkg.sv` on the
  command line.
- `tb_prng_stats` needs only `rtl/prng_pkg.sv`.
