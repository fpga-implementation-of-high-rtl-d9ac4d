# Modified LUT-SR random number generator

A uniform pseudo-random number generator for FPGAs that produces a 16-bit
word every clock. It uses 256 bits of state, but only 16 of them sit in
ordinary flip-flops. The other 240 sit in shift registers, which an FPGA
builds from look-up tables set up as shift registers (SRL16 and similar).
This is the LUT-SR idea: LUT-FIFO generators reach a long period by using a
block RAM, and LUT-OPT generators keep their state in flip-flops only. LUT-SR
spreads the state over cheap LUT shift registers instead.

The "modified" generator makes two changes to the classic LUT-SR:

* The fixed output bit permutation is replaced by a **quadratic-residue
  permutation**. This is a modular-arithmetic scramble of the whole 16-bit
  word.
* A **linear congruential generator (LCG)** expands a 16-bit seed into the
  words that fill the state.

## The generator loop

```
            +---------------------------------------------+
            v                                             |
  seed -> LCG --(load)--> PIPO register (16 FF) --+--> rnd |
                              ^                    |        |
                              |                    v        |
                         16 XOR gates      16 shift-register lanes
                           (3-input)         (lengths 14..16)
                              ^                    |
                              |                    v
                              +--- quadratic residue <-- oldest bits
```

On each enabled clock while running:

1. Each lane i shifts in bit i of the PIPO register.
2. The 16 oldest lane bits form a word `d`.
3. `d` passes through the quadratic-residue permutation `q = QR(d)`.
4. XOR gate i computes `q[(i-1) mod 16] ^ q[3i mod 16] ^ q[(5i+1) mod 16]`.
5. The 16 gate outputs become the next PIPO word, which is the output.

State size: n = sum over lanes of (1 + k_i) = 16 + 240 = 256 bits.

## Quadratic-residue permutation (`qr_permute`)

This is the least obvious part of the design. Take a prime p with p mod 4 = 3.

* For 2x < p, the values x² mod p are all different.
* For the other half, p − (x² mod p) fills exactly the residues the first
  half leaves out.

So the map below is a bijection on [0, p):

```
y = x                   if x >= p          (the few words above p pass through)
y = x*x mod p           if 2x < p
y = p - (x*x mod p)     otherwise
```

With W = 16, p = 65519, the largest such prime below 2^16. The
package computes p for any width (`lutsr_pkg::qr_prime`). The hardware is one
16×16 multiplier and a reduction by a constant, with no registers. Because
the whole 16-bit map is a bijection and maps 0 to 0, it loses no
information.

The quadratic residue is non-linear. So, unlike a plain LUT-SR, the
generator is no longer a linear recurrence over GF(2). Its period does not
follow from a primitive characteristic polynomial and is not known. The
weight-of-polynomial quality measure, wP(z)/n, that is used for linear
generators does not apply directly.

## Lane lengths and XOR taps

`lutsr_pkg::sr_len` sets the lane lengths. For r = 16 and n = 256 they are
15, 16, 15, 14, repeated four times. Their sum is 240, and none is longer than
k = r = 16. The lengths differ so that some values of k_i + 1 are coprime
(15, 16 and 17), which mixes the state better than equal lanes.

`lutsr_pkg::xor_tap` sets the XOR connections:

* Input 0 of gate i is the neighbouring lane, so the lanes form one ring.
* Inputs 1 and 2 come from two affine permutations, 3i and 5i+1 (mod 16).

These constants were chosen to meet three conditions:

* No gate sees the same bit twice.
* Every bit feeds exactly three gates.
* The 16×16 XOR matrix L can be inverted over GF(2).

Together with the bijective QR step, this makes the whole state update a
bijection. You can recover the previous state from the next one:

* The old PIPO word is the newest bit of each lane.
* The old oldest lane bits are QR⁻¹(L⁻¹(new PIPO)).

The all-zero state maps to itself, so no other state can ever reach it.

## Seeding (`mod_lut_sr_rng`, `lcg`)

A pulse on `seed_load` writes `seed` into the LCG, which computes
X(i+1) = (25173·X(i) + 13849) mod 2^16. This LCG has full period.

For the next KMAX + 1 = 17 cycles, `busy` is high:

* The PIPO register takes successive LCG words.
* The lanes shift.

At the end, every one of the 256 state bits has been written from the LCG
stream: the longest lane holds words X0..X15 and the PIPO register holds
X16. A full-period LCG never repeats a word within 17 steps, so at most one
of those words is zero and the state cannot be all zero, even for
`seed = 0`. After loading, `valid` goes high.

## Interface and timing

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock, rising edge |
| `rst_n`     | in  | 1     | asynchronous active-low reset; generator idles until seeded |
| `seed_load` | in  | 1     | start (re)seeding; accepted in any state, restarts a load in progress |
| `seed`      | in  | 16    | LCG start value, sampled with `seed_load` |
| `en`        | in  | 1     | advance one step while `valid` |
| `rnd`       | out | 16    | random word (registered PIPO contents) |
| `valid`     | out | 1     | `rnd` is generator output |
| `busy`      | out | 1     | loading |

* `busy` rises on the edge that samples `seed_load` and stays high for 17
  cycles. `valid` rises on the edge that ends the load.
* While valid, each edge with `en = 1` produces a new word. With `en = 0`,
  `rnd` and the whole state hold.
* The shift-register lanes have no reset, like real LUT shift registers.
  Their power-up contents are overwritten by the load.

## Sub-blocks

| module         | role |
|----------------|------|
| `lutsr_pkg`    | default sizes; elaboration-time functions for lane lengths, taps and the prime |
| `lcg`          | seed expander |
| `pipo_sr`      | 16-bit output register with seed/feedback select |
| `fifo_sr_bank` | the 16 lanes (`siso_sr` each) |
| `qr_permute`   | quadratic-residue permutation |
| `xor_net`      | the 16 three-input XOR gates |
| `mod_lut_sr_rng` | top: control (idle/load/run) and wiring |

Parameters of the top: `R = 16` (output width), `N = 256` (state bits),
`KMAX = 16` (longest lane). The tap formula and the LCG constants are checked
only for R = 16.

## Where this RTL follows the original design and where it chooses

Taken from the original design:

* The loop PIPO → SISO shift registers → quadratic residue → XOR gates →
  PIPO.
* r = 16 and n = 256.
* Lane lengths no longer than r, with some coprime pairs.
* One XOR gate per output bit.
* Quadratic residues modulo a prime replace the output permutation.
* An LCG is used.
* The seed enters through the PIPO register.

Chosen here, because the original gives no values:

* t = 3 inputs per XOR gate. A gate plus the seed-load mux (five inputs)
  then fits one 6-input LUT.
* The tap permutations and the lane length pattern. The original builds
  these from a random construction with a free selection parameter s. Here
  they are closed formulas, and there is no s.
* The prime 65519 and the pass-through of words ≥ p.
* The LCG constants, and using the LCG as the seed source.
* The 17-cycle load sequence, the `en`/`valid`/`busy` handshake and the
  reset behaviour.

Differences from the original:

* The original reports 33 LUTs and 16 flip-flops on a Spartan-3E with a
  3.5 ns delay. This RTL adds flip-flops that are not counted there: a
  16-bit LCG state and a 2-bit state plus a 5-bit counter for the control.
  Timing and LUT counts on a device have not been measured.
* The original description says each bit "is set to zero" as it passes a
  flip-flop. Taken literally, that would erase the state, so it is not
  modelled. The lanes keep their data.
* The original assesses quality with TestU01. That is not reproduced here.
  `mod_lut_sr_rng_quality_tb` runs only simple statistics over 100,000
  words: bit balance, byte chi-square, and lag-1 and adjacent-bit agreement.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`:

* `lcg_tb`: random load/step patterns against integer arithmetic, and a check
  that the period is exactly 2^16.
* `pipo_sr_tb`: random hold, seed and feedback cycles.
* `fifo_sr_bank_tb`: measures each lane's delay by sending a single pulse
  through it, with random stalls, and checks that the lanes total 240 bits.
  It then streams random data.
* `qr_permute_tb`: all 65536 inputs against 64-bit arithmetic, plus a check
  that the map is a bijection.
* `xor_net_tb`: unit vectors (fan-out of three) and random words.
* `mod_lut_sr_rng_tb`: the whole generator at its default size against an
  independent cycle-accurate model. It checks:
  * every output word;
  * the 17-cycle load latency;
  * that the output holds during stalls;
  * seeding from idle, reseeding while running, restarting during a load, and
    a zero seed, each counted;
  * bit balance over about 17,000 words;
  * that different seeds give different streams.
* `mod_lut_sr_rng_quality_tb`: 100,000 words from one seed. Each bit must be
  a one 49–51 % of the time. Each bit must agree with the previous word's
  bit, and with its neighbour, 49–51 % of the time. The chi-square of the low
  and high byte must stay under 341 (255 degrees of freedom).

## Simulating

With Verilator 5:

```
verilator --binary --assert -y rtl -y tb rtl/lutsr_pkg.sv tb/mod_lut_sr_rng_tb.sv \
          --top-module mod_lut_sr_rng_tb -o sim
./obj_dir/sim
```

Replace the testbench name to run any other block's test. Lint the design
with:

```
verilator --lint-only -Wall -y rtl rtl/lutsr_pkg.sv rtl/mod_lut_sr_rng.sv
```

Lint prints two expected warnings: unused package constants, and `rst_n`
being used both as an asynchronous reset and in the assertion's
`disable iff`.
