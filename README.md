# Exponential-map pseudo-random number generators

Two small hardware pseudo-random number generators built on the exponential
chaotic map

    x(n+1) = lambda * x(n) * exp(-x(n)),      lambda = 17.4

One works in IEEE-754 single precision (binary32), the other in 64-bit fixed
point. Neither has an exponential unit. `exp(-x)` is replaced by its Maclaurin
polynomial of degree 20, and that polynomial is evaluated by Horner's rule,
one multiply-add per clock cycle. So the exponential takes 20 cycles and needs
one multiplier and one adder.

A chaotic map run in finite precision collapses sooner or later into a short
cycle. To keep the orbit moving, each new sample is XORed with the state of a
linear feedback shift register (LFSR) before it is fed back:

* binary32: the 20 low mantissa bits are perturbed;
* fixed point: all 64 bits are perturbed.

Each generator produces a run of 100000 samples from an initial condition
`x0` (0.31 in the reference set-up), then stops.

## Block structure

```
prng_top
├── exp_map_fp        binary32 generator
│   ├── map_sequencer     phase control, FF D input select, sample counter
│   ├── horner_exp_fp     exp(-x), 20 Horner steps
│   │   ├── coeff_shift_reg   coefficients a19 .. a0
│   │   ├── fp32_mul
│   │   └── fp32_add
│   ├── fp32_mul x2       x * exp(-x) * lambda
│   └── lfsr (20 bits)
└── exp_map_fx        fixed-point generator
    ├── map_sequencer
    ├── horner_exp_fx     exp(-x), 20 Horner steps, 66-bit signed word
    │   └── coeff_shift_reg
    └── lfsr (64 bits)
```

`prng_pkg` holds the shared constants: the coefficient table, lambda, the
fixed-point formats and the LFSR defaults.

## Evaluating exp(-x) by Horner's rule

The degree-20 Maclaurin polynomial is

    exp(-x) ≈ sum_{k=0}^{20} a_k x^k,      a_k = (-1)^k / k!

Horner's rule rewrites it as nested multiply-adds:

    b_1 = a_20 * x + a_19
    b_i = b_(i-1) * x + a_(20-i),   i = 2 .. 20
    exp(-x) ≈ b_20

The datapath of `horner_exp_fp` and `horner_exp_fx` follows this directly:

* A 2-to-1 mux feeds the multiplier. Its select is 0 for the first step
  only, so it passes the constant `a_20`; afterwards it passes the register
  output `b`.
* The multiplier's other input is `x`.
* The adder adds the coefficient at the head of `coeff_shift_reg`.
* The register `b` captures the sum.

`coeff_shift_reg` holds `a_19 .. a_0` and presents them in that order, one
per step. It is circular: the head word goes back to the tail, so after 20
steps the register is ready for the next evaluation without a reload. A
counter runs 0 to 19. After the last step it pulses `done` for one cycle, and
`b` then holds `b_20`.

Timing: the first step happens on the clock edge that accepts `start`. The
20th happens 19 edges later, and `done` is high in the cycle after that edge.
`x0` must stay stable while `busy` is high. The multiply-add is a single
combinational path (a full binary32 multiply followed by a binary32 add, or a
66x66-bit multiply followed by an add). That path sets the clock rate. The
design does not pipeline it, because the 20-cycle latency is part of the
design.

How accurate is it? With 20 terms, the truncation error for `x < 2` is about
`2^21/21! ≈ 4e-14`. The fixed-point result is within 1e-12 of `exp(-x)` over
[0, 2). In binary32, the alternating terms grow to about 95 for `x` near 6.4
and cancel, so the binary32 "exponential" near the top of the range is quite
inaccurate. That is simply how this map behaves in binary32. The testbench
compares it bit for bit with a reference evaluation in the same format, not
with the true exponential.

## Number formats

### binary32 (`exp_map_fp`)

* `fp32_mul` and `fp32_add` are combinational and round to nearest, ties to
  even.
* Subnormal inputs and results are flushed to zero. Overflow gives infinity.
  Neither can happen in this map.
* The coefficients `a_k` are the nearest binary32 values. They are listed in
  `prng_pkg`.
* lambda = 17.4 is `32'h418B3333`.
* Map values stay in [0, 7). The map's maximum is 17.4/e ≈ 6.4, and the
  perturbation changes a value by less than 2^-3 relative to it.

Register 1 holds `x` (`rA`) and `exp(-x)` (`rB`). Two multipliers form
`rA * rB * lambda` into Register 2. The output is:

    x_out = { reg2[31:20], reg2[19:0] ^ lfsr20 }

Only the low 20 mantissa bits are perturbed. The sign, the exponent and the
top 3 mantissa bits are left alone, so the full 32-bit word is far from
uniform. Use `x_out[19:0]` as the random bits.

### Fixed point (`exp_map_fx`)

* Map values are unsigned Q1.63: one integer bit and 63 fraction bits, in
  [0, 2).
* Inside the Horner unit the partial sums are signed, and `exp(-0) = 1`. One
  integer bit without a sign cannot hold these values, so the Horner word is
  66 bits: a sign bit, two integer bits and 63 fraction bits.
* The coefficients are `(-1)^k * floor(2^63 / k!)`. They are computed at
  elaboration by `prng_pkg::fx_coef`.
* All products are truncated (arithmetic shift right by 63).

Multiplying by 17.4 is split in two:

1. `rA * rB` is shifted left by 4, which multiplies it by 16.
2. The result is multiplied by the constant 1.0875 = 17.4/16
   (`64'h8B33333333333333`, nearest Q1.63).

Every intermediate value is kept in Q1.63. Whatever lands above the single
integer bit is dropped, so the map is really

    x(n+1) = ((16 * x * exp(-x)) mod 2 * 1.0875) mod 2,   then XOR lfsr64

This wrap-around is intended: it is why the fixed-point output covers [0, 2)
evenly. In a full run the times-16 step wraps for about 93% of the samples.
All 64 output bits are XORed with the 64-bit LFSR.

## Perturbation LFSRs

`lfsr` is a Fibonacci LFSR that shifts towards its most significant bit and
exposes all its flip-flops. Defaults:

| width | polynomial                 | seed                  |
|-------|----------------------------|-----------------------|
| 20    | x^20 + x^17 + 1            | `20'hA5A5A`           |
| 64    | x^64 + x^63 + x^61 + x^60 + 1 | `64'hA5A5A5A5A5A5A5A5` |

Both polynomials give maximal length. For the 20-bit one the testbench checks
the period of 2^20 - 1.

The register is written once per sample, in the same cycle as Register 2,
so the fed-back value stays stable for a whole iteration. Each write moves
it **22 positions** (parameter `STEPS`, set by `LFSR_STEPS` in the maps),
which is the number of clock cycles in one iteration. The feedback is
unrolled 22 times in one clock. The result is the same sequence a register
clocked every cycle would give, sampled once per output.

This matters. With a single shift per sample, consecutive perturbation words
are one-bit shifts of each other. The output then carries that structure:
over 100000 samples, the 64-bin histogram chi-square was 269 (binary32) and
565 (fixed point), against 56 and 77 with 22 shifts.

The LFSR is reset to its seed by `rst` and by `start`, so every run is
reproducible.

## Sequencing and interface

`map_sequencer` issues the enables for one iteration, all on one clock:

| cycle (from `exp_start`) | action |
|---|---|
| 0 .. 19 | 20 Horner steps |
| 20 | `done` high: Register 1 loads `x` and `exp(-x)`; FF D is set |
| 21 | Register 2 loads `lambda * x * exp(-x)`; LFSR moves 22 positions; sample counter +1 |
| 22 | next `exp_start`; `valid` is high with the new `x_out` |

One sample therefore takes **22 cycles**. FF D selects the input of the map.
Until the first exponential is done it passes `x0`; after that it always
passes the fed-back output. The sample counter stops at `N_SAMPLES` (100000):
Register 2 is no longer written and `finished` rises.

Generator ports (`exp_map_fp`: 32-bit values; `exp_map_fx`: 64-bit values):

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | clock, synchronous active-high reset |
| `start` | in | one-cycle pulse: restart from `x0`, clear counter, FF D and LFSR |
| `x0` | in | initial condition, held from `start` to the first `valid` |
| `x_out` | out | current sample; stable between `valid` pulses |
| `valid` | out | one-cycle pulse per new sample |
| `finished` | out | `N_SAMPLES_P` samples delivered |
| `sample_count` | out | samples delivered so far (17 bits) |

After reset a generator waits for `start`. `prng_top` brings out both
generators side by side with prefixes `fp_` and `fx_`. They share only `clk`
and `rst`.

Parameters: `N_SAMPLES_P` (run length), `LAMBDA` / `LAMBDA_16`, and the LFSR
`LFSR_TAPS` / `LFSR_SEED` / `LFSR_STEPS`. For `exp_map_fp` there is also `PERTURB_BITS`. The
Horner units take `N` (number of terms, at most 20 in binary32 because the
coefficient table stops at `a_20`).

## What follows the original architecture and what does not

Taken from the original architecture:

* the map and lambda = 17.4;
* n = 20 Horner terms and 20 cycles per exponential;
* the mux / multiplier / adder / coefficient shift register / counter
  structure;
* Register 1 and Register 2, the FF D input select and the 100000-sample
  counter;
* the 20-bit LFSR on the 20 mantissa LSBs of the binary32 version, and the
  64-bit LFSR on all bits of the fixed-point version;
* the fixed-point multiply as shift-left-4 followed by times 1.0875, with one
  integer bit and 63 fraction bits.

Choices made here:

* **Clocking.** The original lines up the multiplier, adder, coefficient
  register and counters by delaying the clock ("Delay" and "Delay Map"
  elements). This design has a single clock and a state machine that issues
  enables. Its per-sample timing, 22 cycles, is this design's own; only the
  20-cycle exponential is given.
* **LFSRs.** The feedback polynomials and seeds are this design's own. The
  original drives its fixed-point LFSR from the clock; here the LFSR jumps
  22 positions once per sample, so the value being iterated does not change
  mid-iteration.
* **Arithmetic details.** The binary32 rounding mode and subnormal handling
  are this design's own. In fixed point, so are the truncation of products
  and coefficients and the 66-bit signed Horner word.
* **Interface.** The `start`, `valid`, `finished` and `sample_count`
  handshake and waiting for `start` after reset are additions. lambda is a
  parameter, not a port.

Because the LFSR polynomials, the seeds and the rounding differ from the
original, sequences from this RTL will not match the original's bit for bit.
The statistical behaviour is the same in kind: see below.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference models in
`tb/prng_ref_pkg.sv` are independent of the RTL:

* binary32 operations are done in double precision and rounded once to
  binary32, which gives the correctly rounded result;
* fixed-point references use wide integer arithmetic, with coefficients
  computed from `k!` directly;
* LFSR references spell out the taps.

| testbench | what it shows |
|---|---|
| `tb_fp32_mul`, `tb_fp32_add` | bit-exact against the reference on about 22000 / 35000 vectors, including rounding ties, carries into the next binade, cancellation, zeros and infinities |
| `tb_coeff_shift_reg` | coefficient order, rotation, hold, reset |
| `tb_lfsr` | step-by-step against the feedback equations (20 and 64 bits); 20-bit period is 2^20 - 1 |
| `tb_horner_exp_fp/fx` | bit-exact Horner results over the map's range; 20-cycle latency; closeness to `exp(-x)` |
| `tb_map_sequencer` | phase order, FF D, 22-cycle period, stop at the limit, restart |
| `tb_exp_map_fp/fx` | 300-sample runs, every sample bit-exact against the reference map |
| `tb_prng_top` | full size, both generators, 100000 samples each, every sample checked, statistics, Lyapunov exponent |

`tb_prng_top` runs the reference set-up, λ = 17.4 and x0 = 0.31, with default
parameters, in a few seconds. It requires the input-mux switch, a
perturbation, a fixed-point wrap-around, the stop and a restart to happen at
least once. It also scores the output streams:

* the frequency (monobit) statistic `|S_n|/sqrt(n)`, where p ≥ 0.01
  corresponds to ≤ 2.5758;
* a 64-bin histogram chi-square, with 103.4 as the 0.1% point for 63
  degrees of freedom;
* the largest autocorrelation at lags 1 to 10, against a limit of
  4/sqrt(n) = 0.0126.

| stream | bits | monobit | chi-square | max autocorrelation |
|---|---|---|---|---|
| binary32, all 32 bits | 3.2 M | 64.7: fails, as expected (exponent bits) | not scored | not scored |
| binary32, 20 perturbed LSBs | 2.0 M | 0.86 | 56 | 0.006 |
| fixed point, 64 bits | 6.4 M | 1.14 | 77 | 0.005 |

The testbench also estimates the Lyapunov exponent of each orbit as the mean
of `ln|17.4 exp(-x) (1 - x)|`, the log of the map's slope, along the 100000
samples. It requires the estimate to be positive, which is the sign of chaos.
Results: 0.15 for binary32 and 0.85 for fixed point. Estimates from a
neighbour-divergence method, such as Wolf's, come out higher, so compare
only the sign.

A run of 100000 samples gives at least 2 million bits in every
configuration. That is enough for a 1,000,000-bit randomness test-suite
stream.

### Running a testbench with Verilator

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/prng_pkg.sv tb/prng_ref_pkg.sv tb/tb_prng_top.sv --top-module tb_prng_top
./obj_dir/Vtb_prng_top
```

Swap in any other `tb_*.sv` and its module name. Verilator finds the RTL
modules through `-y rtl`.

## Things to keep in mind when changing it

* The fixed-point map depends on the wrap-around. If you widen the integer
  part of the map value, it behaves completely differently.
* `horner_exp_fx` assumes `0 <= x < 2`. Its 66-bit word has room for the
  partial sums in that range only.
* The combinational multiply-add of the Horner units is the critical path.
  If you pipeline it, you must also change the step counter and
  `map_sequencer`'s timing.
