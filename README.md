# Pipelined digital differential matched filter (PDDMF)

A DS-CDMA receiver finds the code phase of a spread signal with a matched
filter: it correlates the last chips it has received with the known PN code.
The correlation peaks when the phase lines up. Written directly, a filter
for a 16-chip code at 2 samples per chip correlates 32 samples with 32
coefficients of ±1. That is 32 multiply-and-sum (M&S) operations per sample,
added in a 32-input tree.

This design computes the same output with far less arithmetic. It uses two
ideas from a 2 V, 0.6 µm CMOS chip built for IS-95 style systems:

* **Differential coefficients.** Consecutive outputs of the correlator share
  almost all their terms. The filter computes only the *difference* between
  one output and the previous one, then integrates it. The difference has a
  non-zero coefficient only where the code changes sign. Such a coefficient is
  ±2, which costs a shift and not a multiply.
* **Pipelining.** The filter has transposed form. The sample is broadcast to
  every cell. Each cell adds its product to a partial sum that moves one cell
  per chip towards the output. So there is no wide adder tree, and the clock
  rate does not depend on the code length.

The RTL is parameterised. Its defaults are the reference chip's sizes:
16 chips, 2 samples per chip, 4-bit two's-complement soft-decision samples,
9-bit adders and output, and a 4-stage PN generator.

## The differential trick

Let `a_1 .. a_N` (N = 16) be the code, each chip ±1, with `a_1` matched to the
newest chip. Let `x(t)` be the sample stream at OSR = 2 samples per chip. The
ordinary oversampled matched filter is

    y(t) = sum_{j=0}^{N*OSR-1} a_(floor(j/OSR)+1) * x(t-j)

It has 32 coefficients, and each chip value is repeated over the two samples
of its chip. Subtracting `y(t-1)` cancels every pair of equal neighbouring
coefficients. What is left is

    D(t) = y(t) - y(t-1) = sum_{k=1}^{N+1} b_k * x(t - (k-1)*OSR)

    b_1 = a_1,   b_k = a_k - a_(k-1)  (k = 2..N),   b_(N+1) = -a_N

The inner `b_k` are 0 or ±2, and the two end coefficients are ±1. The output
is then rebuilt by the accumulator, `y(t) = D(t) + y(t-1)`.

Take any 16 consecutive chips of the period-15 m-sequence from a 4-stage
generator. Their 15 neighbouring pairs hold exactly 8 sign changes. So only
8 of the 15 inner coefficients are non-zero, plus the two ±1 ends. The direct
filter needs 32 products. The other 7 cells still exist, because the code is
programmable, but they are gated to zero.

**Why the integration is exact.** All arithmetic is two's complement modulo
2^9. Every register starts at 0, which is the same as a sample history of
zeros. With both conditions, the accumulated `D` equals `y` modulo 2^9 at
every clock, with no drift.

**The catch.** The integration is only valid while the code stays constant. If
the coefficients changed while data flowed, the accumulator would keep a
permanent offset. So every shift of the code register also pulses a
synchronous clear (`clr`) through the whole datapath. After the last shift,
the output is exact again once 32 new samples have entered. The reference
chip does not say how it handles reprogramming. This clear is this design's
own addition.

## Datapath and timing (`pddmf_core`)

```
 x_in -> [input reg] --+-----------+-----------+-- ... --+-----------+
                       |           |           |         |           |
                     cell b_1    cell b_2    cell b_3   cell b_N   cell b_(N+1)
                       |           |           |         |           |
 f_out <- [acc] <- (+)<-[2 regs]<-(+)<-[2 regs]<-(+) ... (+)<-[2 regs]<- 0
```

Read the diagram from the right. Each `adder_stage` holds one M&S cell and a
9-bit ripple adder. The adder takes the partial sum from the stage on its right
and adds this stage's product. The result goes left through `OSR` registers,
which is one chip time. Stage `k` therefore adds its product `(k-1)*OSR`
samples "later", which puts `b_k` on `x(t-(k-1)*OSR)`. `accumulator` integrates
the result.

* Throughput: one sample per clock. The reference chip ran at 2.5 MHz for a
  1.25 Mchip/s code.
* Latency: a sample presented before clock edge `e` is in `f_out` after edge
  `e + OSR + 1`. Counting edge `e`, that is OSR + 2 = 4 clocks: the input
  register, two stage registers and the accumulator. So
  `f_out(t) = y(t-4) mod 512`.
* Reset (`rst_n`, asynchronous, active low) and `clr` (synchronous) zero every
  register.
* Range: `f_out` is 9 bits, read as two's complement. A matched ±7 input
  gives a peak of 16·2·7 = 224. The extreme case, all samples -8 against an
  all -1 code, gives +256, which wraps to -256. The reference chip also has a
  9-bit output, so this design adds no guard bit.

## The M&S cell (`ms_cell`, `adder_stage`)

The cell has no multiplier. For a ±2 coefficient:

1. The 4-bit sample `d` becomes the 5-bit value `{d, 0}`, which is `2d`.
2. That value is XORed with `neg`, giving the one's complement when the
   coefficient is negative.
3. It is ANDed with `en`. This makes a zero coefficient give zero.
4. It is sign-extended by 4 bits to 9 bits.
5. The +1 that completes the negation enters as the carry-in (`cin`) of the
   stage's ripple adder.

The ±1 end cells are the same circuit without the shift (`SHIFT = 0`). The
reference design only shows the ±2 cell, so the end cells are this design's
own.

The ripple adders (`ripple_adder`) are explicit chains of full adders. This
matches the reference design's choice of a ripple adder for low power over
speed.

One detail of the negation is easy to miss. `-2d` for `d = -8` is +16, which
does not fit in 5 bits. The result is still right, because the inversion
happens before sign extension and the +1 is added at 9 bits.

## Programming the code

* `pn_code_reg` is a serial shift register. Each shift puts a new chip into
  `a_1` (bit 0) and moves the older chips towards `a_N`. Shifting a
  transmitted sequence in chip by chip therefore leaves the register matched
  to it. A code bit of 1 means +1, and 0 means -1.
* `diff_encoder` is combinational. It turns the 16 code bits into 17
  `coef_t {en, neg, cin}` controls. `coef[0]` is `b_1`.
* `pn_gen` is a Fibonacci LFSR, `b[n] = b[n-3] xor b[n-4]`, which is the
  polynomial x^4 + x^3 + 1. Its period is 15 and its seed is `0001`. The
  reference design gives only the generator's order, so the polynomial and
  the seed are this design's choice.

## Test modes (`test_ctrl`)

The reference chip has two modes, and so does this design.

* **Normal** (`self_test = 0`): samples come from `x_ext`. Each clock with
  `code_shift = 1` shifts `code_in` into the code register, so the user picks
  the code.
* **Self-test** (`self_test = 1`):
  * A counter steps the PN generator once per chip, which is every OSR
    clocks.
  * The first 16 chips also go into the code register. After that the
    register is frozen.
  * The current chip is sent to the filter as +7 or -7, held for both samples
    of its chip.
  * The output then shows the autocorrelation of the code: a 224 peak every
    15 chips (30 clocks), with small values in between.

  The first self-test sample goes in during the first clock with `self_test`
  high. Leaving self-test and entering it again reloads the code. The PN
  generator is not reset when this happens.

The amplitude of 7 and the load sequencing are this design's choices.

## Top level (`pddmf_top`)

| port         | dir | width | meaning |
|--------------|-----|-------|---------|
| `clk`        | in  | 1     | sample clock (2 samples per chip) |
| `rst_n`      | in  | 1     | asynchronous reset, active low |
| `self_test`  | in  | 1     | 1 = self-test mode |
| `x_ext`      | in  | 4     | sample, two's complement (normal mode) |
| `code_in`    | in  | 1     | code chip to shift in (normal mode) |
| `code_shift` | in  | 1     | shift strobe for the code register (normal mode) |
| `f_out`      | out | 9     | correlation output, two's complement, mod 512 |
| `code`       | out | 16    | code register, bit 0 = a_1 |

Parameters: `TAPS` (16) and `OSR` (2). The sample and output widths come from
`pddmf_pkg` (`D_W_DEF = 4`, `ACC_W_DEF = 9`). The generator polynomial
(`pn_gen.TAPS_MASK`) is written for order 4.

## What is not here

* The chip's input fan-out buffer, its pads and its power supply are
  electrical parts with no logic function.
* The reference chip's clock range (1.25–5 MHz at 2 V), power (1.6 mW) and
  area (1.5 mm × 1.5 mm) are properties of its 0.6 µm process. This RTL does
  not model them.
* How the reference chip loads a user code is not known. The serial load used
  here is an assumption, as is the bit order of the 4-bit sample (bit 3 is
  the sign).

## Files

| file | contents |
|------|----------|
| `rtl/pddmf_pkg.sv` | default sizes, `coef_t`, `mode_e` |
| `rtl/ripple_adder.sv` | W-bit ripple-carry adder |
| `rtl/ms_cell.sv` | multiply part of an M&S cell (×2 or ×1) |
| `rtl/adder_stage.sv` | M&S cell + adder + OSR pipeline registers |
| `rtl/accumulator.sv` | `f(T) = D(T) + f(T-1)` |
| `rtl/pddmf_core.sv` | input register, 17 stages, accumulator |
| `rtl/diff_encoder.sv` | code → differential coefficients |
| `rtl/pn_code_reg.sv` | code shift register |
| `rtl/pn_gen.sv` | 4-stage LFSR |
| `rtl/test_ctrl.sv` | normal / self-test source selection |
| `rtl/pddmf_top.sv` | the whole filter |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. Each one also has a
watchdog that ends the run if it hangs. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/pddmf_pkg.sv \
    tb/tb_pddmf_top.sv --top-module tb_pddmf_top -Mdir obj_top
./obj_top/Vtb_pddmf_top
```

Swap in any other `tb/tb_<module>.sv` and its top module name to run that
test. The simulations take well under a second.

What the tests compare against:

* `tb_pddmf_core` computes the 32-coefficient direct correlation on every
  clock, for random codes and samples. It includes the wrap-around case and
  the clear.
* `tb_pddmf_top` runs the whole filter at its default size:
  * it loads several random codes serially and streams random samples;
  * it switches to self-test, checks that the code register is loaded with
    the generator's first 16 chips, and checks the output on every clock and
    the 30-clock peak spacing;
  * it returns to normal mode with an extreme input that wraps.

  It also counts each mechanism: zero, +2 and -2 coefficients, serial and
  self-test loads, peaks, mode switches and wrap-around. A mechanism that
  never happens counts as a failure.
* The other testbenches check their module against an independent integer
  model.

All ten testbenches pass. Each testbench was also run against a copy of its
module with one deliberate bug, and every one of those runs failed.
