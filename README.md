# 8-tap FIR low-pass filter in distributed arithmetic

This is an FIR filter that needs no multiplier. An N-tap FIR output
y(n) = Σ h(k)·x(n−k) is normally built from N multipliers and an adder tree.
Distributed arithmetic (DA) turns the sum around. It takes one bit from every
input sample at a time, and those bits address a small table. The table holds
every possible sum of the coefficients. A shift-and-add accumulator puts the
table outputs together, one bit weight per clock. So the hardware is a few
shift registers, two 16-word ROMs, two adders and a counter. The price is time:
a result takes one clock per input bit.

The filter as configured:

| item | value |
|---|---|
| type | low-pass, Hamming window, cut-off 1.5 MHz at 5 MHz sampling |
| length | 8 taps, h(0)..h(7) |
| coefficients | 0.0022, −0.0320, 0.0418, 0.4880, 0.4880, 0.0418, −0.0320, 0.0022 |
| coefficient format | 12-bit two's complement, 11 fraction bits: 5, −66, 86, 999, 999, 86, −66, 5 (× 2⁻¹¹) |
| input format | 8-bit two's complement fraction (Q1.7): `8'h40` = +0.5, `8'hC0` = −0.5 |
| output | 23-bit, full precision, value = `y` × 2⁻¹⁸ |
| rate | one sample per 8 clocks (40 MHz clock for 5 MS/s) |
| latency | 9 clocks from the accepting cycle to `y_valid` |

## How distributed arithmetic works

Write each input as a two's complement fraction with bits b_k(0) (LSB) to
b_k(7) (sign bit). Then

    y = Σ_k h(k)·x_k = Σ_{n=0..6} L(n)·2^n − L(7)·2^7      (times 2^-7)
    L(n) = Σ_k h(k)·b_k(n)

L(n) depends only on the 8 bits b_0(n)..b_7(n). So it can be read from a
table that holds all 2⁸ coefficient sums. The sign bit has negative weight,
so its table value is subtracted instead of added. This is the only
signed-number step in the datapath.

For a 4-tap example with coefficients A1..A4 = 2, 3, 4, 5, the table is:

| address (A1 A2 A3 A4) | 0000 | 0001 | 0010 | 0011 | 0100 | … | 1110 | 1111 |
|---|---|---|---|---|---|---|---|---|
| contents | 0 | 5 | 4 | 9 | 3 | … | 9 | 14 |

The first coefficient is on the most significant address bit. `da_lut` uses
that layout, and its testbench checks all 16 words of this example.

## Datapath

```
 x_in ─► tap_delay_line ─► X(0)..X(7) ─► 8 × da_shift_reg ─► 8 bits ─┐
                                          (LSB first)                  │
                ┌──────────────────────────────────────────────────────┘
                ▼
        da_lut_bank: da_lut(h0..h3) + da_lut(h4..h7) ─► [optional reg] ─► da_accumulator ─► y
                                                                            ▲  (±, >>1 feedback)
 da_ctrl: handshake, bit counter, first-step and sign-step flags ───────────┘
```

- **`tap_delay_line`** keeps the last 7 samples. X(0) is the sample being
  accepted. X(k) is the sample accepted k samples earlier. Reset fills the
  history with zeros, so the first outputs are the start-up responses
  y(0) = h(0)x(0), y(1) = h(0)x(1) + h(1)x(0), and so on.
- **`da_shift_reg`** (one per tap) loads a tap word and sends it out LSB
  first, one bit per clock.
- **`da_lut_bank`** is the divided table. One 8-input table would need
  256 words. Instead the taps are split into two groups of four, each with a
  16-word `da_lut`, and the two outputs are added. That is 32 words in place
  of 256, for one extra adder. The group size is the parameter `LUT_INPUTS`.
  `LUT_INPUTS = 8` gives the undivided table, and 2 gives four 4-word tables.
  The table contents are computed during elaboration from the coefficient
  parameter. No memory file is used.
- **`da_accumulator`** is the add/subtract unit with a shifting feedback
  loop. See the next section.
- **`da_ctrl`** counts the 8 bit steps. It flags the first step, where the
  accumulator starts from zero, and the sign step, where it subtracts.
- **`da_fir_core`** joins the shift registers, the table bank, the
  accumulator and the controller. It takes the 8 tap words in parallel, so it
  can be used without the delay line. `LUT_REG = 1` adds a register between
  the table and the accumulator. This shortens the critical path and adds one
  clock of latency. The default is 0.
- **`fir_da_top`** is the filter: the delay line plus the core.

## The accumulator, and why the result is exact

Bits arrive LSB first, so the accumulator shifts its old value right rather
than shifting the new term left:

    acc ← (first ? 0 : acc >>> 1) ± L(n)·2^7          (− on the sign step)

After the 8th step, acc = Σ L(n)·2ⁿ − L(7)·2⁷, which is exactly the integer
inner product Σ h_int(k)·x_int(k). The right shift never drops a 1 bit. After
step j, acc is a multiple of 2^(7−j), so the bits shifted out are zeros.
Nothing is rounded, and the output is the full-precision product sum.

Widths:

- A table sum fits in 12 + log2(8) = 15 bits.
- The accumulator and the output are 15 + 8 = 23 bits.
- The largest output of these coefficients is 2312·128 = 295 936, well under 2²².

The feedback shift must stay arithmetic. In SystemVerilog,
`cond ? '0 : acc >>> 1` is unsigned, because `'0` is unsigned, and that turns
`>>>` into a logical shift. The RTL therefore writes the choice as an `if`.

## Interface and timing (`fir_da_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; 8 clocks per sample |
| `rst` | in | 1 | synchronous, active high; clears history, accumulator and output |
| `in_valid` | in | 1 | `x_in` is offered |
| `in_ready` | out | 1 | the offer is taken at this clock edge if `in_valid` is high |
| `x_in` | in | 8 | sample, Q1.7 |
| `y` | out | 23 | output, value `y`·2⁻¹⁸; held until the next result |
| `y_valid` | out | 1 | one-clock pulse when `y` changes |
| `sign` | out | 1 | high during the sign-bit step of each computation |

Cycle by cycle: if a sample is accepted in cycle c, its bits are processed in
cycles c+1 .. c+8. `y` is written at the end of cycle c+8, and `y_valid` is
high in cycle c+9. `in_ready` is high when the filter is idle, and also during
the sign step. So a new sample can be loaded while the last bit of the
previous one is in use, and a steady stream runs at exactly one sample per 8
clocks. An offer made at any other time waits, with `in_ready` low, until the
sign step.

## Where this design departs from, or adds to, the source design

The filter specification, the coefficient values, the 11 fraction bits, the
8-bit input format, the table layout, the LSB-first bit-serial structure with
an add/subtract accumulator, and the split of the table into smaller tables
all come from the source design. The following are this implementation's
own choices:

- **Coefficient rounding.** The coefficients are rounded to the nearest
  multiple of 2⁻¹¹. The source keeps 11 fraction bits but does not say
  whether it rounds or truncates. Truncation would give 4 instead of 5 for
  h(0) and h(7), and 85 instead of 86 for h(2) and h(5).
- **Table split.** The split is two 4-input tables. The source says the
  tables are divided but not into what.
- **Delay line in hardware.** The source filter takes X(0)..X(7) as eight
  inputs, and its stimulus supplies the delayed copies. `da_fir_core` keeps
  that interface. `fir_da_top` adds the delay line so that the filter takes a
  single sample stream.
- **Handshake, reset and widths.** The valid/ready handshake, the
  synchronous active-high reset, the full-precision 23-bit output and the
  clock rate (8 × the sample rate) are not fixed by the source.
- **The `sign` output.** It is the sign-step flag, one clock per result. The
  source shows a signal of that name but does not define it.
- **Pipeline register.** The optional register after the table (`LUT_REG`)
  is off by default.
- **Symmetry not used.** The coefficients are symmetric, h(k) = h(7−k). This
  could halve the table by adding x(k) and x(7−k) first. That is not done
  here.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_da_shift_reg` | LSB-first order, hold, load-over-shift, reset |
| `tb_da_lut` | the 16-word worked example above, and the filter's first table |
| `tb_da_lut_bank` | all 256 bit patterns for group sizes 2, 4 and 8, plus random coefficients |
| `tb_da_accumulator` | 500 random and extreme 8-step sequences against Σ L(n)2ⁿ − L(7)2⁷, with idle gaps, and the `y_valid` pulse |
| `tb_da_ctrl` | cycle-exact sequencing against a model: back-to-back loads, stalls |
| `tb_tap_delay_line` | taps against a software history, with random gaps |
| `tb_da_fir_core` | the square-wave tap patterns, then 579 random and extreme tap sets, with `LUT_REG` = 0 and 1; latency 9 / 10 and full rate |
| `tb_fir_da_top` | the whole filter at default parameters (see below) |

`tb_fir_da_top` first plays the reference stimulus: a 1 MHz square wave of
amplitude 0.5 sampled at 5 MHz (0, then +0.5 ×3 and −0.5 ×2, repeated), 21
samples, back to back. It then plays 2000 random samples with random gaps.
Every output is compared bit-exactly with a direct-form multiply-and-add
model. The testbench also checks latency and rate. It counts sign steps,
back-to-back loads, stalled offers, and negative and positive outputs, and
fails if any of these never happens.

For the square wave, the output settles within 8 samples to the repeating
pattern 0.520, 0.520, −0.032, −0.476, −0.032. The filter rounds the square
wave's corners into a near-triangular wave, as a low-pass filter should.

## Simulating

All RTL is in `rtl/`, one module per file, plus the package `fir_da_pkg`. To
run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fir_da_pkg.sv \
    tb/tb_fir_da_top.sv --top-module tb_fir_da_top -Mdir obj -o sim
./obj/sim
```

Use any other `tb/tb_<module>.sv` the same way. Each run finishes in well
under a second.

## Changing the filter

All modules take their defaults from `fir_da_pkg`. To use another filter:

- Set `COEFS`, a packed array in which element k is h(k) in `COEF_W`-bit two's
  complement.
- Set `TAPS`. It must be a multiple of `LUT_INPUTS`; elaboration stops with an
  error otherwise.
- Set `DATA_W` (2 or more) for a different sample width.

Output width and latency follow from these: a result takes `DATA_W` clocks,
and the output is `COEF_W + clog2(TAPS) + DATA_W` bits wide.
