# Multiplier-less, carry-save FIR filter for cascaded FPGAs

This is a high-throughput FIR filter. It needs neither multipliers nor carry
chains, and its clock rate does not depend on the number of taps or on the
word width. Three ideas make that possible:

1. **Coefficients of two power-of-two terms.** Every coefficient is restricted
   to `c = ±2^k1 ± 2^k2`. For example, 65 = 64 + 1, 72 = 64 + 8 and
   -30 = -32 + 2. Multiplying by such a coefficient takes two shifts and
   possibly two negations. Shifts are only wiring, so a tap is two rows of
   full adders.
2. **Transposed form with a carry-save partial sum.** The input sample goes to
   every tap at once. The partial sum moves from tap to tap through one
   register per tap. It is kept as two vectors, a sum vector `s` and a carry
   vector `c`, and is never resolved inside the filter. So the delay from one
   register to the next is two full adders, whatever the filter's length or width.
3. **Partitioning over chips.** The tap chain is cut into chip-sized pieces.
   The first chip holds 11 taps. Each later chip holds 10, because it also has
   to take in the 40-bit carry-save partial sum. Chips are connected output to
   input, and each boundary adds one cycle of latency.

A final carry-propagate adder turns the carry-save pair into an ordinary
two's-complement result.

The default configuration is an 11-tap linear-phase low-pass filter:

| item | value |
|---|---|
| taps `h[0..10]` | -30 6 24 48 65 72 65 48 24 6 -30 |
| input sample | 10-bit two's complement integer |
| coefficient range | 10-bit two's complement integer |
| partial sum and output | 20 bits, wrapping on overflow |
| chips | 1 (11 taps on the first chip) |

With these taps, |y| ≤ 512 · 418 = 214016. That fits in 20 bits, so the
default filter never wraps.

## Arithmetic of one tap (`fir_tap`, `clb_fa`)

The tap computes `(s_out, c_out) <= (s_in, c_in) + COEF · x`. Every value is
taken modulo 2^20.

**Carry-save encoding.** A pair `(s, c)` stands for `s + 2·c (mod 2^ACC_W)`,
which means carry bit *i* has weight 2^(i+1). A full adder at bit *i* takes
`s[i]`, the carry from bit *i-1* and one operand bit. It produces a sum bit at
*i* and a carry bit that belongs to *i+1*. The carry out of the top bit is
dropped, and that dropping is the wrap-around.

**Two rows.** Row 1 adds term 1, the larger power, to `(s_in, c_in)`. Row 2
adds term 2 to row 1's sum and carry. Row 2's sum and carry are registered as
`s_out` and `c_out`. Per bit *i*:

```
row 1:  FA( s_in[i], c_in[i-1] , op1[i] ) -> sum1[i], cy1[i]
row 2:  FA( sum1[i], cy1[i-1]  , op2[i] ) -> s_out[i], c_out[i]   (registered)
```

**Operand bits.** Each term's operand is the sample, sign-extended to 20 bits
and shifted left by k. `clb_fa` chooses one of four operand modes at
elaboration time, so the sign of the coefficient and the constant low bits
need no wires:

| term | bit i ≥ k | bit i < k |
|---|---|---|
| +2^k | `x[i-k]` | 0 ("Low") |
| −2^k | `~x[i-k]` | 1 ("High") |
| absent | 0 | 0 |

**The +1 of a negation.** A negated term is `~(x<<k) + 1`. The bit-0 full
adder of each row has no lower bit to take a carry from. A negated term puts
its +1 on that free carry input, so negation costs no extra hardware.

**Integer coefficients.** The coefficient is given as a plain integer
(`COEF`). `fir_pkg::pot_decompose` searches for its two terms when the design
is elaborated. It tries one term first, then two terms, with the smallest
shifts first. If no decomposition exists, or the coefficient does not fit in
`COEF_W` bits, elaboration stops with an error.

Some outputs are constant because of the coefficient. For -30 = -32 + 2, bit 0
of row 2 adds two constant zeros, so `c_out[0]` of that tap is always 0.
Synthesis then reports a constant output bit. That bit is not a defect.

## Chips, ordering and latency (`fir_chip`, `fir_top`)

For taps `h[0..N-1]`, chain position *p* holds `h[N-1-p]`. The tap at the end
of the chain holds `h[0]`, and its register holds

    y[n] = Σ_k h[k] · x[n-k]

`fir_chip` holds `CHIP_TAPS` consecutive positions, starting at `FIRST_POS`.
At its inputs it registers the sample and the incoming carry-save partial sum.
These registers play the part of I/O-block flip-flops. Because the sample and
the partial sum are delayed alike, the result is unchanged and only the
latency grows.

The chip passes on:

* the registered sample, on `x_out`;
* the partial sum of its last tap, on `s_out` and `c_out`.

The first chip gets zeros on `s_in` and `c_in`.

`fir_top` works out the number of chips from `NUM_TAPS`, `FIRST_CHIP_TAPS`
(default 11) and `NEXT_CHIP_TAPS` (default 10). For example, 21 taps give
11 + 10 and 25 taps give 11 + 10 + 4.

Timing, counted from the clock edge that captures a sample on `x_in`:

| output | shows the sample after edge |
|---|---|
| `y_s`, `y_c` (carry-save, last chip) | capture + `NUM_CHIPS` |
| `y` (resolved, from `cs_final_adder`) | capture + `NUM_CHIPS` + 1 |

The filter takes one sample every clock and has no handshake. Reset
(`rst_n`, asynchronous, active low) clears every register. That is the same as
an all-zero input history.

## Top-level interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | sample clock |
| `rst_n` | in | 1 | asynchronous active-low reset |
| `x_in` | in | `X_W` (10) | input sample, signed |
| `y_s` | out | `ACC_W` (20) | sum vector of the result |
| `y_c` | out | `ACC_W` (20) | carry vector of the result, bit *i* has weight 2^(i+1) |
| `y` | out | `ACC_W` (20) | `y_s + 2·y_c` mod 2^20, registered |

Parameters: `X_W`, `COEF_W`, `ACC_W`, `NUM_TAPS`, `TAPS[NUM_TAPS]`,
`FIRST_CHIP_TAPS` and `NEXT_CHIP_TAPS`. To build another filter, set
`NUM_TAPS` and `TAPS` together. Every tap must be of the form `±2^a ± 2^b`.

## Where this RTL departs from, or adds to, the reference design

* **Final adder.** The reference implementation has no carry-resolving adder
  on its chips: the adder was left off as too costly for the FPGA family
  used, and noted as possible on a larger family. Here it is included as
  `cs_final_adder`, and the raw carry-save pair is still available on
  `y_s` and `y_c`.
* **21-tap filter coefficients.** The two-chip implementation used 21 taps.
  Those coefficients are not reproduced here. The RTL builds that 11 + 10 split
  when `NUM_TAPS=21`. The testbench runs the split with a test coefficient set.
* **Not implemented.** The design has no overflow report, only a wrapping
  result: a carry-save sum cannot tell a wrapped value from a valid one.
* **Choices made in this RTL.** The input registers of each chip, the reset,
  the way the negation +1 is placed and the coefficient search order are
  choices made in this RTL. They are not taken from the reference.
* **Not modelled.** Placement, long-line buffering and routing were what made
  the FPGA implementation fast. They cannot be expressed in RTL.

## Files

| file | contents |
|---|---|
| `rtl/fir_pkg.sv` | power-of-two term types, `pot_decompose` |
| `rtl/clb_fa.sv` | full adder with operand sign and Low/High selection |
| `rtl/fir_tap.sv` | one tap: two full-adder rows and the s/c register |
| `rtl/fir_chip.sv` | one chip: input registers and a chain of taps |
| `rtl/cs_final_adder.sv` | carry-save to binary adder with output register |
| `rtl/fir_top.sv` | chip cascade and final adder |
| `tb/fir_scoreboard.sv` | reference convolution model and checker used by the top-level benches |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_fir_top_full` |

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_clb_fa`: all 8 input combinations in all 4 operand modes.
* `tb_fir_tap`: 16 coefficients, among them ±1, 0, -512, 511, 496 and -384,
  with random samples and random carry-save inputs. It checks the one-cycle
  latency and that the output holds between edges.
* `tb_fir_chip`: a middle slice, positions 3 to 9, of an asymmetric 12-tap
  filter, with a random incoming partial sum.
* `tb_cs_final_adder`: random and corner carry-save pairs.
* `tb_fir_top`: a 21-tap two-chip filter and a 25-tap three-chip filter, side
  by side. The input is an impulse, steps, full-scale random samples that
  force wrap-around, and small random samples. The bench checks `y` and the
  carry-save outputs against a 64-bit convolution every cycle. It also
  requires that partial sums cross every chip boundary, that wrap-around
  occurs and that negative outputs occur.
* `tb_fir_top_full`: the default configuration, with no parameter overrides.
  It checks the impulse response (the taps, after the 2-cycle latency) and the
  step response (511 · 298). It then runs 5000 random samples through the
  scoreboard.

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --timescale 1ns/1ps -y rtl -y tb \
    rtl/fir_pkg.sv tb/tb_fir_top.sv --top-module tb_fir_top -o sim
./obj_dir/sim
```

Replace `tb_fir_top` with any other testbench name.
