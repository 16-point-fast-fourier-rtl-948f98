# 16-point FFT core with serial I/O

A 16-point radix-2 decimation-in-time FFT in which the whole transform is one
block of combinational logic: all 16 inputs go in in parallel and all 16 bins
come out in the same clock cycle. A fully parallel transform of 64-bit samples
would need more than 2000 I/O pins, so the core puts a serial-in/parallel-out
register (SIPO) in front of the datapath and two parallel-in/serial-out
registers (PISO) behind it. A small state machine fills the SIPO one sample per
cycle and then empties the PISOs one result per cycle.

The datapath does more than a forward transform. It runs the forward FFT and
then the inverse transform, which it builds from a second forward FFT: conjugate
the spectrum, transform it again, divide by N = 16. The serial outputs therefore
carry the reconstructed time sequence. That makes the core a self-checking
demonstrator of forward and inverse transforms. The forward spectrum is an
internal signal (`spectrum` in `fft16_core`), not an output.

```
 si ──► SIPO ──► bit-reverse ──► fft16 ──► conjugate ──► bit-reverse ──► inverse_fft16 ──► PISO (re) ──► so_re
 (64b)  16x64b   (wiring)      (forward)  (÷2^28)        (wiring)      (fft16, ÷16)     PISO (im) ──► so_im
          ▲                                                                              ▲
          └────────────── control_unit: sipo_en, load, piso_en, out_valid, busy ─────────┘
```

## Fixed-point arithmetic: where the scale goes

This is the least obvious part of the design. Every value is a 64-bit
two's-complement integer, for the real part and for the imaginary part.

**Twiddle factors** are integers scaled by 2^7 = 128:

| k | W16^k (exact) | stored (re, im) |
|---|---------------|-----------------|
| 0 | 1 | (128, 0) |
| 1 | 0.924 − 0.383j | (118, −49) |
| 2 | 0.707 − 0.707j | (90, −90) |
| 3 | 0.383 − 0.924j | (49, −118) |
| 4 | −j | (0, −128) |
| 5..7 | mirror images | (−49, −118), (−90, −90), (−118, −49) |

These are 0.924, 0.707 and 0.383 (three decimals) times 128, truncated. They
are not the closest 8-bit values: 90 is 0.6 % small. They are kept because
they reproduce the reference results below exactly.

**No renormalisation per stage.** A butterfly computes

```
t        = x[k+N/2] · W      (W scaled by 128)
y[k]     = 128 · x[k] + t
y[k+N/2] = 128 · x[k] − t
```

The upper leg is multiplied by 128 (W^0), not passed through, so both legs
carry the same scale. Nothing is shifted back. Each stage adds a factor 2^7,
and after the four stages the forward spectrum is the DFT times 2^28. All
arithmetic is exact integer arithmetic until it wraps at 64 bits, so the only
error is the twiddle quantisation. A side effect: every FFT output is a
multiple of 128.

**Between the transforms** (`conjugate`), each bin is conjugated and divided
by 2^28, rounding toward zero. This brings the spectrum back to the scale of
the input samples. Without it the second pass would need 2^56 of headroom on
top of the signal, which a 64-bit word does not have. Parameter `MID_SHIFT`
(default 28) sets the shift.

**After the second FFT** (`inverse_fft16`), the result is divided by 16. The
output words are the time sequence times 2^28. Read `so_re` and `so_im` as
signed numbers with 28 fraction bits.

**Input range.** The forward spectrum fits for |x| < 2^31. The whole round trip
fits only for |x| < 2^27 (16 · 16 · |x| · 2^28 < 2^63). Larger inputs wrap
silently. Nothing detects overflow.

**Accuracy.** Take the ramp x[n] = n, n = 0..15, as the reference case. The
forward spectrum is exactly −8.005859 + 40.058594j in bin 1, −8 + 19.25j in
bin 2 and 120 in bin 0. The exact values are −8 + 40.2187j and −8 + 19.3137j.
After the round trip, sample 0 comes back as 0.25, sample 1 as
1.112389 − 0.007835j, sample 8 as 7.75 and sample 15 as 14.562477. Both
quantisations cause these errors: the coarse twiddles, and dropping the
fraction bits of the spectrum at the ÷2^28 step. For random inputs of up to
±1000, the round-trip error stayed below about 1.5 % of the peak.

## Datapath blocks

- `butterfly #(N)`: one DIT stage of width N. It merges two N/2-point
  transforms with twiddles W_N^k = W16^(k·16/N). The four instances in an FFT
  stand for the 2-, 4-, 8- and 16-point butterflies.
- `fft16`: eight 2-point, four 4-point, two 8-point and one 16-point
  butterfly. The first stage takes adjacent inputs, (0,1), (2,3), and so on.
  The inputs must therefore arrive in bit-reversed order (`x[i]` = sample
  `bitrev4(i)`). The bins come out in natural order.
- `conjugate`: negates the imaginary part and divides by 2^`MID_SHIFT`.
- `inverse_fft16`: an `fft16` followed by division by 16. It does not
  conjugate the result again. For a real input sequence the imaginary parts
  come out close to zero either way. The sign of those small residues follows
  from leaving out the final conjugation.
- The two bit reversals are plain wiring in `fft16_core`, using
  `fft_pkg::bitrev4`.

The datapath has no pipeline registers. Its critical path runs through eight
butterfly stages of 64-bit multiply-add, plus the rescaling. On an FPGA this
sets a long clock period: about 108 ns was reported for a mid-size device,
where the design used 720 9-bit hardware multipliers. Pipelining the datapath
would cut the period and could reuse multipliers. That is a natural next step,
but it is not done here.

## Sequencing and timing

`control_unit` has three states, IDLE, FILL and READ, and a 6-bit cycle
counter. Let cycle 0 be the cycle in which `start` is seen while idle:

| cycle | what happens |
|-------|--------------|
| 0 | `start` high, `busy` low |
| 1 .. 16 | FILL: `in_take` (= `sipo_en`) high; sample x[n] must be on `si` in cycle n+1 |
| 17 | READ, counter 0: `load` copies the datapath result into both PISOs |
| 18 .. 33 | `piso_en`: one word moves to the registered outputs per cycle |
| 19 .. 34 | `out_valid` high; result n is on `so_re` / `so_im` in cycle 19+n |
| 34 | already IDLE: a new `start` here begins the next pass with no gap |

A pass takes 34 cycles. Of these, 16 fill the SIPO (the transform itself takes
no clock cycles) and 16 read out the result. The other two are the load cycle
and the output register. `start` is ignored while `busy` is high. `rst` is
asynchronous and active high. It returns the FSM to IDLE and clears the SIPO
and PISO contents.

The registers use clock enables (`sipo_en`, `piso_en`) in place of gated
clocks. The SIPO shifts new words in at the top, so after 16 shifts the first
sample sits in slot 0 (`po[63:0]`). The PISO captures all 16 words on `load`
and then hands out slot 0 first, refilling with zeros from the top. Its
output `so` is itself a register, and it does not change while `load` is
high.

## Ports of `fft16_core`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | asynchronous reset, active high |
| `start` | in | 1 | begin a pass; taken only while `busy` is low |
| `si` | in | 64 | real input sample, signed integer |
| `in_take` | out | 1 | `si` is sampled in this cycle |
| `busy` | out | 1 | a pass is filling or reading out |
| `out_valid` | out | 1 | `so_re` / `so_im` hold a result |
| `so_re`, `so_im` | out | 64 | round-trip result, signed, 28 fraction bits |

The inputs are real. The imaginary inputs of the first FFT are tied to zero.

## Where this RTL goes beyond or departs from the original description

The original design description gives the structure. That covers the four
butterfly stages, the conjugate-and-transform-again inverse, the 64-bit
SIPO/PISO registers, the FSM with its 6-bit counter, and the 2^7 scale factor.
The following points were filled in here:

- The twiddle values were chosen because they reproduce the published
  reference results exactly.
- The ÷2^28 rescale between the transforms and its rounding toward zero are
  not described. They are needed to keep 64 bits, and with them the published
  round-trip values come out to every printed digit.
- Clock enables replace the gated register clocks.
- The IDLE/FILL/READ encoding and the exact cycle schedule are this design's
  choices. The original quotes "16 cycles to compute plus 16 to read", about
  32 in all. Here it is 34.
- `in_take`, `busy` and `out_valid` are added outputs. They are needed to use
  the serial interface without counting cycles outside the core.
- The reset polarity, and the fact that the reset clears the data registers,
  are this design's choices.

## Files

`rtl/`: `fft_pkg` (types, twiddle table, bit reversal), `butterfly`, `fft16`,
`conjugate`, `inverse_fft16`, `sipo`, `piso`, `control_unit`, and the top,
`fft16_core`.

`tb/`: one self-checking testbench per module (`tb_<module>`) and
`fft_ref_pkg`. The package is an independent integer FFT model with its own
twiddle table and loop structure, plus a floating-point DFT. These
testbenches check each block as follows:

- `tb_butterfly`: all four widths against the butterfly equations.
- `tb_fft16`: the ramp against the published spectrum, and random real and
  complex inputs bit-exactly against the model.
- `tb_conjugate`: the divide-and-negate step.
- `tb_inverse_fft16`: random bins bit-exactly, the ramp round trip against the
  published values, and random round trips within tolerance.
- `tb_sipo`, `tb_piso`: the shift behaviour and enables, with random stalls.
- `tb_control_unit`: a cycle-exact schedule model, with starts ignored while
  busy and a reset in the middle of a pass.
- `tb_fft16_core`: the end-to-end test at the default size. It runs the
  ramp, compares the internal spectrum with the published values, and makes
  20 random passes. These include back-to-back passes, ignored starts, idle
  gaps and a reset in mid-fill. Every output word must match the model
  exactly.

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb \
  rtl/fft_pkg.sv tb/fft_ref_pkg.sv rtl/butterfly.sv rtl/fft16.sv rtl/conjugate.sv \
  rtl/inverse_fft16.sv rtl/sipo.sv rtl/piso.sv rtl/control_unit.sv rtl/fft16_core.sv \
  tb/tb_fft16_core.sv --top-module tb_fft16_core
./obj_dir/Vtb_fft16_core
```

For another block, list `fft_pkg.sv`, `fft_ref_pkg.sv`, the modules it uses
and its testbench. The end-to-end run prints the spectrum and the
reconstructed ramp, then the result line.

To change the arithmetic, start in `fft_pkg`. `DATA_W` is the word width,
`tw_re`/`tw_im` hold the twiddle table, and `MID_SHIFT` in `conjugate` should
stay equal to four times `TW_SHIFT`. The reference model in `tb/fft_ref_pkg.sv`
keeps its own twiddle table. Keep the two tables in step, or the bit-exact
checks will fail.
