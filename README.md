# Multiplier-less FIR filter for 16-bit audio

A FIR filter spends nearly all of its area in the multipliers that scale each
delayed sample by a coefficient. When the coefficients are constants, those
multipliers can be replaced by shifts (free: they are only wiring) and
adders. In the transposed filter form every coefficient multiplies the *same*
input sample, so all the products can come from one shared shift-add network,
a *multiple constant multiplication* (MCM) block, in which partial products
common to several constants are computed once.

This RTL is a 4-tap linear-phase low-pass filter for signed 16-bit audio,

    y[n] = 23 x[n] + 81 x[n-1] + 81 x[n-2] + 23 x[n-3]

whose two distinct constants, 23 and 81, come out of a 3-adder shared MCM
graph. The same folder also holds a second, stand-alone MCM block for the
constants {29, 43}, the usual illustration of partial-product sharing.

## The MCM blocks

### {23, 81}: one shared fundamental

Built independently, 23x and 81x take four adders, for example
`3x = 2x + x; 23x = 8·3x − x` and `5x = 4x + x; 81x = 16·5x + x`. A graph
search over sums of shifted intermediate results (the cumulative-benefit
heuristic, HCUB) finds a cheaper graph, in which the intermediate value 9x
serves both outputs:

    9x  = (x << 3) + x
    81x = (9x << 3) + 9x        = 72x + 9x
    23x = (x << 5) − 9x         = 32x − 9x

That is three add/subtract operations and three shifts instead of four and
four. The adder depth is 2: 9x first, then 23x and 81x side by side.
(`rtl/mcm_hcub_23_81.sv`)

The graph search itself runs at design time and has no hardware of its own.
Only the graph it produced is built here.

### {29, 43}: two shared partial products

    3x  = (x << 1) + x        5x  = (x << 2) + x
    29x = (3x << 3) + 5x      43x = (5x << 3) + 3x

This takes four adders with adder depth 2. The filter does not use it. It is
brought out on its own ports of the top (`ex_x`, `ex_p29`, `ex_p43`) as a
second, combinational example. (`rtl/mcm_29_43.sv`)

All products are exact signed two's-complement values. A product of a B-bit
input and a constant c needs B + ceil(log2 c) bits, so it never overflows:
21 bits for 23x and 29x, 22 bits for 43x and 23 bits for 81x.

## The transposed delay/adder line

`rtl/fir_tdf_chain.sv` takes the tap products `prod[k] = h[k]·x[n]` and keeps
partial sums in registers `z[0..NTAPS-2]`:

    y        = prod[0] + z[0]                      (combinational)
    z[k]    <= prod[k+1] + z[k+1]   on en          (z[NTAPS-1] = 0)

After four samples, `y` equals `Σ h[k]·x[n−k]`. Each adder sits between
registers, so the critical path stays one adder long whatever the filter
length. The line is parameterised (`NTAPS` ≥ 2, partial-sum width `PW`) and
knows nothing about the coefficients.

## The filter top, `audio_fir_top`

    x_in ─► [input reg] ─► MCM {23,81} ─► 23x,81x,81x,23x ─► delay/adder line ─► [output reg] ─► y_out

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; active-low **synchronous** reset of all state |
| `in_valid` | in | 1 | a new sample is on `x_in` this clock |
| `x_in` | in | 16 | signed audio sample |
| `out_valid` | out | 1 | `y_out` was updated this clock (one-clock pulse) |
| `y_out` | out | 24 | signed filter output, full precision, held between samples |
| `ex_x` | in | 16 | input of the {29,43} example |
| `ex_p29`, `ex_p43` | out | 21, 22 | 29·ex_x and 43·ex_x, combinational |

Timing: a sample accepted on clock edge *t* gives its output on edge *t*+2,
with `out_valid` high for that one clock. Samples may arrive on consecutive
clocks, or with any number of idle clocks between them. Idle clocks leave the
filter state unchanged, which is what an audio sample rate far below the
clock rate needs. The coefficients sum to 208 < 2⁸, so 16 + 8 = 24 output
bits hold any result: the extremes are 208·32767 and −208·32768. An
assertion in the top (`a_latency`) checks that every `out_valid` follows an
`in_valid` two clocks earlier.

Shared widths (`XW` = 16, `YW` = 24, `NTAPS` = 4) are in `rtl/fir_pkg.sv`.

## Where this RTL comes from, and what it chooses itself

Taken from the design it implements:
- a 16-bit input;
- a transposed FIR in which a single multiplier-less MCM block replaces all
  the multipliers;
- the shared {23, 81} graph with 3 adders and 3 shifts;
- the {29, 43} shift-add example;
- shallow logic depth between registers.

This design's own choices, since the design does not state them:
- **The coefficients.** The design names no filter taps. The only constant
  set it gives for the shared-graph method is {23, 81}, so the filter uses
  h = {23, 81, 81, 23}, a symmetric low-pass with exactly those two distinct
  constants. To change the filter, write a new MCM block for the new
  constant set and change the tap map in `audio_fir_top` (the `prod[k]`
  assignments), `NTAPS` and `YW`.
- The exact adder graphs. They are the standard results for these constant
  sets, and they match the stated operation counts.
- Signed arithmetic, full-precision output with no rounding or saturation,
  the `in_valid`/`out_valid` handshake, synchronous reset, and the 2-clock
  latency.

Not built: the distributed-arithmetic (look-up-table) filter and the
unshared 4-adder {23, 81} graph. They are only the comparison points against
which the MCM approach is measured. FPGA figures quoted for the original
implementation (about 80 Spartan-3E slices, 156 flip-flops, 250 MHz) belong
to that implementation. This RTL has 114 flip-flops: 17 + 3·24 + 25.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog.

- `tb_mcm_hcub_23_81`, `tb_mcm_29_43`: both products against `*`, for the
  extreme values and 2000 random inputs.
- `tb_fir_tdf_chain`: impulse response, 3000 clocks of random samples with
  random idle clocks, and reset. The reference is a direct-form sum over a
  history kept in the testbench, with test coefficients {3, −5, 7, 2}.
- `tb_audio_fir_top` (default sizes, end to end). It runs:
  - the impulse response 23, 81, 81, 23;
  - full-scale positive and negative steps, which check that the output does
    not wrap;
  - 2000 random samples with random gaps;
  - a reset in mid-stream;
  - the {29, 43} example.
  
  It checks every output value and that each output arrives exactly two
  clocks after its sample. It also counts how often idle gaps, back-to-back
  samples, full-scale outputs and resets occur, and fails if any of them never
  happened.

Each testbench was also run against a copy of its module with one deliberate
error, such as a wrong shift in 9x or a wrong tap. Every one of those copies
failed its testbench.

Simulating with plain Verilator, for example the top:

    verilator --binary --timing -Irtl rtl/fir_pkg.sv rtl/mcm_hcub_23_81.sv \
      rtl/mcm_29_43.sv rtl/fir_tdf_chain.sv rtl/audio_fir_top.sv \
      tb/tb_audio_fir_top.sv --top-module tb_audio_fir_top
    ./obj_dir/Vtb_audio_fir_top

Each run takes well under a second.
