# ROM-less quadrature DDFS

A direct digital frequency synthesizer (DDFS) produces a digital sine wave
whose frequency is set by a control word. The usual design has a phase
accumulator and a table of sine values. This one has no table and no phase
accumulator. It keeps the current sine and cosine samples in two registers.
Every clock it rotates that pair by a small angle theta:

    sin(k+1) = sin(k) + theta * cos(k)
    cos(k+1) = cos(k) - theta * sin(k)

This is the angle-sum formula `sin(a + theta) = sin a cos theta + cos a sin theta`
with `cos theta ~ 1` and `sin theta ~ theta`. Terms of order theta^2 and
higher are dropped. The control word is theta itself, so changing it changes
the frequency at the next clock, and the phase stays continuous. The whole
datapath is two 16 x 16 multipliers, one 16-bit adder, one 16-bit subtractor
and two 16-bit registers. Both outputs, sine and cosine, come out every clock.

The RTL follows the architecture published as "A New Architecture of
Rom-Less Quadrature Direct Digital Frequency Synthesizer". That work gives the
recursion, the block diagram, the 16-bit word width and the start values.
The number formats, rounding and reset are choices made here. They are listed
under "Choices not fixed by the published architecture" below.

## Datapath

```
  sin_q --> [ x fctrl ] --> theta*sin --------------+
  cos_q --> [ x fctrl ] --> theta*cos ---+          |
                                         v          v
                 sin_d = sin_q + theta*cos          |
                 cos_d = cos_q - theta*sin <--------+

  on every clock:  sin_q <= sin_d,  cos_q <= cos_d     (two 16-bit registers)
  outputs:         sin_o = sin_q,   cos_o = cos_q
```

Put simply:

* `theta*cos(k)` is the product of the cosine register and `fctrl`. The sine
  adder adds it to the old sine.
* `theta*sin(k)` is the product of the sine register and `fctrl`. The cosine
  subtractor subtracts it from the old cosine.
* Both channels read the register values of the same cycle. Neither uses the
  other's new value.

There is one pipeline stage. The critical path runs from a register through
a multiplier and an adder back to a register.

| Module | File | Role |
|---|---|---|
| `ddfs_pkg` | `rtl/ddfs_pkg.sv` | widths, formats, `sample_t`, `fcw_t` |
| `ddfs_mult` | `rtl/ddfs_mult.sv` | theta multiplier: `round(sample * fctrl / 2^16)` |
| `ddfs_addsub` | `rtl/ddfs_addsub.sv` | 16-bit adder (`SUBTRACT=0`) or subtractor (`SUBTRACT=1`), wraps modulo 2^16 |
| `ddfs_reg` | `rtl/ddfs_reg.sv` | 16-bit state register, asynchronous reset to `INIT` |
| `ddfs_top` | `rtl/ddfs_top.sv` | the synthesizer: two of each of the above |

## Number formats and output frequency

* **Samples** (`sin_o`, `cos_o`) are 16-bit two's complement with 14
  fraction bits, so 1.0 is 16384. After reset, `sin_o = 0` and `cos_o = 16384`.
* **Control word** `fctrl_i` is 16-bit unsigned. It is read as
  `theta = fctrl / 2^16` radians per clock. The multiplier keeps the upper
  half of its 32-bit product, rounded to nearest.
* **Output frequency**: `f_out = f_clk * fctrl / (2*pi * 2^16)`. At 100 MHz,
  one step of `fctrl` is about 243 Hz. For example, `fctrl = 117` gives about
  28.4 kHz, with a quarter period of 880 clocks.
* Only positive frequencies are produced, since theta >= 0. Swap `sin_o` and
  `cos_o` to get the opposite direction of rotation.

## Accuracy: what dropping the theta^2 terms costs

This is the least obvious part of the design, and the part to understand
before using it.

The update is a matrix `[[1, theta], [-theta, 1]]`. Its determinant is
`1 + theta^2`, not 1. So the pair is not only rotated but also scaled by
`sqrt(1 + theta^2)` every clock. The amplitude therefore grows by about
`pi * theta` per period. The 16-bit rounding of each product adds a random
walk on top. Nothing in the loop pulls the amplitude or the phase back. The
outputs track the ideal functions well over a limited span, and drift away
beyond it:

* **Error over a quarter period** after reset, against the ideal `sin(k*theta)`
  and `cos(k*theta)` (from `tb_ddfs_top`):

  | fctrl | quarter period (clocks) | worst error |
  |---|---|---|
  | 109 | 944 | 1.6e-3 |
  | 117 | 879 | 1.4e-3 |
  | 120 | 857 | 1.5e-3 |
  | 256 | 402 | 3.1e-3 |

  All four are inside the 6e-3 bound that the published work reports for its
  quarter-period comparison.
* **Spectral purity over 65,536 samples** (from `tb_ddfs_sfdr`). This is the
  complex signal `cos + j sin`, with a Blackman-Harris window:

  | fctrl | 22 | 41 | 46 | 55 | 109 | 117 | 120 | 256 | 512 |
  |---|---|---|---|---|---|---|---|---|---|
  | SFDR (dB) | 52 | 58 | 65 | 63 | 71 | 72 | 74 | 79 | overflow |

  The published work reports about 100 dB, with 65 dB at fctrl = 512. This
  RTL does not reach that over a long record. The published numbers may have
  been measured over a different record length, or with a different theta
  scaling. Neither is known here.
* **Large control words overflow.** At `fctrl = 512` (theta = 1/128) the
  amplitude grows about 2.5 % per period. It passes full scale (+-2.0) within
  the 65,536-sample record, and the adders then wrap. Larger words overflow
  sooner. In practice, either re-apply reset from time to time, or keep
  `fctrl` in the range where the drift over the needed run length is acceptable.
* `fctrl = 0` holds the current sample pair.

## Choices not fixed by the published architecture

* **Theta scaling** `fctrl / 2^16` rad. The published work calls the
  control word theta, but does not say where its binary point is. With this
  scaling, control words of 117 to 120 give the quarter period of roughly 830
  to 880 samples that its accuracy plot shows.
* **Rounding of the products** to nearest (`ROUND = 1`). With truncation
  (`ROUND = 0`) the error over a quarter period at `fctrl = 109` grows from
  1.6e-3 to about 3.5e-2.
* **Reset**: asynchronous and active low. It loads sine = 0 and cosine = 1.0.
* **Overflow**: the adders wrap and do not saturate.
* **No input register on `fctrl_i`.** A new value affects the very next clock
  edge. Drive it from a register if the source is not synchronous.
* **No DAC or low-pass filter.** The outputs are the digital words. The
  published prototype chip's pad ring and its analog parts are not part of
  this RTL.

## Parameters

`ddfs_top` takes `W` (sample width, 16), `FW` (control word width, 16),
`THETA_FRAC` (fraction bits of theta, 16) and `ROUND` (1). 1.0 is always
`2^(W-2)`. If you change `W` or `THETA_FRAC`, keep `theta < 1` and
`W + FW` large enough for the product. The multiplier returns the product's
bits `[THETA_FRAC +: W]`.

## Testbenches

Each testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops by itself.

| Testbench | What it checks |
|---|---|
| `tb_ddfs_mult` | rounded and truncated products against floating point, corners and 20,000 random vectors |
| `tb_ddfs_addsub` | add and subtract with wrap-around, both overflow directions, 20,000 random vectors |
| `tb_ddfs_reg` | asynchronous reset to both start values, hold between edges, one-cycle load |
| `tb_ddfs_top` | full design at default parameters. Bit-exact against a reference model of the recursion every cycle. Also: quarter-period error bound, zero-crossing cycle count, on-the-fly frequency hops, hold at `fctrl = 0`, and 5,000 cycles of random control words. It counts each of these events and fails if one never happened. |
| `tb_ddfs_sfdr` | the control-word sweep 4 to 512. For each word: FFT of 65,536 output samples, peak at the expected bin, SFDR above a 45 dB sanity floor. Words with fewer than three periods in the record, or whose amplitude overflows, are only reported. |

Run one with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_ddfs_top rtl/ddfs_pkg.sv tb/tb_ddfs_top.sv
./obj_dir/Vtb_ddfs_top
```

Replace `tb_ddfs_top` with any other testbench name. Every testbench finishes
in well under a second of simulation time.
