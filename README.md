# Programmable digital down converter (DDC) for WiMAX receivers

A software-defined-radio receiver samples a whole IF band with one A/D
converter. It then has to pull a single channel out of that sample stream in
the digital domain. This design does that in two steps. First it moves the
wanted channel to 0 Hz by multiplying the real samples with a complex local
oscillator. Then it low-pass filters and decimates the I and Q streams down
to the channel rate. It is aimed at IEEE 802.16d/e (WiMAX) channels, where
the first decimation stage needs a factor below 10. Everything that sets the
channel can be changed while the converter runs: the tuning frequency, the
CIC decimation factor and both half-band coefficient sets.

```
              +--------------------- mixer ----------------------+
 adc_data --->|---+----------------> (x) --> I --> CIC --> FIR 1 --> FIR 2 --> i_out
 adc_valid    |   |                   ^  cos                 (/dec)   (/2)      (/2)
              |   |     NCO ----------+
              |   |     (phase acc    |  -sin
              |   +---> + sine table)-+-> (x) --> Q --> CIC --> FIR 1 --> FIR 2 --> q_out
              +--------------------------------------------------+
```

One output pair comes out for every `4 * cic_dec` accepted ADC samples.

## Signal path and word lengths

| Point | Width | Format | Notes |
|---|---|---|---|
| ADC input `adc_data` | 14 | signed integer | one sample per cycle with `adc_valid` |
| NCO phase | 32 | unsigned, full scale = 360 degrees | `f = phase_inc * fs / 2^32` |
| NCO sine/cosine | 16 | signed Q1.15, peak 32767 | 1024-entry table |
| Mixer output | 16 | signed | `floor(x * cos / 2^15)`, `floor(-x * sin / 2^15)` |
| CIC and half-band data | 24 | signed | 16 + 2 * ceil(log2(9)) bits of CIC growth |
| Half-band coefficients | 16 | signed Q1.15 | h0, h1, h3, h5 |

The block chain and the CIC and half-band structures come from the
reference design. The design does not specify word lengths, so all of the
widths above are this implementation's choice. They are set in `ddc_pkg`.

## NCO (`nco`)

A 32-bit phase accumulator adds `phase_inc` once per accepted sample. The
addition wraps naturally. Whatever is left above full scale stays in the
register, so the phase stays continuous across a wrap and a retune. The top
10 phase bits address a full-period sine table. The cosine reads the same
table a quarter period (256 entries) ahead. The table is computed at
elaboration time in SystemVerilog as

    table[k] = round(sin(2*pi*k/1024) * 32767),   k = 0..1023

so no data file is involved. Phase truncation to 10 bits sets the spur level
to about -60 dBc. There is no phase dithering. `wrap` pulses when the
accumulator overflows. The outputs are registered and appear one cycle after
`en`.

## Mixer (`mixer`)

The mixer is two multipliers: `I = x * cos` and `Q = -x * sin`. This is
multiplication by `exp(-j*w*n)`, so a tone at `+f_NCO` lands at 0 Hz, and an
in-phase cosine at `f_NCO` gives a positive constant I and zero Q. Each
product is scaled back by 2^15 with an arithmetic shift, which rounds toward
minus infinity, and is registered.

## CIC decimator (`cic_decimator`)

This is the first decimation stage. It has two integrators at the input rate
and two combs at the output rate, and it needs no multipliers:

    H(z) = z^-2 * ((1 - z^-dec) / (1 - z^-1))^2,   DC gain dec^2

* **Integrators.** Each integrator is an adder followed by a register whose
  output feeds back. The second integrator adds the first integrator's
  register output. This register-to-register structure is what gives the
  `z^-2`.
* **Down-sampler.** It takes the second integrator's register output on
  every `dec`-th accepted input.
* **Combs.** Each comb is `u - u*z^-1`, clocked only when a sample is taken.
* **Wrap-around.** All registers are 24 bits and wrap modulo 2^24. The
  true output never needs more than 16 + 2*4 bits (for dec = 9, the gain is
  81 < 2^7), so the integrator overflow cancels in the combs. Do not reduce
  the width below `IW + 2*ceil(log2(MAX_DEC))`.
* **Setting the factor.** `dec` may be 1..9. A setting of 0 acts as 1, and
  anything above 9 acts as 9. The input counter restarts as soon as it
  reaches the new factor. The combs still hold samples taken at the old
  rate, so the first two outputs after a change are a blend of both rates.
  From the third output on, the response is exact.
* **Gain.** The output is not normalised. A full-scale DC input grows by
  `dec^2`, and the following stages keep that gain. Downstream logic should
  select the bits it needs.

`out_valid` pulses one cycle after the input that completes a group of `dec`.

## Half-band decimators (`halfband_decimator`)

These are the two FIR stages after the CIC (FIR 1 and FIR 2). Both use the
same module, each with its own coefficient set. Each stage halves the sample
rate. It is the hardest part to read, because it is written in polyphase
form. The filter is never evaluated at the full input rate. Instead, the
input is split into pairs.

* **Folded branch.** The first sample of each pair enters a five-register
  delay line, `b[0]` (newest) to `b[5]`. The line's taps are added in
  symmetric pairs before multiplication:
  `h1*(b0+b5) + h3*(b1+b4) + h5*(b2+b3)`.
* **Centre branch.** The second sample of each pair goes through three
  registers (`z^-3` at the output rate) and is weighted by the centre tap
  `h0`.
* **Output.** The two branches are summed once per pair, when the pair's
  second sample arrives. Four multipliers therefore do the work of an
  11-tap filter, and they run at the output rate.

Written out at the full input rate, the stage computes

    y[2m+1] = h1*(x[2m]   + x[2m-10])
            + h3*(x[2m-2] + x[2m-8])
            + h5*(x[2m-4] + x[2m-6])
            + h0* x[2m-5]

This is a symmetric 11-tap filter centred six samples back, with every other
tap zero apart from the centre. That is the defining shape of a half-band
filter.

**Tap names.** `h1` is the outer pair (5 samples from the centre), `h3` the
middle pair and `h5` the inner pair (1 sample from the centre). In the usual
notation the inner pair is the largest tap. Keep this in mind when loading
coefficients from a filter-design tool: a design `c[-5..5]` maps to
`h0 = c[0]`, `h5 = c[±1]`, `h3 = c[±3]` and `h1 = c[±5]`.

**Format.** Coefficients are Q1.15. The accumulator is 43 bits. The result
is rounded half-up at bit 15 and saturated to the 24-bit data width.

**Defaults.** `ddc_pkg::HB_COEF_DEFAULT` is an 11-tap Blackman-windowed
half-band: h0 = 16384, h5 = 9318, h3 = -1183, h1 = 57. Its DC gain is
exactly 1.0. Measured against the stage's input rate, its response is:

| Frequency / fs_in | 0.10 | 0.20 | 0.25 | 0.30 | 0.40 | 0.45 |
|---|---|---|---|---|---|---|
| Gain (dB) | -0.2 | -2.6 | -6.0 | -11.6 | -33.5 | -56.2 |

These defaults are a conservative starting point, not a channel
specification. An application should load coefficients for its own channel
bandwidth.

## Top level (`ddc_top`) and programming

`cfg` is a packed struct `ddc_cfg_t` with these fields:

| Field | Meaning |
|---|---|
| `phase_inc` | NCO tuning word |
| `cic_dec` | CIC factor, 1..9 |
| `hb1`, `hb2` | `hb_coef_t` coefficient sets for FIR 1 and FIR 2 |

There is no register bus: `cfg` is a plain input that a host register block
drives. Both arms share the same settings. When a setting takes effect:

* A new `phase_inc` is added from the next accepted sample on.
* A new CIC factor applies to the next mixer sample to reach the CIC, two
  cycles after the ADC.
* New coefficients apply to the next output a half-band stage computes.

To switch without blending old and new settings, hold `adc_valid` low for a
few cycles, or reset.

Timing:

* Samples are accepted on any cycle with `adc_valid`. This is normally every
  cycle of the sample clock.
* `out_valid` rises four clock edges after the edge that accepted the last
  ADC sample of a group. Those four edges are the mixer, CIC, FIR 1 and
  FIR 2 output registers. The NCO read and the ADC input register line up in
  the first cycle.
* With continuous input, outputs are exactly `4 * cic_dec` cycles apart.

The debug outputs `nco_wrap`, `cic_valid` and `hb1_valid` expose the NCO
overflow and the intermediate sample rates. An assertion checks that the I
and Q arms stay in step.

## Departures and limits

* **Widths, rounding, saturation.** All word lengths, the rounding modes and
  the saturation are this design's choices.
* **Filter orders.** The CIC has two stages, and its factor is limited to
  1..9. For larger factors or more stages, raise the `MAX_DEC`, `DW` and
  `STAGES` parameters of `cic_decimator`. Its output width follows from
  them.
* **Half-band length.** The half-band stages have a fixed 11-tap length
  (three free coefficients plus the centre). That limits the stopband to a
  few tens of dB for a practical transition band. Stopbands of 80 dB or more
  with narrow transitions need far longer filters than this structure
  provides.
* **Recursive CIC.** The CIC is implemented in recursive form
  (integrator/comb), not as a non-recursive (polyphase FIR) CIC.
* **No gain correction.** The CIC gain `dec^2` is not compensated, and no
  CIC droop compensation is applied.
* **ADC and configuration source.** The ADC is outside the design. So is
  any configuration bus.

## Files

* `rtl/ddc_pkg.sv`: widths, `hb_coef_t`, `ddc_cfg_t`, default coefficients.
* `rtl/nco.sv`, `rtl/mixer.sv`, `rtl/cic_decimator.sv`,
  `rtl/halfband_decimator.sv`: the datapath blocks.
* `rtl/ddc_channel.sv`: one arm (CIC, FIR 1, FIR 2).
* `rtl/ddc_top.sv`: the converter.
* `tb/ddc_ref_pkg.sv`: bit-true reference models. These are the rounded
  sine table, the CIC written as the N-th difference of an N-fold running
  sum in 64-bit arithmetic, and the half-band as a direct 11-tap convolution
  at full rate. They are written from the filter equations, not from the
  RTL structure.
* `tb/tb_<block>.sv`: one self-checking testbench per block. Each prints
  `TB_RESULT checks=N failures=M`.
* `tb/tb_ddc_top.sv`: the end-to-end test at default parameters.
  * A tone at the NCO frequency must come out at DC with gain `dec^2/2`.
  * Bit-exact comparison of every I/Q output and its latency while the NCO
    is retuned, the CIC factor is switched and the coefficients are changed.
  * Each of those events, and NCO wrap-around, is counted and required to
    happen.
* `tb/tb_ddc_decimation_sweep.sv`: the converter at every CIC factor 1..9.
  It checks output spacing `4*dec` and DC gain. It also feeds a tone
  `fs/256` above the NCO frequency and checks that the baseband output
  rotates at `+fs/256`. That confirms the direction of the frequency
  translation, which a DC test alone cannot show.
* `tb/tb_cic_fig3_configs.sv`: `cic_decimator` with its parameters raised
  to three larger configurations. These are one stage with factor 8, two
  stages with factor 32, and five stages with factor 32. Each output is
  checked bit-exactly, and each configuration is checked for a null at
  `fs/8`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ddc_pkg.sv tb/ddc_ref_pkg.sv rtl/*.sv tb/tb_ddc_top.sv \
    --top-module tb_ddc_top -o sim
./obj_dir/sim
```

Swap in another `tb/tb_*.sv` and its `--top-module` to run a block test. For
the block tests, list only the RTL files that block uses. Every testbench
finishes in well under a second.
