# BPSK digital up/down converter with hold-interpolator CIC filters

This is a transmit/receive digital front end for a narrow BPSK signal. A
250 kbps data stream is BPSK-modulated onto a 5 MHz carrier at 80 Msps.
The digital up-converter (DUC) raises the sample rate by 3, to 240 Msps. It
then moves the signal to a 65 MHz intermediate frequency (IF) as a single
sideband. The digital down-converter (DDC) does the reverse: it takes
240 Msps IF samples and returns 80 Msps complex baseband at 5 MHz.

The rate changes use three-stage CIC filters, with no multipliers. In each
filter the innermost stage is replaced by something cheaper: a *hold
interpolator* on the way up and an *integrate-and-dump* on the way down. The
carrier is a 60 MHz numerically controlled oscillator (NCO) built from small
sine tables and four multipliers. There is no pulse-shaping filter after the
modulator.

The RTL follows a published DUC/DDC design for a Stratix-III board. That
description gives the signal chain, the rates and frequencies, the CIC
structure and the NCO settings. It does not give bit widths, scaling,
pipelining, the NCO internals, the PRBS polynomial or the receive low-pass
filter. Those are choices made here; they are listed under
[Departures and choices](#departures-and-choices).

## Frequency and rate plan

| quantity | value | where it comes from |
|---|---|---|
| system clock | 240 MHz, single domain | IF sample rate |
| baseband sample rate | 80 Msps (`ce80`: one clock in 3) | design |
| data rate | 250 kbps = 320 baseband samples per bit = 960 clocks | design |
| BPSK carrier | 5 MHz = 16 samples per period at 80 Msps | design |
| NCO | 20-bit accumulator, word 2^18 → 240 MHz · 2^18/2^20 = 60 MHz | design |
| IF | 60 + 5 = 65 MHz (upper sideband) | design |
| unwanted sideband | 55 MHz, cancelled by the I/Q sum | design |

The whole design runs on one clock. The 80 Msps parts (PRBS, modulator, CIC
combs, DDC outputs) advance only in clocks where the enable `ce80` is high.
`ce80` comes from a modulo-3 counter in the top level. Both 80 Msps sides
share this one enable, so there is no clock-domain crossing anywhere.

## Signal chain

```
 PRBS7 ─► BPSK ROM ─┬─ I = d·cos ─► CIC↑3 ─► × NCO sin ─┐
 (250 kbps)  (5 MHz)└─ Q = d·sin ─► CIC↑3 ─► × NCO cos ─┴─► + ─► dac_data (65 MHz IF)
                                                                  │ loopback
 adc_data ───────────────────────────────────────────────────────┴─► mux ─┐
                                                                           │
   ddc_i ◄── CIC↓3 ◄── LPF ◄── × NCO sin ◄──────────────────────────────────┤
   ddc_q ◄── CIC↓3 ◄── LPF ◄── × NCO cos ◄──────────────────────────────────┘
```

**Single-sideband up-conversion.** Take I = d·cos(ω_b t) and Q = d·sin(ω_b t),
with d = ±1 the data. Mixing I with the NCO sine and Q with the NCO cosine and
adding the two gives

  d·[cos ω_b t · sin ω_c t + sin ω_b t · cos ω_c t] = d·sin((ω_c + ω_b) t).

This is a single tone at 65 MHz. The carrier (60 MHz) and the lower sideband
(55 MHz) cancel. They cancel exactly only when the two paths are identical,
so the I and Q paths are two copies of the same hardware. In bit-exact
simulation the 55 MHz component is about 100 dB below the 65 MHz one. The
hardware this design comes from measured about 27 dB on its analog output.

**Down-conversion.** The DDC multiplies the IF by the sine to get I and by the
cosine to get Q:

  sin((ω_c+ω_b)t)·sin ω_c t = ½[cos ω_b t − cos((2ω_c+ω_b)t)]
  sin((ω_c+ω_b)t)·cos ω_c t = ½[sin ω_b t + sin((2ω_c+ω_b)t)]

This gives back the 5 MHz cosine and sine, plus an image at 125 MHz. At
240 Msps that image shows up at 115 MHz. The LPF, [1 2 1]/4, has a double
zero at 120 MHz and attenuates 115 MHz by about 47 dB. The CIC decimator then
brings the rate down to 80 Msps.

## The CIC filters and their optimised core

Both filters are R = 3, M = 1 CIC filters with N = 3 stages by default (`N`
is a parameter; set `OUT_W` to match the bit growth, 3^(N−1) for the
interpolator and 3^N for the decimator). Their response at 240 Msps
is (1 + z⁻¹ + z⁻²)³, which is the FIR h = [1 3 6 7 6 3 1] (tap sum 27).

Each CIC stage is built from two parts:
- **Integrator** (`cic_integrator`): y(n) = y(n−1) + x(n). This is an adder
  and a register. It is allowed to wrap around.
- **Comb** (`cic_comb`): y(n) = x(n) − x(n−M), run at the low rate.

**Interpolator** (`cic_interpolator`). The textbook interpolator is three
combs at 80 Msps, a zero-stuffer, and three integrators at 240 Msps. The
innermost comb → zero-stuff → integrator triple does nothing more than repeat
each low-rate sample three times. A register loaded once per `ce80` does the
same job. That register is `hold_interpolator`. So the chain is:

  comb → comb → hold(R=3) → integrator → integrator.

This saves one adder at each rate and a delay. The DC gain is (RM)^N/R = 9.
The output keeps this gain: 14-bit input, 18-bit output. The combs grow one
bit each (15, 16 bits). The integrators work at the full 18 bits with
two's-complement wrap-around. This is exact, because the final result always
fits in 18 bits.

**Decimator** (`cic_decimator`). The same trick is applied in the other
direction. The innermost integrator → ↓3 → comb triple only adds three
consecutive inputs. `integrate_dump` does that with one accumulator that is
emptied on each `ce80`. So the chain is:

  integrator → integrator → integrate-and-dump → comb → comb.

The DC gain is R^N = 27. This is kept: 16-bit input, 21-bit output, all
stages 21 bits wide.

Both testbenches check the optimised filters bit-exactly against the
textbook impulse response, so the two structures are shown to be equal.

### Latencies (one clock = 4.17 ns)

"Clock t" below means the clock in which the enable is high and the input is
taken.

| block | timing |
|---|---|
| `cic_interpolator` | x(k) taken in clock t → y(3k), y(3k+1), y(3k+2) in clocks t+2N−1 … t+2N+1 (t+5 … t+7 for N = 3) |
| `cic_decimator` | ce_out in clock t → y = Σ h(k)·x(t−(N−1)−k) on `y` from clock t+N, `y_valid` high that clock (t+3 for N = 3) |
| `nco` | accumulator value of clock t → sin/cos in clock t+3 |
| `mixer`, `lpf` | 1 clock |
| `duc` | NCO value of clock t meets the interpolator output of clock t; the sum is on `if_out` in clock t+2 |

## NCO

`nco` is a multiplier-based oscillator. It works as follows:
- A 20-bit phase accumulator adds `phase_inc` every clock.
- Optional dither adds the 6 low bits of a 15-bit LFSR below the truncation
  point.
- The top 14 bits form the angle. The angle is split into a coarse part A
  (7 bits) and a fine part B (7 bits).
- The outputs come from two identities:
  - sin(A+B) = sinA·cosB + cosA·sinB
  - cos(A+B) = cosA·cosB − sinA·sinB

There are three tables of 128 × 14 bits, so 5376 bits in all. All three are
filled at elaboration:

- `coarse[a] = round(8191·sin(2πa/128))`. This one table is read twice: at A
  for the sine, and at A + 32 (a quarter turn on) for the cosine.
- `fsin[b] = round(8192·sin(2πb/16384))`.
- `fcos[b] = round(8192·cos(2πb/16384))`. This is unsigned, and at most 8192.

The products are rounded, shifted right by 13 and saturated to ±8191. The
error is within 2 LSB of the ideal 8191·sin, as checked against real
arithmetic. With the default word 2^18 the 6 low phase bits are always zero,
so dither has no effect at 60 MHz. The output is then exactly 0, 8191, 0,
−8191.

Each converter has its own NCO, and both start from the same reset, so they
run in step; one shared NCO would behave the same. The
loopback path from the DUC mixers to the DDC mixers is four clocks long:
1. the mixer register,
2. the adder register,
3. the DAC port register,
4. the receive register.

Four clocks is exactly one period of the 60 MHz NCO, so the receiver sees the
carrier with no phase rotation. If you change the NCO word or the path, the
recovered I/Q rotates by 2π·f_NCO·delay. A real receiver would correct that
rotation in the demodulator, which is not part of this RTL.

## Widths and scaling

| point | width | full-scale amplitude |
|---|---|---|
| BPSK I/Q | 14 | 8191 |
| CIC interpolator out | 18 | 9·8191·0.983 at 5 MHz ≈ 72 470 |
| DUC mixers | product >> 15, 16 bits | ≈ 18 114 each |
| `dac_data` (sum, saturated) | 16 | ≈ 18 114 |
| DDC mixers | product >> 13, 16 bits | ≈ 9 056 at baseband |
| LPF | 16 | unchanged (−0.04 dB at 5 MHz) |
| `ddc_i`, `ddc_q` | 21 | ≈ 239 300 in loopback (29.2 × 8191) |

End to end, the loopback gain from `bb_i`/`bb_q` to `ddc_i`/`ddc_q` is about
29.2 at 5 MHz. The CIC integrators wrap around, which is exact because the
filter outputs fit their widths. The mixers and the adder clamp to the
symmetric range ±(2^(W−1) − 1).

## Top level (`duc_ddc_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 240 MHz clock, synchronous active-low reset |
| `loopback` | in | 1 | 1: the DDC is fed from the DUC output; 0: from `adc_data` |
| `adc_data` | in | 16 | ADC samples, 240 Msps, registered once inside |
| `dac_data` | out | 16 | IF to the DAC (registered) |
| `data_bit`, `data_stb` | out | 1 | PRBS bit and new-bit strobe (every 960 clocks) |
| `bb_i`, `bb_q` | out | 14 | modulator output (80 Msps, changes after a `ce80` clock) |
| `ddc_i`, `ddc_q` | out | 21 | received baseband, 80 Msps |
| `ddc_valid` | out | 1 | high for one clock when `ddc_i`/`ddc_q` change |

Parameter: `SAMPLES_PER_BIT`, default 320. The PRBS is PRBS7
(x⁷ + x⁶ + 1), starts from all ones, and its bit 1 sends +carrier. Because
320 is a multiple of 16, every bit starts at the same carrier phase.

The DAC, ADC, RF sections and the baseband demodulator are outside this RTL.
Their signals are the top-level ports.

## Departures and choices

These follow the original design description:
- the chain PRBS → BPSK ROM → CIC↑3 → mixers with NCO sine (I) and cosine (Q)
  → adder, and the receive chain mixer → LPF → CIC↓3;
- the rates, carrier, bit rate and IF;
- the hold-interpolator CIC with two combs and two integrators;
- the NCO's 20/14/14-bit precision, the 60 MHz word 262144, and dithering
  switched on.

These are this implementation's own:
- **Comb sign.** The comb is x(n) − x(n−M). One equation in the source writes
  a plus sign, but its transfer function 1 − z^−RM and its figure both
  subtract.
- **Sideband algebra.** The source's product-to-sum identity for the sideband
  adder gives cos(α+β) where the algebra gives cos(α−β). The wiring used
  here (I × sine, Q × cosine, add, with I = cos and Q = sin) is the one that
  yields the upper sideband the source reports.
- **Decimator core.** The integrate-and-dump in the decimator is inferred. The
  source calls both filters optimised but only describes the interpolator.
  The transfer function is the standard one either way.
- **NCO internals.** The coarse/fine table split is a guess. It comes to the
  same 5376 table bits and four multipliers per NCO as the original core.
  Two NCOs plus four mixers give 12 multipliers, the DSP count reported for
  the original. Its memory figure (5376 bits) would instead fit one shared
  NCO; the two choices behave the same here.
- **LPF taps.** The LPF is named in the original but never specified. The
  [1 2 1]/4 FIR is the simplest one that removes the image.
- **Everything else.** All widths, scaling, rounding, saturation and
  pipelining are choices made here, as are reset behaviour, the PRBS
  polynomial, the loopback select, and the registered converter ports.
- **Not modelled.** The original's FPGA resource figures (ALUTs, registers,
  pins) are not reproduced or compared.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `prbs_gen_tb` | bit period, changes only on strobes, b(n)=b(n−6)⊕b(n−7), 64 ones per 127 |
| `bpsk_mod_tb` | every sample against d·round(8191·cos/sin(2πk/16)) |
| `cic_integrator_tb`, `cic_comb_tb`, `hold_interpolator_tb` | against behavioural models, random enables, M = 1 and 2 |
| `cic_interpolator_tb`, `cic_decimator_tb` | N = 2, 3, 4: bit-exact against the textbook response ([1 1 1] convolved N times), latency, DC gain at full scale, output spacing |
| `nco_tb` | exact 60 MHz pattern; ±2 LSB for random words without dither, ±6 with dither, dither active |
| `mixer_tb` | rounding and saturation, both scalings used in the design |
| `lpf_tb` | every output bit-exact; 115 MHz < 1 %, 5 MHz > 99 % |
| `duc_tb` | 65 MHz amplitude within 2 % of the computed gain, every sample within 1 % of that tone; 55 MHz ≥ 27 dB down, 60 MHz ≥ 40 dB down; d = −1 negates the output |
| `ddc_tb` | 5 MHz phasor amplitude within 1 %, every sample within 1 %; a 55 MHz input is rejected |
| `duc_ddc_top_tb` | full defaults, 24 bits through the loopback: complex gain within 2 % of 29.2, carrier phase within 20°, residual < 5 %; then ADC mode with a 65 MHz tone; bit period 960 clocks, DDC output every 3 clocks; counts bit flips, outputs, and both modes |

`duc_ddc_top_tb` runs the top with all parameters at their defaults. It takes
well under a second.

### Running a testbench

All files are in `rtl/` and `tb/`, one module or package per file. The
package `duc_ddc_pkg` must be read first:

```
verilator --binary --timing --assert -Irtl rtl/duc_ddc_pkg.sv \
          tb/duc_ddc_top_tb.sv --top-module duc_ddc_top_tb -Mdir obj
./obj/Vduc_ddc_top_tb
```

Replace the testbench name for any other block. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/duc_ddc_pkg.sv rtl/<module>.sv`.

## Files

| file | content |
|---|---|
| `rtl/duc_ddc_pkg.sv` | rates, widths, NCO settings, table-filling functions |
| `rtl/prbs_gen.sv` | PRBS7 bit source |
| `rtl/bpsk_mod.sv` | 16-entry table BPSK modulator (I = cos, Q = sin) |
| `rtl/cic_integrator.sv`, `rtl/cic_comb.sv` | CIC stages |
| `rtl/hold_interpolator.sv`, `rtl/integrate_dump.sv` | optimised innermost stages |
| `rtl/cic_interpolator.sv`, `rtl/cic_decimator.sv` | three-stage CIC by 3 |
| `rtl/nco.sv` | multiplier-based NCO |
| `rtl/mixer.sv` | rounding, saturating multiplier |
| `rtl/lpf.sv` | [1 2 1]/4 low-pass |
| `rtl/duc.sv`, `rtl/ddc.sv` | up- and down-converter |
| `rtl/duc_ddc_top.sv` | top level |
| `tb/*_tb.sv` | one testbench per module |
