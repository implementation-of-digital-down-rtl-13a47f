# Digital down converter and pulse compressor for a radar IF receiver

This is the digital core of a wideband radar receiver. An ADC samples a 10 MHz intermediate
frequency at 40 MSps. The core turns that real stream into complex baseband at 5 MSps: it
mixes with a numerically controlled oscillator and decimates by 8 in three filter stages.
It then compresses the received linear-FM pulse in time by correlating it with a stored copy
of the transmitted pulse. What comes out is the complex correlation and its magnitude. A long,
low-power chirp becomes a short, high peak at the echo's range cell. A downstream processor
reads that peak.

```
            14 b, 40 MSps                          16 b, 5 MSps I/Q           39 b
 ADC ──► adc_capture ──► ┌────────────── ddc ──────────────┐ ──► pulse_compression ──► re, im, |.|
 (offset    (two's       │  x ─┬─► (×) ─► CIC ─► CFIR ─► PFIR ─► I │   4 real FIRs vs. the
  binary)   complement)  │     │    ▲cos   ↓2     ↓2      ↓2      │   reference, 2 adders,
                         │     └─► (×) ─► CIC ─► CFIR ─► PFIR ─► Q │   CORDIC magnitude
                         │          ▲-sin                          │
                         │        NCO (16-bit phase, 1024×14 ROM)  │
                         └─────────────────────────────────────────┘
 board reset, PLL lock ─► reset_sync ─► all blocks
```

All logic runs on the 40 MHz sample clock. Lower rates are carried by `valid` strobes:
the CIC emits one sample every 2 clocks, the CFIR one every 4 and the PFIR one every 8.
The 20/40/160 MHz clocks of an FPGA clock manager are not used. The clock manager itself is
outside this RTL; only its lock flag comes in.

## Number plan

| point | width | rate | notes |
|---|---|---|---|
| ADC word | 14 b offset binary | 40 MSps | converted to two's complement (code − 8192) |
| NCO phase | 16 b | 40 MSps | f_out = FTW · 40 MHz / 2^16; FTW 0x4000 = 10 MHz, step 610 Hz |
| NCO cos/sin | 14 b signed, ±8191 | 40 MSps | table read with the phase truncated to 10 b |
| mixer product | 28 b signed | 40 MSps | I = x·cos, Q = −x·sin (mixing by e^{−jωt}) |
| CIC output | 16 b | 20 MSps | N = 8, R = 2, M = 1, internal 36 b |
| CFIR output | 16 b | 10 MSps | 21 taps, droop compensation, ↓2 |
| PFIR output | 16 b | 5 MSps | 41 taps equiripple, ↓2 |
| correlator re/im | 39 b | 5 MSps | exact, 64-sample reference |
| magnitude | 39 b | 5 MSps | CORDIC, gain removed |

Overall gain from ADC amplitude to baseband magnitude is 1 (within the ±4 % tolerance the
tests use, in band). The mixer halves the tone (cos·cos = ½ + …) and scales it by the NCO
amplitude 8191. The CIC output, the top 16 of its 36 bits, divides the product by
2^8 · 2^20 / 2^8 = 2^12 ≈ 8191/2, which brings the gain back to 1.

The split of the decimation into 2·2·2 is this design's own choice. So are the 16-bit path
after the CIC, the 1024-entry table, the 21-tap compensator and every coefficient value. The
source gives the 14-bit ADC word, the 16-bit phase, the 28-bit product, the eight-stage CIC,
the 41-tap post filter, the 10 MHz LO and the 40 → 5 MSps rate.

## NCO

`phase_accumulator` adds the tuning word into a 16-bit register on every enabled clock, and
the register wraps modulo 2^16. `phase_to_amplitude` keeps the top 10 bits of the phase and
uses them to address one period of a sine table:
`T[i] = round(8191 · sin(2πi/1024))`. The table is computed at elaboration by a constant
function, so no data file is involved. The cosine reads the same table at `i + 256`. Both
outputs are registered. `nco` joins the two blocks. The k-th enabled clock gives
cos/sin(2π·k·FTW/2^16), with the low 6 phase bits truncated away. Lint reports those 6 bits
as unused, and that is intended. At FTW = 0x4000 the outputs are exactly 8191, 0, −8191, 0.

Phase truncation causes spurs. With 10 address bits they sit at about −60 dBc (6 dB per
address bit). To push them lower, raise `LUT_AW` in `ddc_pkg`.

## CIC decimator

This is the usual Hogenauer structure. It has eight integrators at 40 MSps, a switch that
keeps every second sample, and eight combs (y = v − v⁻¹) at 20 MSps. It uses no multipliers.
Two details matter when changing it:

* **Modular arithmetic.** The integrators are 36 bits wide: 28 input bits plus
  N·log2(RM) = 8 bits of growth. They overflow freely. The combs subtract the wrapped values,
  and because the true output fits in 36 bits the result is exact. Do not add saturation to
  the integrators.
* **Alignment.** The integrators are pipelined: stage k adds the *previous* value of stage
  k−1. The combs run as one combinational chain on each decimated sample. Output e is
  therefore
  `y[e] = (Σ_j h[j] · x[2e + 1 − 8 − j]) >>> 20`, where h is the 9-tap binomial response
  (1+z⁻¹)^8. It is registered one clock after input 2e+1. `tb_cic_decimator` checks exactly
  this formula, and also a second shape (N = 3, R = 4, M = 2).

The DC gain (RM)^N = 256 is removed by keeping the top 16 of the 36 bits. For IN_W = 28
that is an arithmetic shift right by 20, with truncation.

## CFIR and PFIR

Both filters use one module, `fir_decimator`, a direct-form decimating FIR. On every
DECIM-th input it forms the whole dot product of that input and the TAPS−1 previous inputs
in parallel. It then rounds (adds 2^14 and shifts right by 15), saturates to 16 bits and
registers the result. Inputs may arrive on every clock.

The coefficients sit in registers, in Q1.15 (unity = 32768). At reset they load the default
sets from `ddc_pkg`:

* **CFIR**, 21 taps at 20 MSps. It is a least-squares fit to the inverse of the CIC response,
  `1/|sin(πRMf/fs)/(RM·sin(πf/fs))|^N`, over 0–1.5 MHz, with zero gain from 7.5 MHz up.
  The stop band keeps everything that would alias into the final 0–2.5 MHz band after ↓2.
  The taps sum to 32776.
* **PFIR**, 41 taps at 10 MSps. It is a Parks–McClellan equiripple low pass, passing
  0–1.5 MHz and stopping from 2.5 MHz, with about 69 dB attenuation before quantisation. The
  taps sum to 32759.

Both sets are symmetric (linear phase). Together the filters delay the signal by
4 + 20 + 80 = 104 input samples, which is 13 output samples.

**Changing the bandwidth at run time.** The top has a write port `bw_we`, `bw_sel`, `bw_addr`,
`bw_data`. One write sets tap `bw_addr` of the CFIR (`bw_sel` = 0) or the PFIR (`bw_sel` = 1)
in both the I and the Q filter. It takes effect from the next output. Writes to a tap index
beyond the filter's length are ignored. A reset restores the default sets. Keep new sets
symmetric to keep linear phase, and keep their sum near 32768 for unity gain. While a set is
being rewritten, the outputs mix old and new taps for a few samples.

## Pulse compression

The reference is the transmitted pulse r[0..63], complex and 16-bit. It is written into a
register store through `ref_we / ref_addr / ref_i / ref_q`. Four real FIRs (`pc_fir`) use
it time-reversed, so the output is the correlation with the conjugate reference:

```
R[n]  = Σ_m s[n−63+m] · conj(r[m])          s = I + jQ from the DDC
Re R  = FIR(I, r_I) + FIR(Q, r_Q)            filters 2 and 1
Im R  = FIR(Q, r_I) − FIR(I, r_Q)            filters 3 and 4
```

The four-filter arrangement and the pairing of inputs with references follow the original
design. The minus sign in the imaginary part is what conjugating the reference requires. The
original drawing shows two plain adders, so the sign here is a deliberate reading of it. A
pulse that matches the reference and starts at DDC sample n0 peaks at n0 + 63. All
arithmetic is exact: a 16×16 product with 64 terms needs 38 bits, and the sum of two needs
39.

`cordic_abs` takes the magnitude. A first stage folds the vector into the right half plane.
Sixteen vectoring iterations follow, then a multiply by round(2^16/1.64676) = 39797 removes
the CORDIC gain. The error is a few LSBs plus about 2^−14 of the value. The block is fully
pipelined, so it accepts one input per clock.

In the end-to-end test the echo is a 64-sample chirp sweeping −1.25 to +1.25 MHz, at
amplitude 7000, on a 10 MHz carrier. It compresses to a peak of 6.96·10^9; the ideal value
is 64·7000·16000 = 7.17·10^9. The largest sidelobe outside the main lobe is 5× lower,
about 14 dB. A down-chirp reference gives a peak 4× lower.

## Timing

| path | latency |
|---|---|
| `reset`/`!locked` → `glbl_reset_b` low | immediate (asynchronous) |
| release → `glbl_reset_b` high | 2nd clock edge |
| NCO `en` → cos/sin | 1 clock |
| mixer, CIC, each FIR stage | 1 clock each after its last input |
| ADC pin → DDC output | ≈ 6 clocks of registers, plus the 104-sample filter group delay |
| `ddc_valid` → `pc_ri_valid` (re/im) | 2 clocks |
| `ddc_valid` → `pc_valid` (magnitude) | 20 clocks (16 iterations + 4) |

Throughput is one ADC sample per clock and one DDC/correlator output every 8 clocks.

## Top-level interface (`ddc_pc_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk_40mhz` | in | 1 | ADC sample clock |
| `reset` | in | 1 | board reset, active high |
| `locked` | in | 1 | lock flag of the external clock manager |
| `adc_data_input` | in | 14 | ADC code, offset binary, one per clock |
| `ftw` | in | 16 | NCO tuning word (0x4000 = 10 MHz) |
| `ref_we`, `ref_addr`, `ref_i`, `ref_q` | in | 1, 6, 16, 16 | reference write port |
| `bw_we`, `bw_sel`, `bw_addr`, `bw_data` | in | 1, 1, 6, 16 | filter coefficient write port |
| `glbl_reset_b` | out | 1 | internal reset, active low |
| `ddc_i`, `ddc_q`, `ddc_valid` | out | 16, 16, 1 | baseband at 5 MSps |
| `pc_re`, `pc_im`, `pc_ri_valid` | out | 39, 39, 1 | complex correlation |
| `pc_mag`, `pc_valid` | out | 39, 1 | its magnitude |

Parameter `PC_REF_LEN` (default 64) sets the reference length. Every other size is in
`rtl/ddc_pkg.sv`.

## Files

`rtl/` contains one module or package per file. `ddc_pkg` holds the shared sizes and
coefficients. The top is `ddc_pc_top`, built from `reset_sync`, `adc_capture`, `ddc` and
`pulse_compression`. `ddc` contains `nco` (which holds `phase_accumulator` and
`phase_to_amplitude`), `mixer`, `cic_decimator` and `fir_decimator`. `pulse_compression`
contains `pc_fir` and `cordic_abs`.

`tb/` has one self-checking testbench per block. Each prints `TB_RESULT checks=N failures=M`.

* `tb_phase_accumulator`, `tb_phase_to_amplitude`, `tb_nco` and `tb_mixer` compare against
  sums, sines and products computed in the testbench.
* `tb_cic_decimator`, `tb_cfir`, `tb_pfir` and `tb_pc_fir` compare bit-exactly against
  convolutions. The FIR tests include saturation, a coefficient rewrite and the restore on
  reset, and `tb_cic_decimator` includes integrator
  wrap-around.
* `tb_cordic_abs` and `tb_pulse_compression` compare against `$sqrt` and the exact
  correlation. The pulse-compression test also checks the peak position of a compressed
  chirp.
* `tb_ddc` feeds tones. It checks pass-band gain, the rotation direction of the output, a
  retuned LO, stop-band rejection (< 1 %) and the 8:1 output rate. It then widens the PFIR
  to a single centre tap and checks that a tone it used to reject now passes.
* `tb_ddc_pc_top` runs the whole core at its default sizes. It covers the lock wait, a
  matched chirp echo on 10 MHz, the LO retuned to 12 MHz, a mismatched reference and a
  widened PFIR. It
  counts each of these events and fails if one never happens.
* `tb_pc_record` streams one receive window of 1024 range cells (8192 ADC samples) with
  four echoes: a strong and a weak isolated target and two targets 12 cells apart whose
  echoes overlap. It checks every correlator output exactly. Then it picks the local maxima
  above half the weakest expected peak, which must be exactly the four targets, at their
  cells and with their expected heights.

To simulate one test with Verilator:

```
verilator --binary --timing -Irtl -y rtl rtl/ddc_pkg.sv tb/tb_ddc_pc_top.sv \
          --top-module tb_ddc_pc_top -o sim && ./obj_dir/sim
```

Every test finishes in a few seconds.

## Departures and open points

* **Decimation split.** The original description asks for a total decimation of 8
  (40 → 5 MSps). Its per-stage figures, a factor of 2^4 for the compensator and 8 for the
  post filter, cannot both hold with that total. Here the total is kept and split 2·2·2.
  Change `CIC_R`, `CFIR_DECIM` and `PFIR_DECIM` in `ddc_pkg` to move it. If you do, redesign
  the coefficients for the new rates.
* **Bandwidth programming.** The original asks for programmable IF, LO and bandwidth but
  gives no interface. The coefficient write port described above is this design's choice.
  New sets must be designed off-line. The design does not compute them.
* **Reference length.** The length of the transmitted pulse was not specified. 64 samples at
  5 MSps (12.8 µs) is this design's choice. Longer pulses need a larger `PC_REF_LEN`, and the
  correlator costs 4·PC_REF_LEN multipliers.
* **Clock manager.** Not included. The original uses an FPGA MMCM for 20/40/160 MHz clocks;
  here one clock and strobes do the job.
* **FFT-based wideband detection.** The original names it, but not its size or method, and
  it is not included.
* **ADC format.** The ADC is assumed to deliver offset binary. For a two's-complement ADC,
  set `OFFSET_BINARY = 0` on `adc_capture`.
* **Pipelining.** The FIR dot products and the comb chain are single-cycle, fully parallel
  sums. They are simple to read and verify. For timing closure at 40 MHz or above on a real
  device, expect to pipeline the adder trees.
