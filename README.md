# Pulse-compression radar signal generator and processor

This RTL transmits a long binary phase-coded pulse and compresses the echo back into a short one. Small, slow targets such as drones have a small radar cross-section, and they must be found in clutter. The code is the 105-chip optimal-peak-sidelobe (OPSL) sequence `1C6387FF5DA4FA325C895958DC5`. Pulse compression alone would leave range sidelobes up to 5/105 of the peak (−26.4 dB). The matched filter here also inverts the code's spectrum, so a point target compresses into a single, sidelobe-free range cell.

The processing after pulse compression:

1. Echoes are collected over a coherent processing interval (CPI) of 256 pulses.
2. A moving-target indicator (MTI) removes stationary echoes.
3. An FFT across pulses resolves Doppler.
4. A cell-averaging CFAR detector produces one decision per clock.
5. Detections are queued in a FIFO for the data-processing side.

Everything after the acquisition front end computes in IEEE-754 single precision. Complex samples are a 64-bit `{re, im}` pair.

| Quantity | Value |
|---|---|
| System clock / sample rate | 15 MHz (one chip per sample, 66.67 ns, 10 m range cell) |
| Acquisition clock | 120 MHz (8 × system clock) |
| Code | 105 chips, ±1 |
| Samples per PRT (range cells) | 512 (34.13 µs, 5.12 km, duty cycle 0.205) |
| Pulses per CPI (Doppler bins) | 256 |
| CFAR | 12 + 12 reference cells, 1 + 1 guard cells, Pfa = 10⁻⁶ |

## Signal chain

```
 synchronizer --addr--> waveform_rom --dac_code--> (DAC)

 (ADC I/Q @120 MHz) -> ma_decimator x2 -> fixed_to_fp -> matched_filter -> doppler_processor -> ca_cfar -> target_fifo -> det_*
                        (8-tap mean, 8:1)                 FFT*H -> IFFT      corner_turn (RAM 1)
                                                                              mti
                                                                              fft (256)
                                                                              corner_turn (RAM 2)
                                                                              cplx_abs
```

The top level is `radar_top`. Everything runs on `clk_sys`, apart from the two moving-average decimators, which run on `clk_adc`. The stream never stalls: each stage accepts one complex sample per system clock and produces one per clock.

The top brings out these monitoring ports for the data-processing side:

- `mf_*`: compressed range profiles;
- `dop_*`: Doppler spectra;
- `cfar_*`: every CFAR decision with its threshold.

`det_*` is the valid/ready read port of the detection FIFO.

The clock generator, DAC, ADC and display are not part of the RTL; they connect through the top's ports.

| Module | Role |
|---|---|
| `radar_pkg` | Types (`fp32_t`, `cplx_t`, `detection_t`), the code constant, and the FP and complex arithmetic functions |
| `synchronizer` | 9-bit sample counter (ROM address, range), 8-bit pulse counter, PRT/CPI markers, transmit gate |
| `waveform_rom` | 512-word transmit ROM: chip '1' → +AMP, '0' → −AMP, then zeros |
| `ma_decimator` | 8-sample moving average at 120 MHz, one output per 8 clocks |
| `fixed_to_fp` | Exact 16-bit integer → single-precision conversion of I and Q |
| `fft`, `fft_stage` | Streaming radix-2 FFT/IFFT, natural order in and out |
| `mf_coef_rom` | 512 complex coefficients `H[k]`, read by a 9-bit counter that follows the FFT output |
| `matched_filter` | FFT → complex multiply by `H[k]` → IFFT |
| `corner_turn`, `dp_ram` | Ping-pong dual-port RAM that transposes a CPI (fast time ↔ slow time) |
| `mti` | Two-pulse canceller `1 − z⁻¹` on each range cell's slow-time sequence |
| `cplx_abs` | `sqrt(re² + im²)` |
| `doppler_processor` | `corner_turn` → `mti` → 256-point `fft` → `corner_turn` → `cplx_abs` |
| `ca_cfar` | 27-register window, two adder trees, multiply by k/N, compare |
| `target_fifo` | 64-entry FIFO of `{range, Doppler, amplitude}` with a sticky overflow flag |

## Timing of a PRT and range alignment

`synchronizer` counts samples 0…511 within a PRT and pulses 0…255 within a CPI.

- `tx_gate` is high for samples 0…104.
- `waveform_rom` registers its output, so the DAC sees chip *n* one clock after address *n*. The output is held at 0 during reset, so nothing is transmitted.

On the receive side, each ADC channel runs an 8-deep tap line and a running sum at 120 MHz. The decimator latches `sum/8` (arithmetic shift) once every 8 fast clocks. The phase is chosen so the value is stable at the next rising edge of `clk_sys`. The two clocks must come from the same generator, with coincident rising edges.

The receive stream enters the matched filter `FE_LAT = 2` system clocks into the first PRT after reset. Every later sample follows without gaps. With this offset, an echo that reaches the ADC *r* samples after the DAC sample of ROM address 0 lands in range cell *r*. If the converters add latency, change `FE_LAT`; the end-to-end testbench models zero-latency converters.

## Floating-point arithmetic

The arithmetic functions in `radar_pkg` are plain combinational SystemVerilog, so every tool sees the same arithmetic and nothing depends on a vendor core. The supported operations are:

- `fp_add`, `fp_sub`, `fp_mul`;
- `fp_scale2`, which multiplies by 2^k with an exponent adjust only;
- `fp_sqrt`, a restoring integer square root, rounded;
- `fp_from_int24`;
- `c_add`, `c_sub`, `c_mul`.

They follow binary32 with round-to-nearest-even, except:

- Subnormal inputs and results are flushed to (signed) zero.
- Overflow goes to infinity.
- NaN and infinity inputs get no special handling. Finite ADC data never produces them.

A complex multiply is four multipliers and two adders in one clock. Each pipeline stage registers its result, but an `fp_mul` followed by an `fp_add` sits in one clock period. Meeting 15 MHz on an FPGA will need retiming, or extra registers in `fft_stage`, `matched_filter`, `cplx_abs` and `ca_cfar`.

## Streaming FFT

`fft` has `log2(N)` radix-2 single-path delay-feedback stages, each in decimation-in-frequency form. The stages use delay lines of N/2, N/4, …, 1.

A stage (`fft_stage`) works in two halves of each block of 2L samples:

1. In the first half, it stores the incoming sample in its delay line and passes the delay line's previous contents on.
2. In the second half, it outputs `head + x`. It writes `(head − x)·W^n` back into the delay line, to be sent out during the next first half.

Twiddles are computed once during elaboration from `$cos`/`$sin` and rounded to binary32 (`fp_from_real`). For the inverse transform they are conjugated.

The stages leave the spectrum in bit-reversed order. A 2N-word ping-pong buffer writes each frame at bit-reversed addresses and reads the previous frame in natural order. `out_idx` is the bin index. The inverse transform applies the 1/N scale on the way out by subtracting log2(N) from the exponent.

The pipeline advances only on `in_valid`. A frame is therefore pushed out by the samples of the next frame, which a continuous radar stream always supplies. Bin *k* of a frame appears 2N − 1 valid samples after input sample *k*, plus log2(N) + 1 clocks. Measured from a frame's first input sample, the first output comes 2N + log2(N) + 1 clocks later.

## Matched filter with sidelobe cancellation

Let S[k] be the 512-point DFT of the transmitted frame: 105 chips of ±1 followed by 407 zeros. The ROM holds

```
H[k] = conj(S[k]) · OPF[k],   OPF[k] = 1 / |S[k]|²    →   H[k] = 1 / S[k]
```

This is the conjugate replica spectrum multiplied by a sidelobe-cancellation filter that flattens its magnitude. For an echo `a · code` delayed by *d* samples, FFT → ×H → IFFT gives a single value *a* at range cell *d*, and zero elsewhere up to rounding.

|S[k]| never drops below about 3.8 for this code, so the inverse is well conditioned. Noise is amplified by the mean of 1/|S|², which is the cost of removing the sidelobes. A plain correlator would be H = conj(S).

The coefficient file `rtl/mf_coef.hex` has 512 lines, one per bin *k*. Each line is 16 hex digits: the real part's binary32 bits, then the imaginary part's. The file is read with `$readmemh` by a path relative to the directory the simulator runs in. For synthesis, the flow must honour `$readmemh` in an `initial` block for the ROM contents; a flow that ignores it leaves the ROM at zero and the matched filter silent. To use another code or filter, recompute H[k] the same way for the new code and write the file in that format.

`mf_coef_rom` is a 9-bit counter that advances with each valid FFT output, so its address always equals the FFT's `out_idx`; an assertion in `matched_filter` checks this. The multiply is registered. The matched-filter latency is 4N + 2·log2(N) + 1 = 2067 clocks from the first input sample of a frame to range cell 0 of that frame.

## Doppler processing

**Corner turn.** A radar stream arrives one pulse at a time, in range order. Doppler needs each range cell's 256 samples across pulses. `corner_turn` holds two halves of ROWS × COLS words in one dual-port RAM (`dp_ram`), with a single counter:

- the counter's top bit selects the half being written;
- its 17 lower bits form the write address, so words are written in arrival order.

At the same time, the other half is read transposed: the read address hops by COLS. The first instance, RAM 1 (ROWS = 256 pulses, COLS = 512 cells), therefore outputs cell 0 pulses 0…255, then cell 1, and so on.

The second instance, RAM 2 (ROWS = 512, COLS = 256), turns the Doppler spectra back. It outputs Doppler bin 0 for range cells 0…511, then bin 1, and so on, so the CFAR slides along range. Reads are paced by writes, so each corner turn delays the data by exactly one CPI. Outputs start after the first full CPI.

**MTI.** `mti` computes `y[n] = x[n] − x[n−1]` for each range cell, on the slow-time sequence. The sequence is taken circularly: the first pulse is differenced with the last (`y[0] = x[0] − x[255]`).

The 256 outputs of a cell leave as y[1] … y[255], y[0]. Each range cell is thus an exact circular difference. The Doppler FFT sees the spectrum X[k] · (1 − e^(−j2πk/256)) times a linear phase, with no step at the boundary between range cells. A stationary echo gives exactly zero in every bin, and a moving one is weighted by the MTI response. The extra cost is one 64-bit register holding a cell's first sample.

**Doppler FFT and magnitude.** A 256-point `fft` transforms each range cell. `cplx_abs` returns `sqrt(re² + im²)` and carries the 17-bit `{Doppler, range}` tag.

## CA-CFAR

`ca_cfar` shifts magnitudes through 27 registers: 12 reference cells, one guard cell, the cell under test (CUT), one guard cell, and 12 more reference cells. Every clock it computes:

1. each window's sum, through a pairwise adder tree;
2. the sum of both windows, multiplied by the constant KN = k/N;
3. the decision `CUT > threshold`.

The decision appears together with the CUT, the threshold and the CUT's tag.

The threshold multiplier comes from `k = N (Pfa^(−1/N) − 1)`, taking N as all 24 reference cells, the number that averages the interference estimate. With Pfa = 10⁻⁶, k = 18.679 and KN = k/N = 0.778279 (`32'h3F473D52`). Applying k/N to the sum of both windows is the usual CA-CFAR threshold k × mean. If N is instead taken per window (12), k/N becomes 2.16 and the threshold about 2.8 times higher. Set `KN` to change Pfa.

The window runs straight through the map, with no reset between Doppler rows. Near the first and last 13 range cells of a row, the reference windows therefore include cells from the neighbouring Doppler row.

**Zero-Doppler blanking.** After the MTI, Doppler bin 0 of every range cell holds only rounding residue. A purely relative threshold can flag residue that is large compared with its neighbours' residue. With `BLANK_DC = 1` (the default), decisions in bin 0 are still shown on `cfar_*` but not queued in the FIFO.

## Detection FIFO

Each queued detection is a `detection_t` of 49 bits:

- a 9-bit range cell;
- an 8-bit Doppler bin (0…255, where bins above 127 are negative Doppler);
- the binary32 CUT magnitude.

The FIFO is 64 deep, with a valid/ready read port. A push into a full FIFO is dropped, even if a word is read in the same clock, and sets the sticky `det_overflow`. Range in metres is cell × 10 m. Doppler frequency is bin × PRF/256 with PRF = 29.3 kHz.

## Latency and throughput

| Path | Latency |
|---|---|
| FFT (N points), first input → first output | 2N + log2(N) + 1 clocks |
| Matched filter, frame start → range cell 0 | 4N + 2·log2(N) + 1 = 2067 clocks |
| Doppler processor | two CPIs (one per corner turn) plus the 256-point FFT (about 520 clocks) and a few registers |
| CPI in → detections out | detections for CPI *c* come out while CPI *c + 2* is being received |

Throughput is one complex sample per system clock throughout, i.e. a full 512 × 256 CPI every 131072 clocks (8.74 ms at 15 MHz).

## Memory

At the default sizes, each corner turn is 2 × 131072 × 64 bits = 16.8 Mbit, and the two together take 33.6 Mbit. The FFT reorder buffers and the coefficient ROM add about 0.2 Mbit. This is more than the 13 Mbit of block RAM on an XC7A200T.

To fit such a device, the data must be stored more compactly. Options:

- store the corner-turn data in fewer bits;
- store only range cells of interest;
- use one half per corner turn with read-before-write addressing.

None of these is implemented here.

## Choices beyond the reference design

The overall structure follows the reference design; so do the sizes, the code, the 9-bit and 17/18-bit counters, the 64-bit complex buses, the CFAR geometry and Pfa. The following are this design's own:

- **Optimum filter.** The sidelobe-cancellation filter is realised as exact spectral inversion, 1/|S|². Its design is not specified beyond "optimum filter".
- **FFT.** The architecture is SDF radix-2 with a reorder buffer, and the inverse transform is scaled by 1/N.
- **Circular MTI.** Differences wrap within each range cell; a plain delay line would difference the first pulse of a cell with the last pulse of the previous cell.
- **Zero-Doppler blanking** before the FIFO (`BLANK_DC`).
- **Front end.**
  - There are two receive channels (I and Q), each with its own 8-tap moving average.
  - The decimation phase (`LATCH`) and the range alignment (`FE_LAT`) are set for converters with zero latency.
  - The DAC is 16 bits wide with amplitude ±8192; the ADC is 16 bits wide.
- **CFAR N.** N is taken as 24 (both windows) in the threshold formula.
- **Interfaces.** The FIFO is 64 deep, with a valid/ready read port and an overflow flag. Reset is synchronous and active high. The extra monitoring outputs (`mf_*`, `dop_*`, `cfar_*`) are also this design's.

The clock generator, DAC, ADC and the display/data-processing side are outside the RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing `TB_RESULT checks=<n> failures=<m>`, and each has a watchdog. Expected values are computed independently in the testbench, with `real` arithmetic, DFTs and reference models.

| Testbench | What it checks |
|---|---|
| `tb_synchronizer` | counter wrap, PRT/CPI markers, transmit gate length |
| `tb_waveform_rom` | all 512 ROM words against the code; autocorrelation peak 105, peak sidelobe 5; zero output in reset |
| `tb_ma_decimator` | moving average against a model; one output per 8 clocks |
| `tb_fixed_to_fp` | conversion of random and edge values |
| `tb_fft` | 64- and 512-point forward and inverse transforms against a DFT; latency |
| `tb_mf_coef_rom` | every word satisfies H[k]·S[k] = 1 against a DFT of the code; counter hold and wrap |
| `tb_matched_filter` | a 512-sample echo compresses to one spike of the right height and cell with no sidelobes; latency 2067 |
| `tb_corner_turn` | transposed order and the one-CPI delay |
| `tb_mti` | circular differences against a model |
| `tb_cplx_abs` | magnitude against `real` arithmetic |
| `tb_doppler_processor` | Doppler spectra and magnitude map against a DFT of the circular difference, at 16 × 8 |
| `tb_ca_cfar` | every threshold and decision against a reference; decision timing |
| `tb_target_fifo` | order, backpressure, full and overflow |
| `tb_radar_top` | end to end at NSLOW = 16 with a 2-entry FIFO held full (see below) |
| `tb_radar_full` | end to end, all parameters at their defaults, four 256-pulse CPIs |

The end-to-end testbenches share `radar_env`, a scene model. It feeds back the DAC output as echoes with the following properties:

| Echo | Range cell | Doppler bin | Amplitude |
|---|---|---|---|
| Moving target 1 | 120 | NSLOW/4 | 1500 |
| Moving target 2 | 260 | 3·NSLOW/4 | 1000 |
| Moving target 3 | 400 | NSLOW/2 | 700 |
| Stationary clutter | 330 | 0 | 3000 |

Small uniform noise (±4 LSB) is added. `radar_env` checks:

- every compressed profile (a spike per target, no sidelobes);
- the cancellation of the clutter echo;
- the Doppler peaks;
- the CFAR detections;
- the FIFO contents.

It counts how often each mechanism happened. The reduced run also holds the FIFO reader so the FIFO fills and overflows. The full-size run completes in a few seconds with verilator.

## Simulating

The coefficient file is opened as `rtl/mf_coef.hex`, so run simulations from the directory that contains `rtl/` and `tb/`. Compile the package files first:

```sh
verilator --binary --timing --assert -j 8 \
  rtl/radar_pkg.sv tb/tb_util_pkg.sv \
  $(ls rtl/*.sv | grep -v radar_pkg) tb/radar_env.sv tb/tb_radar_full.sv \
  --top tb_radar_full -o sim
./obj_dir/sim
```

Replace `tb_radar_full` with any other testbench name. The unit testbenches do not need `tb/radar_env.sv`, though including it does no harm. Registers are reset explicitly, and testbenches ignore outputs while `rst` is high. Simulations therefore give the same results under random initialisation (`+verilator+rand+reset+2`).

## Changing the design

- **Sizes.** `NFAST` and `NSLOW` must be powers of two.
  - `NFAST` sets the PRT, the matched-filter FFT and RAM 1's column count.
  - `NSLOW` sets the CPI and the Doppler FFT.
  - Changing `NFAST` or the code needs a new coefficient file: `COEF_FILE`, with `NFAST` lines.
- **Code.** Set `CODE` and `CODE_LEN`, and regenerate `H[k] = 1/S[k]`. This only works if S[k] has no near-zero bins.
- **CFAR.** `NREF`, `NGUARD` and `KN` (k/N as a binary32 bit pattern).
- **FIFO.** `FIFO_DEPTH` must be a power of two.
- **Alignment.** `FE_LAT` sets where range cell 0 is. `DEC` and `LATCH` set the acquisition decimation.
