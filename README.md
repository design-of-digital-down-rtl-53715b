# Wideband signal detector for a software-defined receiver

This RTL takes real IF samples from a fast ADC and works out which parts of a
wide band are occupied. It down-converts the IF to complex baseband and
decimates it. It then takes averaged FFT power spectra, converts them to a dBm
scale, and estimates the noise floor under every bin with a sliding median.
Any bin whose level is above *floor + SNR margin* counts as occupied, and each
group of adjacent occupied bins is reported as one signal. The threshold is
called the noise-riding threshold (NRT) because it follows the noise floor
across the band.

The architecture follows the receiver described in *Design of Digital Down
Converter and Signal Detection Techniques for Software Defined Radio*
(IJEAST, 2019). That description gives these numbers:

- a 75 MHz second IF;
- ADC sampling rate fs = 100 MHz;
- 40 MHz instantaneous bandwidth;
- decimation by 2 or 4, giving 50 or 25 MSPS;
- a 4096-point FFT (12.207 kHz bins at 50 MSPS);
- a Blackman-Harris window;
- a 10 to 15 dB detection margin.

It says much less about the inside of most blocks. Word widths, filter
orders, the FFT architecture, the median window and all interfaces are
choices made here. Every RTL file's header says what it takes from the
description and what it decides itself. The section
[Where this departs from, or adds to, the reference](#where-this-departs-from-or-adds-to-the-reference)
lists those choices.

```
ADC (14 b, 100 MSPS)
  └─ ddc ── nco ─ ddc_mixer ─┬─ cic_decimator ─ cfir_filter ─ I ┐
                             └─ cic_decimator ─ cfir_filter ─ Q ┘  50/25 MSPS
  └─ window_mult ─ fft_engine ─ spectrum_averager ─ log_dbm
       ─ noise_floor_median ─ nrt_detector ─► per-bin spectrum + signal reports
```

`sdr_spectrum_top` wires the chain together. Everything runs in one clock
domain at the ADC rate: one ADC sample per clock.

## Frequency plan and the DDC

At fs = 100 MHz a 75 MHz IF is under-sampled: it shows up at ±25 MHz. The
NCO is set to 75 MHz (`cfg_ftw_i = 32'hC000_0000`, i.e. 0.75·2³²). The mixer
multiplies by exp(−jωn), so I = x·cos and Q = −x·sin. This moves the IF image
to 0 Hz without inverting the spectrum. A tone at 75 MHz + Δ comes out at +Δ.

**NCO** (`nco`): a 32-bit phase accumulator. Its top 10 bits address full-cycle
cosine and sine ROMs with 16-bit amplitudes. The ROM contents are computed at
elaboration. The output frequency is `ftw·fs/2³²`, and the output lags the
ADC sample it belongs to by 2 clocks. `ddc` delays the ADC sample by the same
2 clocks.

**Mixer** (`ddc_mixer`): takes a 14-bit sample and a 16-bit LO and produces a
16-bit product, rounded. Full scale in gives full scale out, so a real tone
of amplitude A (in ADC LSBs) becomes a complex baseband tone of amplitude 2A
(in 16-bit LSBs).

**CIC** (`cic_decimator`, one per branch):

- 4 integrators, then decimation by R = 2^`rlog2`, then 4 combs with
  differential delay 1.
- Registers are 16 + 4·2 = 24 bits. Two's-complement wrap-around in the
  integrators is therefore harmless.
- The gain R⁴ is removed by a rounding shift of 4·rlog2 bits. DC gain is
  exactly 1 for every R.
- The output is saturated to 16 bits.
- Change `rlog2` only while in reset.

**Compensating FIR** (`cfir_filter`, one per branch, shared coefficients):

- 21 taps in transposed form. It does not decimate.
- Coefficients are 18-bit signed numbers with 1.0 = 2¹⁵.
- The default set is a least-squares inverse of the R = 2 CIC response up to
  0.4 of the output rate. CIC and CFIR together are flat within 0.05 dB to
  ±17.5 MHz, −0.25 dB at ±20 MHz (the 40 MHz bandwidth edge) and −26 dB at
  ±25 MHz.
- With R = 4 the same set droops to −2 dB at 0.4·fs_out. A set designed for
  R = 4 can be written through `coef_we/coef_addr/coef_data`.
- Reset restores the defaults.

Overall latency: 5 clocks from the ADC sample that completes a decimation group
to the I/Q sample on `ddc_i_o/ddc_q_o/ddc_valid_o`.

## Spectrum processing

### Framing: how samples reach the FFT

The FFT engine works on one frame at a time, and it does not accept samples
while it computes. Framing is a simple request handshake:

1. `fft_engine` pulses `frame_req_o` when it is ready for a new frame. At that
   moment it latches the frame length K = 2^`cfg_log2k_i` and exports it as
   `log2k_o`.
2. `window_mult` arms on the pulse. It takes the next K valid DDC samples,
   numbers them n = 0..K−1, multiplies each by w[n] from its coefficient RAM,
   and passes on (sample, n). Samples outside an armed frame are dropped.
3. The engine writes each sample at address n and starts the transform after
   n = K−1.

So spectra are computed on gapped blocks of the stream, not on every sample.
For K = 4096 at 50 MSPS one frame takes:

| phase | clocks |
|---|---|
| load (4096 samples at one per 2 clocks) | 8192 |
| transform, log2K·(K/2 + 3) | 24 612 |
| unload, K + 1 | 4097 |

That is about one block in 4.5. For occupancy detection, which averages
several spectra anyway, this only lowers the update rate. It is not
real-time, gap-free analysis.

The window RAM holds 4096 unsigned Q0.16 words and is loaded by the host
(`win_we/win_addr/win_data`). Load the K coefficients for the K in use before
the frames start. For the 4-term Blackman-Harris window, write
`round(65535·(0.35875 − 0.48829·cos(2πn/K) + 0.14128·cos(4πn/K) − 0.01168·cos(6πn/K)))`.
The end-to-end testbench does exactly this.

### The FFT engine

`fft_engine` is an in-place radix-2 decimation-in-frequency FFT over a complex
RAM of 2^LOG2_KMAX words of 24 + 24 bits. The input is written in natural
order. The engine runs log2K stages of K/2 butterflies, one butterfly per
clock. In stage s the butterfly pairs are (a, a + h) with h = K >> (s+1), and
p = a mod h:

```
x[a] <= (x[a] + x[b]) / 2
x[b] <= (x[a] − x[b]) · W / 2,     W = exp(−j·2π·p·2^s / K)
```

Each clock reads two words and writes two. The RAM model has two read ports
and two write ports. In a two-port block RAM this corresponds to ping-ponging
between two banks.

The butterfly is pipelined: addresses, then a registered read, then the
arithmetic, then write-back. Between stages the engine waits 3 clocks so that
the next stage never reads a word that is still being written.

The result is in bit-reversed order. The unload phase reads address
bitrev(k) for k = 0..K−1, so bins leave in natural order: bin 0 is DC, bins
1..K/2−1 are positive frequencies and K/2..K−1 are negative ones. The
frequency of bin k is k·fs_out/K (k < K/2) or (k − K)·fs_out/K.

Twiddles come from a ROM of K_MAX/2 entries of `round(2¹⁶·exp(−j2πm/K_MAX))`
(18-bit, 1.0 = 2¹⁶). For a shorter K the ROM is read with stride K_MAX/K.

**Scaling.** The 16-bit input is placed in the 24-bit word shifted left by 7,
and every stage halves with rounding. The output is therefore
X[k]/K · 2⁷, where X is the plain DFT. Because each stage halves, a complex
magnitude below 2²³ in gives a complex magnitude below 2²³ out, so nothing can
overflow for any input. Rounding error measured against a double-precision DFT
stays below 4 LSB for random 4096-point frames.

A full-scale tone of amplitude A_bb at baseband gives a bin amplitude of
A_bb · (window coherent gain) · 2⁷. The coherent gain is 0.35875 for
Blackman-Harris.

### Averaging, dB scale, noise floor, detection

**`spectrum_averager`**:

- Forms P = re² + im² (48 bits) for every bin.
- Keeps a per-bin accumulator in a 4096-word RAM. The first frame of a group
  overwrites it and later frames add to it, one read-modify-write per clock.
- On the last of 2^`cfg_navg_log2_i` frames (up to 16) it outputs the sum
  shifted right, i.e. the mean power.

**`log_dbm`**:

- 10·log10 P is computed as 3.0103·log2 P. log2 P is built from the position
  of the leading one and a 256-entry table of log2(1 + m/256).
- The result is in 1/16 dB. Measured error is under 1 LSB over the whole
  48-bit range.
- The signed offset `cfg_offset_i` is added to calibrate the scale to dBm.
- P = 0 reads as offset − 1 dB.

**`noise_floor_median`** (the noise floor):

- A 15-bin window slides along the spectrum. The floor of a bin is the median
  of the levels around it.
- A narrow signal covers only a few bins of the window, so it does not lift
  the floor. The floor still follows slow changes of the noise across the band.
- The median is found by ranking rather than sorting: each tap counts how many
  valid taps are smaller (ties broken by position), and the tap whose count is
  (valid − 1)/2 is the median. This costs W·(W−1) comparators and no state.
- At the band edges only the bins that exist are used, and the lower median of
  those is taken.
- After the last bin the block clocks itself H = 7 more times to flush the
  window. No new frame may start in those 7 clocks; an assertion checks this.
  In this chain the averager's output never comes that close.

**`nrt_detector`**:

- NRT = floor + `cfg_snr_margin_i` (1/16 dB, saturated).
- A bin is detected when level > NRT. Every bin leaves on `spec_o` as a
  `spec_bin_t`: bin number, level, floor, threshold and flag.
- A run of adjacent detected bins produces one `sig_report_t`: first bin, last
  bin, peak bin and peak level. The report is issued when the run ends or at
  the last bin.

The margin trades false alarms against missed signals. The reference quotes
10 to 15 dB as typical.

## Number formats and configuration

| signal | format |
|---|---|
| `adc_i` | 14-bit two's complement |
| `ddc_i_o`, `ddc_q_o` | 16-bit two's complement |
| `cfg_ftw_i` | 32-bit; f_LO = ftw·fs/2³² |
| `cfg_rlog2_i` | 1 → R = 2, 2 → R = 4 (0 → R = 1); apply through reset |
| `cfg_log2k_i` | 1..12; latched at each frame request |
| `cfg_navg_log2_i` | 0..4 → 1..16 averaged frames; latched at each group |
| `cfg_offset_i`, `cfg_snr_margin_i`, levels | signed 16-bit, 1/16 dB |
| CFIR coefficients | signed 18-bit, 1.0 = 2¹⁵ |
| window coefficients | unsigned Q0.16 |

The shared widths live in `rtl/sdr_pkg.sv`. The main size parameter is
`LOG2_KMAX` (12), which sets the FFT, window and averaging memories.

## Verification

Each module has a self-checking testbench in `tb/` that compares it with an
independent model in the testbench:

| testbench | reference |
|---|---|
| `tb_nco` | ROM formula, phase sequence, latency |
| `tb_ddc_mixer` | exact products |
| `tb_cic_decimator` | CIC as an FIR of four convolved boxcars; output rate; DC gain |
| `tb_cfir_filter` | convolution with default and random coefficients; saturation |
| `tb_ddc` | tone phase step and amplitude against the analytic CIC·CFIR response, for R = 2 and 4; rejection on a CIC null |
| `tb_window_mult` | windowed products, framing, dropping |
| `tb_fft_engine` | double-precision DFT for K = 8, 64, 1024 and 4096; transform latency log2K·(K/2+3)+4 |
| `tb_spectrum_averager` | exact sums over 1, 4 and 16 frames; overflow |
| `tb_log_dbm` | floating-point 10·log10 |
| `tb_noise_floor_median` | sorted windows, including frames shorter than the window |
| `tb_nrt_detector` | per-bin thresholds and flags; run reports; edge cases |

`tb_sdr_spectrum_top` runs the whole design at its default size. A 75 MHz IF
with two tones and noise is processed in two configurations:

- R = 2, K = 4096, 4 averages, 12 dB margin;
- R = 4, K = 1024, 2 averages, 10 dB margin.

In each it checks:

- both tones, and only they, are reported, each at its exact bin;
- their levels are within 1 dB of the level predicted from amplitude, DDC
  gain, window gain and FFT scaling (they agree to about 0.1 dB);
- the floor is well below the tones;
- every threshold equals floor + margin.

It also counts that every mechanism occurred: both decimation factors, both
FFT lengths, averaging, samples dropped while the FFT is busy, coefficient
writes, threshold crossings and reports. It runs in about a second.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/sdr_pkg.sv tb/tb_sdr_spectrum_top.sv \
          --top-module tb_sdr_spectrum_top -o sim && ./obj_dir/sim
```

Every testbench ends with `TB_RESULT checks=N failures=M`.

## Where this departs from, or adds to, the reference

- **Block internals of our own.** The reference says what these blocks do, but
  not how they are built:
  - the FFT architecture and its scaling;
  - power averaging over a power-of-two number of frames;
  - the log converter;
  - the 15-bin median window and its edge rule;
  - the report format;
  - the framing handshake.
- **Sizes of our own.** The reference gives none of these:
  - CIC order (4) and differential delay (1);
  - CFIR length (21) and coefficients;
  - the NCO's 32-bit accumulator, 1024-entry ROM and 16-bit amplitude;
  - all word widths.
- **Decimation is done entirely in the CIC.** The reference says CIC and FIR
  normally share the decimation, with the larger factor in the CIC. It also
  quotes 50 and 25 MSPS for decimation factors 2 and 4. Here the CFIR runs at
  the output rate and only compensates.
- **Not real-time.** The FFT analyses gapped blocks (see Framing). The
  reference does not state an update rate.
- **Natural bin order.** Bins leave in natural FFT order, DC first. A display
  usually wants them reordered to −fs/2..+fs/2.
- **Reset needed to change R.** `cfg_rlog2_i` is applied through a reset.
  Changing it on the fly gives a short transient.
- **Not included:** the analog front end (RF to the 75 MHz IF), the ADC, and
  the host that loads the window and reads the reports. They sit outside this
  RTL; their signals are ports of the top.

The NCO ROMs, the twiddle ROM and the log table are `localparam` arrays filled
by constant functions that use real math (`$sin`, `$cos`, `$ln`). The
compiler evaluates them at elaboration, so synthesis sees plain constant ROMs.
