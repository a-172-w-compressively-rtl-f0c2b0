# Compressively sampled PPG readout with on-chip heart-rate estimation

A photoplethysmography (PPG) sensor shines an LED through a finger and measures the light that
comes through. The LED is by far the most power-hungry part of such a sensor. Pulse it less often
and you save LED power in proportion. This design samples the PPG signal at a fixed pseudorandom
subset of the usual 128 Hz instants. It keeps 1 in 8, 1 in 10 or 1 in 30 of them, which cuts LED
duty cycle by that factor.

Such compressively sampled data normally needs an expensive reconstruction before it can be used.
Here the heart rate is instead estimated directly from the irregular samples. Every 4 s the
design computes a Lomb–Scargle periodogram: a least-squares spectrum that works on unevenly
spaced samples. It then reports the frequency of the spectral peak as an 8-bit heart rate in bpm.

This repository holds the digital part of such a readout ASIC, in synthesizable SystemVerilog. It
follows the architecture of the single-channel ASIC described in "A 172 μW Compressively Sampled
Photoplethysmographic (PPG) Readout ASIC With Heart Rate Estimation Directly From Compressively
Sampled Data". It contains:

- the timing control that decides when to sample and pulses the LED and front end;
- the SAR ADC's successive-approximation logic;
- the DMA and the ping-pong sample memories;
- the mean divider;
- the Lomb–Scargle accelerator;
- the peak search and control.

The analog parts stay outside the RTL and connect through the top-level ports: the
transimpedance amplifier, current DAC, switched integrator, the ADC's capacitor DAC and comparator,
and the bandgap.

Everything runs from one 32 kHz clock. Reset is active-low and asynchronous.

## 1. Time base: slots, windows and sampling instants

The 32 kHz clock is divided by 256 into a 128 Hz *slot* tick. A 9-bit counter numbers the slots,
and 512 slots (exactly 4 s) form a *window*. Heart rate is estimated once per window.

| ratio | select | slots sampled per window | average rate |
|-------|--------|--------------------------|--------------|
| 1x    | 0      | 512                      | 128 Hz       |
| 8x    | 1      | 64                       | 16 Hz        |
| 10x   | 2      | 51                       | 12.75 Hz     |
| 30x   | 3      | 17                       | 4.25 Hz      |

In uniform mode (1x) every slot is sampled. In a compressive mode the slot counter addresses a
512-bit table (`cs_lut`), and only slots marked 1 become sampling instants (`o_samp`). Each row of
the reduced identity measurement matrix is one sampling instant. The same pattern repeats every
window, so the sampling instants are known in advance. That fact is what makes the spectral
estimator cheap (section 3).

The table contents are this design's own. The window is split into M = 512/CR equal segments,
with segment i covering slots ⌊512·i/M⌋ … ⌊512·(i+1)/M⌋−1. One slot per segment is sampled, at
offset `s mod len`. Here `s` is the next state of the 16-bit Fibonacci LFSR x¹⁶+x¹⁴+x¹³+x¹¹+1,
seeded with 0xACE1. It advances as `b = s0^s2^s3^s5; s = (s>>1) | (b<<15)`, continuously through
the 8x, 10x and 30x tables in that order. `rtl/cs_lut.hex` has one line per table (8x, 10x, 30x).
Each line is a 512-bit hexadecimal number whose bit n is slot n.

The compression ratio in the configuration register may be changed at any time. The timing
control latches it at slot 0, so a window never mixes two tables. The power-down setting takes
effect immediately.

### LED and front-end pulses

Each sampling instant starts a five-clock pulse sequence. One clock is 30.5 µs, which is also the
integration time of the switched integrator.

| clock after `o_samp` | 1 | 2 | 3 | 4 | 5 |
|---|---|---|---|---|---|
| `led_pulse` (LED on)              | 1 | 1 | 1 | 0 | 0 |
| `pd_act` (front end active)       | 1 | 1 | 1 | 1 | 0 |
| `int_clk` (integrate)             | 0 | 0 | 1 | 0 | 0 |
| `ch_samp` (ADC samples, rising edge) | 0 | 0 | 0 | 1 | 0 |
| `int_rst` (reset integrator)      | 0 | 0 | 0 | 0 | 1 |
| `en` (OTA enable, power-down mode) | 1 | 1 | 1 | 1 | 1 |

The order is taken from the source ASIC: integrate while INT_clk is high, sample on CH_Samp,
then reset the integrator. With power-down enabled, `en` rises with `pd_act` and falls with the
falling edge of `int_rst`. Otherwise `en` stays high. The number of settling clocks before
integration is this design's choice.

`ch_samp` also starts the SAR logic (`sar_ctrl`). It runs an MSB-first binary search, one bit per
clock, against the external comparator input `comp_i` (1 when the held input ≥ DAC level
`dac_o`). The 12-bit result is ready 13 clocks later, long before the next slot (256 clocks).

## 2. Data path of one window

```
ADC ─► dma_ctrl ─► DMEM0 / DMEM1 (12 x 512, ping-pong) ─► feu ─► LSP memory (18 x 64) ─► peak_search ─► hr_o
          │ sum, count                                     ▲ mean
          └──────────────► nr_divider ───────────────────┘
```

- **DMA** (`dma_ctrl`). Each ADC result is written to the bank being filled, at the address of
  its slot, so the bank is the 512-entry time vector of the window. The DMA also adds the result
  to a running sum and counts it. At slot 0 of each window it hands the full bank over with its
  sum, count and ratio, and switches to the other bank. Slots that were not sampled keep stale
  data; they are masked later. The span before the first slot-0 tick after reset is not reported.
- **Mean** (`nr_divider`). A non-restoring divider, one quotient bit per clock, divides the sum
  by the sample count (512, 64, 51 or 17). That count equals 4 s × the average sampling rate.
- **Feature extraction** (`feu`, `mac8`, `coef_rom`). Computes 64 spectral values from the
  finished bank while the DMA fills the other one (section 3).
- **Peak search** (`peak_search`). Reads the 64 values in order and keeps the largest; on a tie
  the lower bin wins. It converts bin k to HR = 60·f_k = 30 + 180k/64 bpm, rounded (30 … 207).
- **Sequencer** (`cu_ctrl`). Starts these units in turn. It then holds `hr_o`/`hr_bin_o` and
  raises `hr_done_o`, which stays high until the next window's estimate starts.

The estimate for a window is ready about 8,300 clocks (≈ 0.25 s) after that window ends. Of these,
8,192 are multiply-accumulate clocks. A window is 131,072 clocks long, so the accelerator is idle
94 % of the time.

## 3. The Lomb–Scargle accelerator

### What is computed

For samples x(t_j) with mean μ, the Lomb–Scargle periodogram at angular frequency ω is

    P(ω) = [Σ (x_j−μ) cos ω(t_j−τ)]² / Σ cos² ω(t_j−τ) + [Σ (x_j−μ) sin ω(t_j−τ)]² / Σ sin² ω(t_j−τ),
    tan(2ωτ) = Σ sin 2ωt_j / Σ cos 2ωt_j .

The hardware uses the simplified form of the source ASIC. The squares become absolute values and
the denominators are dropped:

    P_k = | Σ_n C[n,k]·x_n | + | Σ_n S[n,k]·x_n |,   C[n,k] = cos ω_k(t_n−τ_k),  S[n,k] = sin ω_k(t_n−τ_k)

The sum runs over all 512 slots. x_n is the sample minus the mean where slot n was sampled, and 0
elsewhere (the FEU reads the same sampling table to decide). The spectrum has 64 bins from 0.5 Hz
in steps of 3/64 Hz (0.047 Hz, about 2.8 bpm). That spans 0.5–3.45 Hz, or 30–207 bpm.

### Why the coefficients are integers

With t_n = n/128 s and f_k = 0.5 + 3k/64 Hz, the phase ω_k·t_n is exactly n·(32+3k) in units of
2π/8192. So a 13-bit integer product gives the phase with no rounding. Since the sampling instants
are fixed per ratio, τ_k is a constant too. φ_k = ω_k τ_k = ½·atan2(Σ sin 2ω_k t_j, Σ cos 2ω_k t_j),
taken over the sampled slots, is stored in the same units. `rtl/tau_phase.hex` holds 64 words
for each ratio, in the order 1x, 8x, 10x, 30x. Where both sums vanish, τ is undefined and 0 is
stored; this happens in uniform mode at bins with a whole number of cycles per window.

`coef_rom` forms the phase `n·(32+3k) − φ_k (mod 8192)`. It takes the top 10 bits of that phase
and reads a quarter-wave sine table, `rtl/sine_q.hex`, whose entry i is
round(2047·sin((i+0.5)/256·π/2)) for i = 0…255. The cosine is the sine a quarter turn later.
The coefficients are 12-bit signed, ±2047.

**This is a departure from the source ASIC.** The source ASIC stores the complete 512×64 cosine
and sine matrices in ROM and indexes them by ratio. That is several megabits. The tables here are
about 2.3 kbit, and give the same matrix entries to within the 10-bit phase resolution: ≤ 12 LSB
of 2047, as checked by the coefficient testbench. Results therefore differ from a full ROM only by
that quantisation.

### Schedule

`mac8` has eight multiply-accumulators: four for cosine and four for sine. All eight take the
same sample each clock. The FEU makes 16 passes over the bank. In pass p it reads slots 0…511 in
order and accumulates bins 4p…4p+3, which gives 16 × 512 = 8,192 clocks.

When the next pass starts, the four finished sums are captured. Each value |C|+|S| (35 bits) is
shifted right by `PSD_SHIFT` (default 12), saturated to 18 bits, and written to the 18×64 LSP
memory one word per clock, while the next pass runs. The 18-bit width is from the source ASIC;
the shift is this design's choice. With a shift of 12, a full-scale sinusoid in uniform mode
saturates. A front end tuned for 1–4 % pulsatile signal, with a few hundred codes of AC swing,
stays well inside the range.

Data widths:

- mean-subtracted sample: 13 bits signed;
- product: 25 bits;
- accumulator: 34 bits, enough for 512 terms with no overflow.

## 4. Interface of the top (`ppg_cs_asic`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 32 kHz master clock, asynchronous active-low reset |
| `cfg_we_i`, `cfg_addr_i`, `cfg_wdata_i` | in | 1, 2, 8 | configuration write (takes effect at the clock edge) |
| `cfg_rdata_o` | out | 8 | read-back of register `cfg_addr_i` |
| `afe_o` | out | 6 | `led_pulse, pd_act, int_clk, ch_samp, int_rst, en` (struct `afe_timing_t`) |
| `afe_cfg_o` | out | 14 | `tia_gain[1:0], tia_cf[3:0], si_cint[2:0], idac[4:0]` (struct `afe_cfg_t`) |
| `o_samp` | out | 1 | one-clock pulse per sampling instant |
| `comp_i` | in | 1 | SAR comparator: held input ≥ level of `dac_o` |
| `dac_o` | out | 12 | code for the ADC's capacitive DAC |
| `hr_o`, `hr_bin_o` | out | 8, 6 | heart rate in bpm and its spectral bin |
| `hr_done_o` | out | 1 | result valid (held until the next estimate begins) |

Configuration registers (`cfg_regs`; the map is this design's):

| addr | bits | field |
|---|---|---|
| 0 | [1:0] | compression ratio select (0: 1x, 1: 8x, 2: 10x, 3: 30x) |
| 0 | [2] | OTA power-down mode |
| 1 | [1:0] | TIA gain: 10 / 50 / 100 / 250 kΩ |
| 1 | [5:2] | TIA feedback capacitor, 2 pF + 2 pF·code (2–22 pF) |
| 2 | [2:0] | integrator capacitor, 50–250 pF |
| 3 | [4:0] | IDAC code, 0–10 µA of static photocurrent cancellation |

Reset selects 1x, power-down off, all codes 0.

## 5. Files

| file | contents |
|---|---|
| `rtl/ppg_pkg.sv` | shared constants, ratio enum, AFE structs |
| `rtl/ppg_cs_asic.sv` | top: SAR logic + digital back end |
| `rtl/dbe.sv` | digital back end: wires all units below, with an assertion that the DMA never writes the bank being analysed |
| `rtl/timing_ctrl.sv` | clock divider, slot counter, sampling decision, pulse sequencer |
| `rtl/cs_lut.sv`, `rtl/cs_lut.hex` | sampling-instant tables |
| `rtl/cfg_regs.sv` | configuration registers |
| `rtl/cu_ctrl.sv` | estimation sequencer |
| `rtl/dma_ctrl.sv` | ADC-to-memory transfer, running sum |
| `rtl/dmem.sv` | memory bank (12×512 sample banks and 18×64 LSP memory) |
| `rtl/nr_divider.sv` | non-restoring divider |
| `rtl/coef_rom.sv`, `rtl/sine_q.hex`, `rtl/tau_phase.hex` | Lomb–Scargle coefficients |
| `rtl/mac8.sv` | eight-way MAC |
| `rtl/feu.sv` | feature extraction unit |
| `rtl/peak_search.sv` | peak search and HR conversion |
| `rtl/sar_ctrl.sv` | SAR ADC successive-approximation register |

The `.hex` files are read with `$readmemh` using paths relative to the repository root. Run tools
from there.

## 6. Where this RTL departs from, or adds to, the source ASIC

- **Coefficient storage:** a sine table plus τ-phase table replaces the full matrices (section 3).
- **Controller:** the source ASIC uses a small RISC controller programmed through instruction
  registers. Its instruction set is not published, so `cu_ctrl` is a fixed state machine that
  performs the same sequence: mean, FEU, peak search, HR_DONE. There are no instruction registers.
- **Clock gating:** the source ASIC gates the clocks of idle units. Here idle units simply hold
  their state; no gated clocks are generated.
- **Not modelled:** the table of published results also lists HRV (heart-rate variability).
  Nothing about how HRV is computed is described, so only the heart rate is produced.
- **This design's own choices:** everything marked as such above. That covers:
  - sampling-table contents;
  - pulse lengths;
  - register map and write port;
  - memory port arrangement, with one-clock read latency;
  - 18-bit scaling;
  - tie-break and rounding of the HR;
  - SAR conversion timing;
  - HR_DONE behaviour;
  - latching the ratio at slot 0.
- **Average rates:** 12.75 Hz at 10x and 4.25 Hz at 30x. These are integer sample counts per
  512-slot window. The source ASIC quotes rounded rates of 13 and 4 Hz.

## 7. Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. Reference values come from independent models in
`tb/tb_ref_pkg.sv`. That package rebuilds the sampling tables from the LFSR definition, computes
τ and the periodogram with real arithmetic, and maps bins to bpm.

| testbench | what it shows |
|---|---|
| `tb_ppg_cs_asic` | full design at default sizes. Five 4 s windows with a behavioural front end (sinusoid in ADC codes, sample-and-hold, ideal comparator): 1x/72 bpm, 8x/96, 10x/120, 30x/96 with power-down, 8x/54. Checks sample and LED pulse counts per window (512 pulses at 1x against 17 at 30x), deferred ratio switching, pulse order, `en` behaviour, settings read-back, and HR within 4 bpm (10 bpm at 30x). All results came out within 2 bpm. |
| `tb_hr_sweep` | tones from 0.5 to 3.4 Hz in 0.1 Hz steps at 8x, 10x, 30x; worst errors 6, 4, 4 bpm. The source ASIC reports a worst case of 10 bpm at 30x. |
| `tb_ppg_snr` | pulse-shaped signals (three harmonics) at AC swings of 12 to 48 codes with noise, 55 to 110 bpm; each case acquired at 1x and at 10x. The 10x estimate stays within 3 bpm of the 1x estimate. |
| `tb_dbe` | 12 windows of random tones across all ratios. |
| `tb_feu` | all 64 LSP words against the real-arithmetic reference, peak bin, 8,192-clock schedule. |
| `tb_coef_rom`, `tb_cs_lut`, `tb_timing_ctrl`, `tb_dma_ctrl`, `tb_cu_ctrl`, `tb_nr_divider`, `tb_mac8`, `tb_peak_search`, `tb_sar_ctrl`, `tb_dmem`, `tb_cfg_regs` | unit behaviour and latencies. |

`tb_dbe`, `tb_hr_sweep` and `tb_ppg_snr` shorten the slot clock (`CLK_DIV_P = 32`) to fit many windows. That
changes only the time scale, not the slots, tables or arithmetic. Real signals were not simulated,
only synthetic tones and pulse shapes with noise. Real PPG, with motion and low perfusion, is untested.

To run a testbench with Verilator (from the repository root):

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/ppg_pkg.sv tb/tb_ref_pkg.sv tb/tb_ppg_cs_asic.sv --top-module tb_ppg_cs_asic
./obj_dir/Vtb_ppg_cs_asic
```

The full-size end-to-end test simulates about 700k clocks in a few seconds.

## 8. Changing the design

- `CLK_DIV_P` (top, `dbe`, `timing_ctrl`) sets master clocks per slot. It must stay above about
  8,300/512 ≈ 17, so that an estimate finishes within one window.
- `PSD_SHIFT` (top, `dbe`, `feu`) trades range for resolution in the 18-bit LSP words.
- New sampling patterns need a new `cs_lut.hex` and a matching `tau_phase.hex`. Use the formulas
  in sections 1 and 3: τ depends on which slots are sampled, so the two must be regenerated
  together.
- The 64-bin grid and the 128 Hz slot rate are built into the integer phase n·(32+3k). Changing
  either means changing `coef_rom` and `peak_search`.
