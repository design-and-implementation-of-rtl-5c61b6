# Two-channel closed-loop epileptic seizure detector

This is the digital core of an implantable seizure detector for absence
epilepsy. It takes EEG from two electrodes and decides, every 0.16 s per
channel, whether a spike-and-wave seizure is under way. When one is, it raises
a stimulation flag that drives an external current stimulator. The target is
very low power, so everything runs at a 3.2 kHz detector rate. There is no
processor: each channel has a fixed pipeline built around three features.

- **CM**, an entropy-like regularity measure. A seizure is more regular than
  waking EEG.
- **Band1 and Band2**, FFT magnitudes at the seizure's first and second
  harmonic.
- **Band0**, the lowest FFT bin. It picks out sleep, whose slow waves also
  look regular in the time domain.

A linear classifier whose weights were trained off-line combines the features.
Its threshold goes up while Band0 says the subject is asleep. A seizure is
declared only after several windows in a row.

## Signal flow of one channel

```
ADC byte ─► read_mem (128x8 two-port RAM, ring buffer)
              │ port A: sample pairs of the current 16-point part
              │         ─► entropy_extractor ─► CM (4.12)
              │ port B: each 64-sample window, fed as its samples arrive
              │         ─► fft64 ─► fft_process ─► Band0, Band1, Band2 (9.7)
              ▼
        lls_classifier: LLS = CM*bCM + Band1*bB1 + Band2*bB2 + bconst
                        threshold switched by Band0 (sleep)
                        DET_WINDOW consecutive windows ─► STIM for DET_STIM windows
```

Each channel gets 200 samples/s. A window is 64 samples (0.32 s) and a new one
starts every 32 samples, so windows overlap by 50%. One decision is made per
window.

### The complexity measure CM (hardest part)

Split the 64-sample window into four parts of N = 16 samples, u(0)..u(15).
Each pair i < j ≤ 14 gives two decision bits:

- A(i,j) = 1 when |u(i) − u(j)| ≤ r. This asks whether the two points match.
- C(i,j) = A(i,j) AND (|u(i+1) − u(j+1)| ≤ 2r). This asks whether their
  successors match as well.

S1 counts the A bits and S2 counts the C bits, each over the 105 pairs. For
each part, CM^p = S2/S1: the chance that a match still holds one step later.
It is close to 1 for rhythmic signals and small for noise. CM is the sum of
the four CM^p values, so it lies between 0 and 4. The tolerance r is the
THRESHOLD register (default 5).

The hardware never stores a table of pairs. It works incrementally:

1. When sample j of a part is written to the RAM, `read_mem` reads u(0)..u(j−1)
   back, one word per cycle.
2. For each i = 1..j−1 it presents four values at once:
   - u(i−1) and u(i) from the RAM;
   - u(j−1) and u(j) from registers.
3. The extractor's two subtracters then form both differences of the pair
   (i−1, j−1) together.

Over samples j = 2..15 this visits every pair i' < j' ≤ 14 exactly once. The
longest sequence is 15 reads, so it fits in the 16 detector cycles between two
samples of a channel.

At the end of each part a 19-step restoring divider forms S2·4096/S1. The
result is 0 when S1 = 0. The last four quotients are summed every second part.

### FFT and band powers

`fft64` is a radix-2/4/8 (radix-2^3) single-path delay-feedback (SDF)
pipeline. It has six decimation-in-frequency butterfly stages, with delay lines
of 32, 16, 8, 4, 2 and 1 words.

A plain radix-2 pipeline would need a general complex multiplier after each of
the first five stages. Radix-2^3 regroups the same twiddle factors in threes,
so most of them become trivial:

| after stage | rotation | hardware |
|---|---|---|
| 0 and 3 | 1 or −j | swap re/im and negate |
| 1 and 4 | W8^k: 1, −j, or √2/2(1−j) combined with −j | swap/negate, plus one constant ×√2/2 |
| 2 | W64^e, general | one complex multiplier, 1.16 cos/sin table computed at elaboration |
| 5 | none | none |

Which rotation a word gets depends only on its position in the frame. The
position's upper bits are the frequency bits already produced and its lower
bits the time bits still to be combined. `fft_sdf_stage` holds the derivation
and an exponent table built from it.

The datapath has 15 integer bits and no scaling, which holds any 64-point sum
of 9-bit inputs. Three fractional guard bits keep the result within about
1 LSB of the exact DFT.

The block takes the 64 window samples one per enabled cycle. It stalls
whenever no sample is offered. After the 64th sample it flushes itself with
zeros. Counting only cycles in which it advances, from the first input:

- the first result comes out 69 cycles later;
- results then arrive on 64 consecutive cycles, in bit-reversed order, with the
  bin number on `out_addr`;
- a whole frame takes 132 cycles.

`read_mem` uses the stall to hide most of the FFT time:

1. It opens a frame as soon as the previous frame's bands are out.
2. It feeds at once the 32 samples that the window shares with the previous
   window.
3. It feeds each new sample in the cycle after it is written.

So when the window's last sample arrives, only the flush is left. Bin 7, the
last bin needed, leaves 61 cycles later.

ADC codes are treated as offset binary, so the FFT is fed code − 128.

`fft_process` keeps bins 0, 4 and 7 (Band0, Band1, Band2). For each it
computes floor(sqrt(16·(DR² + DI²))), which is |X|/32 in unsigned 9.7 format.
One bit-serial square root is shared by the three bins. It takes 18 cycles per
bin.

With 200 Hz sampling, bins 0, 4 and 7 sit at 0, 12.5 and 21.9 Hz. The bin
numbers are parameters (`BIN0..BIN2`) in case other bands are wanted.

### Classifier, adaptive threshold and stimulation

`lls_classifier` evaluates one product per cycle on a shared multiplier:

| operand | format |
|---|---|
| CM × LLS_COEF_CM | 4.12 × 12.4 |
| Band1 × LLS_COEF_BAND1 | 9.7 × 7.9 |
| Band2 × LLS_COEF_BAND2 | 9.7 × 7.9 |
| constant {CONST1, CONST2} | signed 16.16 |

All products have 16 fractional bits. The sum is saturated to a signed 17.16
value (LLSo, 33 bits).

- **Sleep state.** The state has hysteresis. It is entered when
  Band0 > DETSWS_TH_HIGH and left when Band0 < DETSWS_TH_LOW.
- **Threshold.** In sleep the threshold is DETSWD_TH_SWS, a signed integer.
  Awake it is the parameter `TH_WAKE`, which defaults to 0: the trained
  constant absorbs the wake threshold.
- **Seizure window.** A window counts as a seizure window (R_LLS) when
  LLS > threshold.
- **Stimulation.** A counter of consecutive seizure windows is cleared by any
  other window. When it reaches DET_WINDOW (default 3), STIM rises and stays
  high for DET_STIM windows (default 3). The hold restarts while the seizure
  lasts.

The classifier takes 6 cycles.

## Chip-level blocks

| module | role |
|---|---|
| `mcesd_top` | chip core; ties the blocks below together |
| `clk_gen` | chip clock (1–10 MHz) → 3.2 kHz enable tick (period DIV_3200 clocks), CLK_500K = clk/(2·(DIV_500K+1)), CLK_OUT; MODE[1] holds CLK_OUT high, MODE[0] holds CLK_500K high |
| `data_receiver` | R_I, a 400 Hz sampling clock for the ADC (4 ticks high, 4 low); latches the ADC byte at the end of each R_I period and alternates channels (CHANNEL pin) |
| `i2c_regbank` | I2C slave: 64 control registers (read/write) and 64 status registers (read-only) |
| `seizure_detector_2ch` | switch plus two `seizure_detector_1ch` |
| `seizure_detector_1ch` | `read_mem`, `entropy_extractor`, `fft64`, `fft_process`, `lls_classifier` |
| `dp_sram_128x8` | the per-channel two-port RAM; synchronous read, stands in for a compiled SRAM macro |
| `udiv_seq`, `isqrt_seq`, `fft_sdf_stage` | helpers |
| `mcesd_pkg` | formats, `ch_cfg_t` and `ch_status_t` |

The whole core uses one clock. The 3.2 kHz detector "clock" is an enable pulse,
combined with the CLKEN pin. With CLKEN low, the detector, the receiver and
R_I all pause. Reset (`rst_n`) is active-low and asynchronous.

The pads, the analog front end with its ADC, and the stimulator are not part
of this RTL. The SDA pad appears as three signals: `i2c_sda_in`,
`i2c_sda_out` and `i2c_sda_oe`.

### I2C register map

The 7-bit device address is `{I2C_DEV_ID (4'b1010), 2'b00, i2c_addr}`.

- **Write:** S, address+W, pointer, data… P.
- **Read:** S, address+W, pointer, Sr, address+R, data… (master ACKs every
  byte except the last) P.

The pointer increments after every byte. Pointers 0–63 select the control
registers; 64–127 select the status registers.

16-bit values are stored low byte first. Channel 1 uses the channel 0 layout
plus 18 (ctrl21–ctrl38).

| ctrl | field | reset |
|---|---|---|
| 0, 1[3:0] | DIV_3200 | 312 (1 MHz) |
| 1[7:4] | DIV_500K | 0 |
| 2[1:0] | MODE | 0 |
| 3 | ch0 THRESHOLD r | 5 |
| 4–5 | ch0 LLS_COEF_CM (12.4) | 0 |
| 6–7 | ch0 LLS_COEF_BAND1 (7.9) | 0 |
| 8–9 | ch0 LLS_COEF_BAND2 (7.9) | 0 |
| 10–11 | ch0 LLS_COEF_CONST1 (integer part) | 0 |
| 12–13 | ch0 LLS_COEF_CONST2 (fraction) | 0 |
| 14–15 | ch0 DETSWD_TH_SWS (16.0) | 0 |
| 16–17 | ch0 DETSWS_TH_LOW (9.7) | 0 |
| 18–19 | ch0 DETSWS_TH_HIGH (9.7) | 0 |
| 20 | ch0 {DET_STIM, DET_WINDOW} | 0x33 |

Status registers are at pointer 64 + readin index. Channel 1 uses the
channel 0 layout plus 9 (readin9–readin17).

| readin | field |
|---|---|
| 0–1 | FFTo (last band computed, Band2) |
| 2–3 | CMo |
| 4–7, 8[0] | LLSo (33 bits) |
| 8[1] | R_LLS |

## Timing

All counts are in detector cycles (3.2 kHz):

| step | cycles |
|---|---|
| between two samples of one channel | 16 |
| between windows | 512 |
| CM ready, after the last pair of a window | 21 |
| FFT frame | 132 |
| one square root | 18 |
| LLS | 6 |
| decision, after the window's last sample | 108 (34 ms) |

## Where this RTL departs from the original design

- **FFT.** The original used an imported radix-2/4/8 FFT core that processed
  a frame in 64 cycles and offered 8/16/32/64-point modes. Only the 64-point
  mode is used there, and only that mode is built here. This radix-2/4/8 SDF
  pipeline needs 132 cycles per frame because it flushes itself with zeros.
  The word-length schedule inside the original core is not known. This one
  keeps 15+3 bits throughout.
- **LLS timing.** The classifier takes 6 cycles here against 11–12 in the
  original.
- **Decision latency.** 34 ms instead of 23.5 ms, because of the FFT
  pipeline flush and the serial square root. This is still far inside the
  160 ms window period.
- **Choices of this RTL, where the original leaves the point open:**
  - the 1/32 magnitude scale;
  - treating ADC codes as offset binary;
  - one stored LLS threshold, used for sleep, with `TH_WAKE` for wake;
  - Band0 hysteresis;
  - re-arming of STIM;
  - the I2C protocol details, device ID and pointer map;
  - reset values other than r, DET_WINDOW and DET_STIM;
  - the phase of sample capture against R_I;
  - CM^p = 0 when S1 = 0.
- **Clocking.** The detector clock is an enable, not a divided clock.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_mcesd_top rtl/mcesd_pkg.sv tb/mcesd_ref_pkg.sv tb/tb_mcesd_top.sv
./obj_dir/Vtb_mcesd_top
```

Replace `tb_mcesd_top` with any other `tb_<module>`.

`tb_mcesd_top` runs the whole core at its default parameters and at a 1 MHz
clock setting. It takes about 20 s. It does the following:

- configures both channels over I2C;
- feeds synthetic EEG from an ADC model that answers R_I: wake noise, a
  12.5 Hz spike-and-wave-like rhythm and a sleep-like slow wave;
- checks every CM against a reference computed in the testbench;
- exercises the CLKEN pause and MODE clock gating;
- reads the results back over I2C.

It also requires that channel 0 stimulates, that channel 1's slow wave is held
off by the sleep threshold, and that channel 1 never stimulates.

`tb/mcesd_ref_pkg.sv` holds the reference arithmetic: CM from its definition,
a direct DFT and the LLS sum. It also holds the EEG generator.
`tb/i2c_master_bfm.sv` is a bit-banged I2C master.
