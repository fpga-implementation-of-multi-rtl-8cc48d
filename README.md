# MCPFSK modem: 16-tone continuous-phase FSK with a multiplierless detector

This is a complete HF data modem in synthesizable SystemVerilog. Each
10 ms symbol carries 4 bits as one of 16 audio tones. The transmitter
produces the tones with continuous phase, and computes its whole
oscillator recursion on a single multiplier. The receiver finds the tone
of each symbol with 16 parallel square-wave correlators. Multiplying a
sample by +1 or -1 is only a sign choice, so the receiver needs no
multiplier at all. Both halves fit on one chip and share one sample clock.

The architecture follows the paper *"FPGA implementation of multi
frequency continuous phase frequency shift keying (MCPFSK) modulation
techniques for HF data communication"*. That paper describes a FLEX10K
implementation. It gives the signal plan, the serial
quadrature-oscillator transmitter and the square-wave detector in some
detail. It only names the framing, start-bit detection, CRC and UART
blocks. Everything the paper leaves open was chosen for this design.
Those choices are listed in [What is taken from the paper and what is
not](#what-is-taken-from-the-paper-and-what-is-not).

## Signal plan

| quantity | value |
|---|---|
| sample rate | 8000 Hz |
| symbol length | 10 ms = 80 samples (100 symbols/s, 400 bit/s) |
| carrier `FC` | 1900 Hz |
| deviation unit `FDEV` | 100 Hz |
| tones | `f(k) = FC + (2k - 15)·FDEV`, k = 0..15 → 400, 600, …, 3400 Hz |
| data mapping | nibble = Gray(k): neighbouring tones differ in one bit |

Each tone is written as `cos(A ± B)`. Here A is the carrier phase and B
runs at `phi_dev·FDEV`, with `phi_dev ∈ {1,3,…,15}`. The top bit of k
selects the sum or the difference. The three low bits of k select
`phi_dev`. Within one symbol, the carrier makes 19 whole cycles and every
`phi_dev·FDEV` tone makes a whole number of cycles. So at every symbol
boundary the B oscillator is back at phase 0, with `sin B = 0`. Changing
the B frequency or flipping the sign there leaves the waveform continuous.
This is what makes the FSK continuous-phase.

That argument needs whole cycles, which is not true at small deviations.
The modulation index is `h = 2·Tb·FDEV`, so the default FDEV = 100 Hz
gives h = 2. Setting `FDEV_HZ = 25` gives h = ½, an MSK-like signal with
tones 50 Hz apart (1525…2275 Hz). There B ends a symbol at an odd multiple
of 90°. So the generator does one more thing at each symbol boundary: when
the tone moves between the upper and lower half of the set, it negates
the stored `sin B`. That turns `A + B` into `A − (−B)`, the same angle, and
the phase stays continuous for any `FDEV`.

## Transmitter: one multiplier for two oscillators (`cpfsk_gen`)

The paper writes the sample as

    x[n] = ½·cosA·cosB ∓ ½·sinA·sinB

It obtains A and B from *coupled standard quadrature oscillators*. Each is
a rotation of a (cos, sin) pair by a fixed angle θ every sample:

    sin[n+1] = sinθ·cos[n] + cosθ·sin[n]
    cos[n+1] = cosθ·cos[n] − sinθ·sin[n]

A parallel version of this needs 4 multipliers per oscillator. Instead,
`cpfsk_gen` feeds one multiplier from a 10-way operand multiplexer and
computes one product per clock:

| step | product | used for |
|---|---|---|
| 0 | cosA·cosB | output, held in `acc` |
| 1 | sinA·sinB | output `x = (acc ∓ p)/2` → `sample_valid` |
| 2, 3 | sinθA·cosA, cosθA·sinA | new sinA (kept in `new_sa`) |
| 4, 5 | cosθA·cosA, sinθA·sinA | new cosA; cosA and sinA written together |
| 6..9 | the same four products for B | new cosB, sinB |

The output is computed from the state before the update, so a sample
appears 3 clocks after `sample_en`. The unit is busy for 10 clocks, so the
system clock must be at least about 11 times the sample rate. The default
25 MHz gives 3125 clocks per sample.

The eight B rotations (cos and sin of `2π·phi_dev·FDEV/FS`) form a
coefficient buffer. It is computed at elaboration from the parameters,
and the tone index selects an entry through a multiplexer. The carrier
coefficients are constants. State and coefficients are 24-bit Q2.22
numbers, and products are rounded. Quantised coefficients make the
amplitude drift slowly. Over a 24-symbol burst the error stays within
4 LSB of the 16-bit output. Both oscillators restart at (cos, sin) = (1, 0)
at the start of every burst, so drift cannot build up across bursts. The
output peak is 0.5 of full scale, from the ½ factor in the formula.

## Receiver: square-wave spectrum detection (`sqw_detector`, `sqw_lane`)

A non-coherent FSK receiver measures how much energy the input has at
each candidate frequency over one symbol, then picks the largest. With a
complex exponential as the reference, this is one DFT bin per tone, and
each sample needs two multiplications per tone. Here the exponential is
replaced by a complex square wave of the same period:

* real part +1 for |t| ≤ T/4, −1 elsewhere in the period;
* imaginary part +1 for 0 ≤ t ≤ T/2, −1 for the other half.

Each `sqw_lane` keeps a phase accumulator modulo `FS`, which steps by the
lane's tone frequency every sample. The accumulator's position in the
period gives the two signs. The lane then adds either the sample or its
complement into `acc_i` and `acc_q`. The accumulators restart on the first
sample of every symbol (`s_first`) and are complete after
`s_last`. All 16 lanes run in parallel on every sample.

The square wave is read half a phase step ahead of each sample instant:
each symbol's accumulator starts at `f/2`, not 0. Without that offset,
the sampled square wave of a lane near `fs/4` has an uneven sign pattern.
Its response to the neighbouring tones then becomes lopsided. That is
harmless at 200 Hz spacing, but at h = ½ (50 Hz spacing) it sometimes
picked the wrong neighbour.

After the last sample, one shared unit scans the lanes, one per clock.
For each lane it forms the magnitude estimate
`max(|I|,|Q|) + min(|I|,|Q|)/2` and keeps the running maximum. After 16
clocks `det_valid` pulses with the winning tone, its Gray-coded nibble and
its magnitude. The paper's spectrum is |X|². The estimate is a cheap
stand-in that keeps the receiver multiplier-free. It lies between 1.0
and 1.12 times the true magnitude, whatever the signal phase. A square
wave also responds to odd harmonics that alias back into the band, at a
third of the amplitude or less. The worst competing lane therefore stays
well below the correct one. The detector testbench sends all 16 tones at
random phases, with noise of ±0.3 full scale at amplitude 0.5, and the
correct tone always wins.

## Framing and synchronisation

A transmitted burst is 24 symbols long:

| symbols | content |
|---|---|
| 2 | start symbols: tone 15, then tone 0 (nibbles 8 and 0) |
| 16 | the 8 data bytes, high nibble first |
| 4 | CRC-16 of the data bytes, high nibble first |
| 2 | silence (output 0) |

`mod_framer` starts a burst as soon as the 16-byte transmit buffer holds
8 bytes. It takes each byte from the buffer at the start of the byte's
high-nibble symbol, and feeds it to the CRC at the same time. It turns
nibbles into tone indices with the inverse Gray code. If another 8 bytes
are waiting when the gap ends, the next burst follows immediately.

`startbit_detect` relies on two facts. The line is silent between bursts,
and a burst starts at oscillator phase 0, so its first sample is at the
peak amplitude. While idle, the first sample with `|x| ≥ THRESH` (default
4096, a quarter of the transmitted peak) is taken as sample 0 of a burst. From
that sample the block counts 80 samples per symbol for 22 symbols. It
marks each symbol's first and last sample for the detector, and returns to
idle after the last one. `demod_deframer` checks the two start nibbles and
reassembles the bytes. It recomputes the CRC and compares it with the
received check word. It pulses `frame_done` and holds `crc_ok` and
`preamble_ok` for that frame. Bytes go to the UART as they are decoded,
even if the CRC later fails. The CRC is CRC-16/CCITT: polynomial 0x1021,
start value 0xFFFF, MSB first.

## Hierarchy

```
mcpfsk_modem                     top: both halves, shared 8 kHz tick
├── sample_tick                  clock divider, CLK_HZ/FS_HZ
├── mcpfsk_modulator
│   ├── uart_rx                  host → bytes (8N1)
│   ├── byte_fifo                16-byte transmit buffer
│   ├── mod_framer               burst sequencing, Gray map
│   │   └── crc16
│   └── cpfsk_gen                serial two-oscillator generator, 1 multiplier
└── mcpfsk_demodulator
    ├── startbit_detect          burst onset, symbol boundaries
    ├── sqw_detector             16 × sqw_lane + shared magnitude/compare
    ├── demod_deframer           start-symbol check, bytes, CRC check
    │   └── crc16
    ├── byte_fifo                16-byte receive buffer
    └── uart_tx                  bytes → host (8N1)
```

`mcpfsk_pkg` holds the shared constants (16 tones, 4 bits per symbol,
frame constants), the Gray functions, the tone-frequency function and the
coefficient functions.

## Top-level interface (`mcpfsk_modem`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `uart_rxd` | in | 1 | bytes to transmit, 8N1 at `UART_BAUD` |
| `uart_txd` | out | 1 | received bytes, 8N1 |
| `sample_tick` | out | 1 | 8 kHz strobe for the converters |
| `dac_sample` | out | 16 | signed transmit sample, updated 4 clocks after `sample_tick` (2 when silent) |
| `tx_active` | out | 1 | a burst is on the air |
| `adc_sample` | in | 16 | signed received sample, read on `sample_tick` |
| `rx_busy` | out | 1 | the receiver is locked to a burst |
| `frame_done` | out | 1 | pulse: a received frame is complete |
| `crc_ok`, `preamble_ok` | out | 1 | verdict on the last frame |

Parameters, with defaults: `CLK_HZ` = 25 000 000, `FS_HZ` = 8000,
`FC_HZ` = 1900, `FDEV_HZ` = 100, `BAUD_SYM` = 100, `UART_BAUD` = 9600,
`FRAME_BYTES` = 8 and `THRESH` = 4096. To loop the modem back, connect
`dac_sample` to `adc_sample`. The analog converters and the HF radio are
not part of this RTL.

## What is taken from the paper and what is not

Taken from the paper:
* the 16-tone signal plan: fs = 8000 Hz, fc = 1900 Hz, fdev = 100 Hz,
  phi_dev = 1…15, 4 bits per symbol, 10 ms symbols;
* the Gray mapping;
* the `x = ½cosA·cosB ∓ ½sinA·sinB` construction, with the sign taken from
  the symbol's top bit;
* the coupled quadrature oscillators computed serially on one multiplier;
* the eight deviation coefficients kept in a buffer behind a multiplexer;
* the complex square-wave basis;
* the sign-and-complement correlators, 16 of them in parallel;
* the running-maximum decision;
* a modulator made of generator, CRC16 and UART, and a demodulator made of
  start-bit detection, square-wave detection, CRC16 and UART;
* the 16-byte transmit buffer, which matches the 128 memory bits the paper
  reports for its modulator.

This design's own choices:
* the clock rate, UART format and baud rate;
* all word widths;
* the 10-step multiplier schedule;
* the burst layout (start symbols, 8-byte frames, CRC placement, gap);
* the threshold start detector;
* the CRC polynomial;
* `max + min/2` in place of |X|²;
* the half-step offset of the square-wave phase;
* the `sin B` negation that keeps h = ½ continuous;
* phase accumulators in place of a stored basis table;
* the handling of CRC failures, which are reported but not dropped.

The paper quotes the carrier as both 1800 Hz and 1900 Hz, and the rate
as both 100 bit/s and 100 baud. This design uses 1900 Hz and 100 symbols/s,
the values that make the stated tone set consistent.

Not covered:
* **Noise margin at h = ½.** At 50 Hz spacing the neighbouring lanes
  respond strongly, so noise confuses adjacent tones sooner than at h = 2.
  Frames with ±0.1 full-scale uniform noise (about 16 dB SNR) decoded
  without error in every run, but no error-rate curve has been measured.
* **Channel performance.** `tb_sqw_detector_ber` measures the detector
  alone in white Gaussian noise. SNR is per sample over the 0–4 kHz band;
  the per-symbol Es/N0 is 16 dB higher. Measured BER is about 0.045 at
  −6 dB, about 10⁻³ at −3 dB, and no errors in 6000 bits at 0 dB. This is
  a single measured curve, not a comparison with published results, and
  it does not model an HF fading channel.
* **Synchronisation under fading.** Burst onset is found by a plain
  amplitude threshold. A weak or fading channel can trigger it late or
  falsely. There is no re-synchronisation within a burst.

## Verification

Every block has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`. The reference models in
`tb/tb_ref_pkg.sv` (bit-serial CRC, literal Gray table, tone plan, burst
builder) are written separately from the RTL.

| testbench | what it checks |
|---|---|
| `tb_cpfsk_gen` | every sample of 22- and 16-symbol bursts, at h = 2 and h = ½, against `0.5·cos` of the accumulated phase; 3-clock latency |
| `tb_sqw_detector` | all 16 tones at random phase, at two amplitudes and with noise; nibble, magnitude bounds, latency |
| `tb_mod_framer` | tone sequence and length of two back-to-back bursts, gap, and no start with a short buffer |
| `tb_startbit_detect` | no sync on sub-threshold noise; symbol marks; burst length; both polarities |
| `tb_demod_deframer` | good, corrupted-data, corrupted-CRC and bad-preamble frames |
| `tb_crc16` | check value 0x29B1 for "123456789"; random messages |
| `tb_uart_rx`, `tb_uart_tx`, `tb_byte_fifo` | serial framing and timing; FIFO against a queue model |
| `tb_mcpfsk_modulator` | UART in to samples out, two frames, continuous phase across the whole burst |
| `tb_mcpfsk_demodulator` | synthesised bursts (clean, noisy, one bad symbol) to UART bytes and CRC verdicts |
| `tb_mcpfsk_modem` | the whole modem at default parameters, DAC looped to ADC |
| `tb_sqw_detector_ber` | bit-error rate of the detector over a sweep of SNR in Gaussian noise (prints the curve) |
| `tb_mcpfsk_modem_msk` | the whole modem at h = ½ (`FDEV_HZ = 25`): "12345678", a random frame, and a frame with ±0.1 noise whose CRC verdict must match the bytes |

`tb_mcpfsk_modem` runs at the real 25 MHz clock and 9600 baud. It sends
four frames:
* "12345678" on a clean channel;
* two frames that arrive together and fill the 16-byte buffer, so the
  second burst starts straight from the queue;
* in the third frame, one symbol replaced by a foreign tone, so the CRC
  must fail;
* a last frame with ±0.1 full-scale noise.

It checks every returned byte, each frame's verdict, the burst lengths,
and that each of these mechanisms actually happened. It simulates about
1 s of modem time, which takes about 20 s.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mcpfsk_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/tb_mcpfsk_modem.sv \
    --top-module tb_mcpfsk_modem -Mdir obj_modem
./obj_modem/Vtb_mcpfsk_modem
```

For any other testbench, replace the testbench file and the top-module
name. The block testbenches override clock and UART rates (and, for the
framer and start detector, symbol length) to keep runs short. The signal
parameters stay at their defaults.
