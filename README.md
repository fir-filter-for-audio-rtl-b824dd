# Eight-tap low-pass FIR for a WM8731 audio codec

This design filters live audio on an FPGA. A WM8731 codec digitises the line
input to 16-bit samples at 44.1 kHz and sends them over a serial interface.
The FPGA takes each left-channel sample, runs it through an eight-tap
low-pass FIR filter and sends the result back to the codec's DAC. The cut-off
lies near 7 kHz, and the stop band starts at about 9 kHz.

Three blocks do the work. All of them run on a single 50 MHz clock:

```
             I2C (SCLK, SDIN)
 codec_init ─────────────────────────────►┌──────────┐
                                          │  WM8731  │◄── line in
             AUD_BCLK, AUD_ADCLRCK,       │  codec   │──► line out
             AUD_ADCDAT                   └──────────┘
        ┌────────────────────────────────────┘  ▲ AUD_DACDAT
        ▼                                       │ (AUD_DACLRCK from codec)
 ┌─────────────┐ ADCDAT/ADCstb  ┌────────────┐  │
 │ s2p_adapter │ ─────────────► │ fir_filter │  │
 │  serial <-> │ ◄───── ADCrdy  │  8 taps,   │  │
 │  parallel   │ ◄─DACDAT/DACstb│ 1 multiplier│ │
 │             │ DACrdy ──────► │            │  │
 └─────────────┘                └────────────┘  │
        └───────────────────────────────────────┘
```

* `codec_init` writes eleven configuration words into the codec over I2C
  once after reset. It then raises `init_done`.
* `s2p_adapter` turns the codec's serial ADC stream into parallel 16-bit
  words. It also serialises the filtered words back onto the DAC line.
* `fir_filter` computes y(n) = Σ b_k·x(n−k) over 8 taps with one shared
  multiplier.

`audio_fir_top` wires the three together. The codec is a separate chip on the
board and is not part of the RTL. Neither is the clock block that makes the
codec's master clock.

## The filter

The coefficients are symmetric (linear phase):

| k   | 0     | 1    | 2     | 3     | 4     | 5     | 6    | 7     |
|-----|-------|------|-------|-------|-------|-------|------|-------|
| b_k | −1260 | 7827 | 12471 | 16384 | 16384 | 12471 | 7827 | −1260 |

The datapath is serial. A new sample enters the input register x(n). At the
same time the older samples move down a seven-stage, 16-bit data shifter
(x(n−1) … x(n−7)). The filter then spends eight clocks on the taps. In each
clock it multiplies one tap by its coefficient and adds the 32-bit product to
a 35-bit accumulator.

The word sent on is **accumulator bits 31..16**, which is the sum divided by
2^16. It is truncated towards −∞, with no rounding and no saturation.

Consequences worth knowing:

* **DC gain.** The coefficients sum to 70844, so the DC gain is
  70844 / 65536 ≈ 1.081. For a constant input of −1 the accumulator settles
  at −70844 (`…FFFEEB44`), and the output is `16'hFFFE`.
* **Overflow can wrap the output.** An input that follows the coefficient
  signs at full scale can reach about ±2.5·10^9. That does not fit in bits 31..16,
  and the output then wraps. A DC input above about 30310 (92 % of full
  scale) already overflows. The 35-bit accumulator never overflows; only the
  slice does. Add saturation to the slice if your signal can get that loud.
* **Frequency response at fs = 44.1 kHz** (measured in simulation; it agrees
  with |H(f)| to within 0.001):

  | f (kHz) | 0.1  | 1    | 3    | 5    | 7    | 9     | 12   | 15    | 20   |
  |---------|------|------|------|------|------|-------|------|-------|------|
  | gain    | 1.08 | 1.06 | 0.91 | 0.63 | 0.31 | 0.039 | 0.13 | 0.012 | 0.10 |

  With only eight taps the stop band is shallow: it rebounds to about −18 dB
  at 12 kHz and 20 kHz.

Timing: `stb_out` rises 8 clocks after the edge that took the sample. When
the output is never held back, the filter takes a new sample every 10 clocks.
At 44.1 kHz and 50 MHz a sample period is 1133 clocks, so the filter is idle
more than 99 % of the time.

## Strobe/Ready handshakes: "Ready" means busy

The two parallel links (adapter → filter and filter → adapter) use the same
two-wire handshake. Its polarity is the part most likely to trip up a reader:

* The **sender** raises `STB` with the data, and holds both until the word
  has been taken.
* The **receiver's** `RDY` is **1 while it is busy** and 0 when it can take a
  word.
* A word passes on any clock edge where `STB = 1` and `RDY = 0`.

| link            | data      | strobe               | ready (1 = busy)      |
|-----------------|-----------|----------------------|-----------------------|
| adapter→filter  | `ADCDAT`  | `ADCstb` → `stb_in`  | `rdy_in` → `ADCrdy`   |
| filter→adapter  | `DACDAT`  | `stb_out` → `DACstb` | `DACrdy` → `rdy_out`  |

The filter is busy from the moment it takes a sample until its result has
been handed on. The adapter's DAC side is busy while its holding register
holds a word that has not yet been moved into the serialiser.

In normal running nothing ever waits. The ADC word of a frame completes after
the DAC side of that same frame has already loaded its shifter. The filter
result therefore finds the holding register empty, and `ADCstb` lasts exactly
one clock.

A wait only happens if the DAC side misses frames. In that case:

1. The holding register stays full, so the filter's result waits (`stb_out`
   held).
2. The filter stays busy, so the next ADC word waits (`ADCstb` held).
3. If yet another ADC word completes while one is still waiting, **the newer
   word replaces the older**, and one sample is lost.
4. A DAC frame that finds no new word sends the previous word again.

The ADC and DAC sides run at the same rate, so a backlog built up by missed
DAC frames never drains. After two missed frames the path carries one extra
frame of delay for good. A second such gap then costs a sample (rule 3).

## Serial audio framing

The codec is the master of the audio interface, so `AUD_BCLK`, `AUD_ADCLRCK`
and `AUD_DACLRCK` are inputs. The codec's R7 register selects DSP format with
16-bit words:

```
BCLK   _/‾\_/‾\_/‾\_/‾\_ ... _/‾\_/‾\_/‾\_ ...
LRCK   _/‾‾‾\___________ ... ____________ ...   one BCLK cycle high
DATA   ____| 15| 14| 13| ... | 0 | 15| ... | 0 | idle ...
                left channel    right channel
```

* A rising BCLK edge that sees LRCK high marks the start of a frame.
* Bit 15 of the left word begins at the next falling edge. Each bit is read
  on the following rising edge, in the middle of the bit.
* ADC: the adapter reads 16 bits on 16 rising edges. `ADCstb` rises 3 clocks
  after the rising edge that read bit 0. The right-channel word is ignored.
* DAC: the adapter drives `AUD_DACDAT` on falling edges, starting with the
  held word's MSB, so the codec reads it on rising edges. After 16 bits the
  line stays 0, which makes the right channel silent.

Everything is sampled in the CLOCK_50 domain. BCLK, both LRCKs and ADCDAT
pass through a two-flop synchroniser (`sync_2ff`), and a rising or falling
BCLK edge is detected as a change between two samples. `AUD_DACDAT` therefore
changes 3 clocks after the real BCLK edge. **A BCLK half period must be
longer than 4 CLOCK_50 cycles** (80 ns), which holds for any BCLK below about
6 MHz. A 44.1 kHz stereo BCLK runs at 1.4 to 2.8 MHz.

## Codec configuration over I2C

`codec_init` is a write-only I2C master. Each configuration word is its own
transaction of 29 bit slots, counted down by `bcnt`:

| bcnt   | slot                                                      |
|--------|-----------------------------------------------------------|
| 28     | start: SDIN falls while SCLK is high                      |
| 27..20 | chip address `0011010` + R/W = 0 → `8'h34`                |
| 19     | acknowledge (SDIN released, codec pulls it low)           |
| 18..11 | register address [6:0], register data [8]                 |
| 10     | acknowledge                                               |
| 9..2   | register data [7:0]                                       |
| 1      | acknowledge                                               |
| 0      | stop: SDIN rises while SCLK is high                       |

`wcnt` counts the eleven words down from 10 to 0. They are sent in this
order:

| reg | data (9 bits) | purpose                                   |
|-----|---------------|-------------------------------------------|
| R15 | 000000000     | reset                                     |
| R0  | 000011111     | left line-in volume / mute                |
| R1  | 000110111     | right line-in volume / mute               |
| R2  | 001111001     | left headphone-out volume                 |
| R3  | 000110000     | right headphone-out volume                |
| R4  | 011010010     | analogue audio path                       |
| R5  | 000000001     | digital audio path                        |
| R6  | 001100010     | power-down control                        |
| R7  | 001000011     | interface format: master, DSP, 16 bit     |
| R8  | 000100000     | sampling control                          |
| R9  | 000000001     | activate the interface                    |

Each slot lasts four quarter periods of SCLK, each `CLK_HZ/(4·I2C_HZ)`
clocks (125 by default). SCLK is low in quarters 0–1 and high in quarters
2–3, and SDIN changes in quarter 1. SDIN is open drain: `I2C_SDAT_oe = 1`
pulls it low, and the board's pull-up supplies the highs. In the
acknowledge slots the pin is sampled in quarter 2; a high sets the sticky
`init_ack_error` flag. With the defaults (100 kHz SCLK) the whole
configuration takes 159,500 clocks, or 3.19 ms. The codec accepts up to
500 kHz, so `I2C_HZ` may be raised as far as that.

## What comes from the original design and what was chosen here

Taken from the published design:

* the three-block split
* the coefficients, the 7-stage 16-bit shifter, the single multiplier, the
  35-bit accumulator and the bits-31..16 output
* the Strobe/Ready handshake, with Ready low meaning "go ahead"
* the port names of the adapter and the filter
* left channel only, MSB first, read on rising and write on falling BCLK
  edges
* the 29-slot I2C word, the chip address, the register values and the reset
  word sent first

Chosen here, where the source is silent or unclear:

* **Ready polarity.** The waveform snapshots of the original show Ready at 1
  while data flows. The written rule (Ready high = busy) was followed.
* **Output value.** Taking bits 31..16 of −70844 gives `16'hFFFE`, and that
  value is used here.
* **BCLK and LRCK come from the codec.** The original text speaks of the FPGA
  generating BCLK, but the adapter's ports and the R7 setting both make the
  codec the master.
* **Frame alignment.** Data starts at the falling edge after the LRCK pulse,
  as in the codec's DSP mode with the MSB on the second rising edge.
* **The handshake's buffering:** the DAC holding register, newest-word-wins
  on the ADC side, repeating the last DAC word, and a silent right channel.
* **I2C details:** 100 kHz SCLK, quarter-period timing, open-drain SDIN, the
  order R0..R9 after the reset word, no power-up delay, and an
  acknowledge-error flag with no retry.
* **Reset:** asynchronous and active low, clearing all state.
* **The FIR's sequencing:** its state machine and its 8- and 10-clock
  timing.

## Files

| file                        | contents                                                  |
|-----------------------------|-----------------------------------------------------------|
| `rtl/audio_fir_pkg.sv`      | sample type, coefficients, codec address, configuration table |
| `rtl/fir_filter.sv`         | the FIR filter                                            |
| `rtl/s2p_adapter.sv`        | serial/parallel adapter                                   |
| `rtl/sync_2ff.sv`           | synchroniser                                              |
| `rtl/codec_init.sv`         | I2C configuration master                                  |
| `rtl/audio_fir_top.sv`      | system top                                                |
| `tb/wm8731_model.sv`        | behavioural codec model (I2C slave + audio master), simulation only |
| `tb/tb_fir_filter.sv`       | random samples with back-pressure, the −1 case, latency   |
| `tb/tb_fir_sine_response.sv`| gain at 0.1–20 kHz against the analytic response          |
| `tb/tb_s2p_adapter.sv`      | framing, strobe timing, stalls, word replacement, DAC repeats |
| `tb/tb_sync_2ff.sv`         | two-clock delay, reset                                    |
| `tb/tb_codec_init.sv`       | the eleven words, 100 kHz SCLK, total time, missing acknowledge |
| `tb/tb_audio_fir_top.sv`    | whole system at default parameters: configuration, 400 frames, both stalls |

Every testbench checks itself. It prints
`TB_RESULT checks=N failures=M` and stops, and a watchdog ends it if it
hangs.

## Simulating

Use Verilator 5 with timing support. List the package first and let `-y`
find the rest:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_audio_fir_top -y rtl -y tb -Irtl \
  rtl/audio_fir_pkg.sv tb/tb_audio_fir_top.sv -o sim
./obj_dir/sim
```

Swap in any other `tb_*` module name to run that testbench. The system
testbench runs the full design at its default parameters and takes well
under a second. The testbenches use only two-state values and `$urandom`.

To change the filter, edit `FIR_COEFFS` in the package (8 taps of 16 bits).
Then check that `ACC_W` and `OUT_LSB` still suit the new coefficient sum.
The reference filters in the testbenches list the coefficients separately,
so update them too.
