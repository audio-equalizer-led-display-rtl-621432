# Audio equalizer LED display — FPGA design

A spectrum display for live audio. A microcontroller digitises a microphone
signal and sends one 16-bit sample at a time over SPI. This FPGA design
collects 32 samples at about 2441 samples/s and runs a 32-point radix-2 FFT
on them. That gives 16 frequency bins of about 76 Hz each below half the
sampling rate. Adjacent bins are paired into 8 magnitudes, and each one is
shown as a vertical bar on an 8x8 LED matrix. A new spectrum is taken about
every 0.1 s. The previous one stays on the matrix while the next 32 samples
come in.

```
 microphone ─► MCU ADC ─► SPI ─►┌─────────────── FPGA (eq_top) ───────────────────┐
                       ◄─ done ─┤ spi_receiver ─► fft_core ─► bin_saver ─►         │
                                │      ▲          (AGU, twiddle ROM,   display_driver ├─► led_display[15:0]
                                │      └── eq_controller  butterfly, 4 RAMs)       │      (8 columns, 8 rows)
                                └─────────────────────────────────────────────────┘
```

All files are SystemVerilog 2017. They build with plain Verilator and with
Yosys/slang. There are no vendor primitives. The RAMs are inferred arrays.

## Signal path and timing (40 MHz clock)

| step | block | time |
|------|-------|------|
| request a sample: `done` high | `eq_controller` (START, SPI) | until the MCU pulses `load` low |
| shift in 16 bits, MSB first | `spi_receiver` | 16 SPI clocks, ~65 µs at 244 kHz |
| write the sample at its bit-reversed address in bank 0 | `eq_controller`, `fft_memory` | 1 cycle |
| wait for the next sampling instant | `delay_timer` (SAMPLE_DELAY = 2^14) | 409.6 µs |
| after 32 samples: FFT | `fft_core` | 86 cycles |
| pair bins, store 8 magnitudes | `bin_saver` | 10 cycles |
| hold the display | `delay_timer` (DISPLAY_DELAY = 2^22) | 0.105 s |
| multiplex columns onto the matrix | `display_driver` | continuously, 1 column per COLUMN_DIV cycles |

The sampling delay starts when a sample is written. It is not measured
between requests, so the real sample period is 2^14 cycles plus the SPI
transfer time.

## The FFT engine (`fft_core`)

This is the least obvious part of the design. It is an in-place,
decimation-in-time radix-2 FFT with 5 levels of 16 butterflies.

**Memory.** Four two-port RAMs of 32 x 16 bits (`dp_ram`) form two complex
banks. Each bank is a real RAM plus an imaginary RAM (`fft_memory`). Samples
are loaded into bank 0 with the imaginary part set to zero. Level *i* reads
bank *i* mod 2 and writes the other bank (ping-pong). After 5 levels, bank 1
holds X[k] at address k, in natural order.

**Addresses (`fft_agu`).** Butterfly *j* (0–15) of level *i* (0–4) uses
these operands:

```
addr_a = rotl5({j, 0}, i)      addr_b = rotl5({j, 1}, i)
twiddle index = j & ~(4'b1111 >> i)      (the top i bits of j)
```

The two addresses differ only in bit *i*, which is the butterfly span
2^i. The twiddle index equals (addr mod 2^i)·2^(4−i), the usual DIT exponent.
Loading the input at bit-reversed addresses is what puts the output in
natural order.

**Pipeline.** In cycle *t* the AGU issues the read addresses, and the RAMs
register them. In cycle *t+1* the operands are at the RAM outputs. The twiddle
index and the write addresses, which are registered copies, arrive at the same
time. The combinational `butterfly` result is written into the other bank at
the end of *t+1*. One idle cycle between levels makes sure the last write of
a level lands before the next level reads. Each level takes 17 cycles, and
`done` pulses 86 cycles after `start`.

**Arithmetic.** Words are Q1.15. The butterfly computes `x = a + w·b` and
`y = a − w·b`. The complex product is exact in 32 bits and is then truncated
to bits [30:15]. Sums wrap in 16 bits. No level scales its result, so X[0]
is the plain sum of the samples, and the input must stay within about ±1000
per sample to avoid overflow. Truncation error is at most about 31 LSB per
bin.

**Sign convention.** The twiddle ROM holds cos + j·sin of 2πk/32. The engine
therefore computes Σ x[n]·e^(+j2πnk/32), the conjugate of the textbook
forward DFT. For real audio this makes no difference to the magnitudes. The
ROM keeps only the 9-entry quarter-wave sine table (0x0000, 0x18f9, 0x30fb,
0x471c, 0x5a82, 0x6a6d, 0x7641, 0x7d89, 0x7fff = round(32767·sin(2πi/32))).
It folds the rest by symmetry.

**Reference result.** Take a ±1024 square wave with period 32 (16 high, 16
low). The even bins are 0. X[1] ≈ 0x0800 + j0x511b, X[3] ≈ 0x07fd + j0x1a54,
and X[31] ≈ 0x0805 − j0x511b (0xaee5).

## Bins to bars (`bin_saver`, `display_driver`)

Column *c* (0–7) shows bins 2c and 2c+1, so the columns cover 0–150 Hz,
150–300 Hz, …, 1050–1200 Hz. Each bin contributes (re² + im²) >> 15. This is
the squared magnitude, with no square root. The two values are added at full
width into a 20-bit column register. The registers change only during a save,
which is how the display holds the old spectrum while new samples are loaded.

The bar height is the number of these thresholds that the column magnitude
reaches (≥):

| rows lit | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|---|
| magnitude | < 0x2 | ≥ 0x2 | ≥ 0x4 | ≥ 0x21 | ≥ 0x64 | ≥ 0x256 | ≥ 0x512 | ≥ 0x768 | ≥ 0x1280 |

The matrix is driven one column at a time:

- `led_display[7:0]` are the column lines C1..C8. The selected column is high.
- `led_display[15:8]` are the row lines R1..R8. A row line driven low is lit. R1 is the bottom row.
- The rows carry the current-limiting resistors (270 Ω for a 5 V drive).

## Sequencing (`eq_controller`)

The main state machine has 12 states:

- **Sampling loop:** PRE_START → START → SPI → WRITEDATA → S0 → DELAY → RESET_SPI → START …
- **After the 32nd sample:** S0 → S1 (FFT) → S2 (save) → S3 → S4 (display hold) → S5 → PRE_START.

`done` is high in START and SPI. SPI is left when the synchronised `load`
goes low. The sampling timer restarts in WRITEDATA, and the display timer
restarts in S3.

**Microcontroller handshake.** LOAD idles high. While DONE is high the MCU
converts a sample, clocks it out, then pulses LOAD low and high again. It uses
SPI mode 0: clock idle low, data captured on the rising edge. Inside the FPGA,
`spi_clk`, `sdi` and `load` each pass through two-flop synchronisers, so the
system clock must be many times the SPI clock. The LOAD low pulse must last
at least 3 system clock cycles.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `eq_top`, `eq_controller` | `SAMPLE_DELAY` | 16384 | cycles from writing a sample to requesting the next (2441 Hz at 40 MHz) |
| `eq_top`, `eq_controller` | `DISPLAY_DELAY` | 4194304 | display hold in cycles (0.105 s at 40 MHz) |
| `eq_top`, `display_driver` | `COLUMN_DIV` | 1 | clock cycles per multiplexed column |
| `eq_pkg` | `LOG2N`, `DATA_W`, `N_BINS`, `MAG_W` | 5, 16, 8, 20 | FFT size, word width, columns, magnitude width |

The twiddle table is written for 32 points. Changing `LOG2N` also needs a
larger quarter-wave table in `twiddle_rom`.

## Where this implementation makes its own choices

- **Clock.** The clock is assumed to be 40 MHz, the frequency at which a
  2^14-cycle delay gives 2441 samples/s. The sampling delay is 2^14 cycles,
  which matches the stated 2441 Hz rate.
- **SPI input.** The receiver is fully synchronous. It detects `spi_clk`
  edges with the system clock instead of clocking the shift register from
  `spi_clk`.
- **Timers.** They count exactly to their delay. They are not free-running
  counters watched at their top bit.
- **Leaving DELAY.** DELAY is left once the sampling delay has elapsed.
- **`done`.** It covers both START and SPI, so the MCU sees the request for
  the whole transfer.
- **Bin pairs.** Adjacent bins are paired as (0,1), (2,3), …
- **Column sum.** The magnitude sum does not wrap.
- **Thresholds.** A magnitude equal to a threshold counts as reaching it.
- **Control signals.** The FFT and the save are started by one-cycle pulses.
- **Gap between levels.** The FFT waits one idle cycle between levels,
  which is the minimum that avoids a read-before-write hazard.
- **RAM read-during-write.** The RAMs return the old word when a port reads
  the address being written in the same cycle.
- **Reset.** It is synchronous and active high.

Known limitation: there is no overflow protection. With the MCU sending
ADC·100 as a 16-bit value, loud input overflows both the sample word and the
unscaled FFT, and the bars become unreliable. Scaling the samples before the
FFT, or dividing by 2 per level, would fix this, but it is not done here.

## Files

- `rtl/eq_pkg.sv`: shared types (`cplx_t`, `mag_t`, the state enum) and sizes.
- `rtl/eq_top.sv`: the top level.
- `rtl/eq_controller.sv`, `rtl/delay_timer.sv`, `rtl/spi_receiver.sv`: control, timers and SPI input.
- `rtl/fft_core.sv`, `rtl/fft_agu.sv`, `rtl/twiddle_rom.sv`, `rtl/butterfly.sv`, `rtl/fft_memory.sv`, `rtl/dp_ram.sv`: the FFT.
- `rtl/bin_saver.sv`, `rtl/display_driver.sv`: magnitudes and the display.
- `tb/tb_<module>.sv`: a self-checking testbench for each module. Each prints `TB_RESULT checks=N failures=M`.
- `tb/mcu_model.sv`: behavioural microcontroller, an SPI master using the done/load handshake.
- `tb/eq_harness.sv`: end-to-end checker, shared by `tb_eq_top` (short delays, five spectra) and `tb_eq_top_full` (the default timings, two complete spectra, ~9.6 M cycles).

The FFT tests compare every bin bit-exactly with an integer model of a
textbook iterative FFT, and with a floating-point DFT within 40 LSB. The
end-to-end tests check these items:

- the 8 stored magnitudes, against the same model;
- every multiplexed LED column;
- that the display is held while sampling;
- the sampling interval (SAMPLE_DELAY + 3 cycles from write to next request);
- the FFT time (86 cycles);
- the display hold (DISPLAY_DELAY + 2 cycles).

## Simulating

```
verilator --binary --timing -y rtl -y tb rtl/eq_pkg.sv tb/tb_eq_top.sv --top-module tb_eq_top -o sim
./obj_dir/sim
```

Verilator finds the other modules through `-y`. The package must be named first.
To run one block's test, replace the testbench file and top module, for example
`tb/tb_fft_core.sv --top-module tb_fft_core`. The full-size run, `tb_eq_top_full`, takes about 8 s. Variables that are not reset
start at random values under `+verilator+rand+reset+2`, and the testbenches
pass with that setting.
