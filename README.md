# IF_DAD: an FPGA correlator that measures phase and attenuation at 10 MHz

This design is the FPGA logic of an intermediate-frequency (IF) data-acquisition
board for mm-wave imaging. The board sends a 10 MHz tone out through a DAC. An RF
front end moves it up to Ka band (26.5–40 GHz), bounces it off a material under
test and brings the echo back down to 10 MHz, where an ADC digitises it. The
material changes the echo's amplitude and phase, and that change is what the
instrument has to report.

The FPGA measures it with a quadrature correlator. The received samples are
multiplied by the transmitted sine and by a copy shifted 90°, and each product is
averaged over a window:

    tx(t)  = sin(wt)                       (the transmitted reference)
    rx(t)  = A sin(wt + theta)             (the echo)
    mean{ rx(t) * sin(wt)       } = (A/2) cos(theta)   -> real part
    mean{ rx(t) * sin(wt + 90°) } = (A/2) sin(theta)   -> imaginary part

The two means form a complex number. Its angle is the phase shift theta and its
magnitude is proportional to the echo amplitude A. The host computes the phase
and the attenuation in dB from the two 16-bit numbers it receives over a serial
link.

Everything is in SystemVerilog (IEEE 1800-2017) and synthesizable. The analog
parts are outside the FPGA and are not modelled in `rtl/`: the DAC, ADC,
filters, up/down converters and the USB-serial bridge chip.

## Signal chain

```
            +-------------+  dac_o (14 b)
            | waveform_gen|------------------------------------> DAC
            |  NCO + sine |--+ ref_i
            +------+------+  |
                   | phase   |          adc_i (12 b, registered)
            +------v------+  |      +------------------------------ ADC
            |phase_shift90|  |      |
            +------+------+  |      |
                   | ref_q   v      v
                   |      [mixer u_mix_re] -> [averager u_avg_re] --+ re (16 b)
                   +----> [mixer u_mix_im] -> [averager u_avg_im] --+ im (16 b)
                                                                    |
 uart_rx_i -> uart_rx --+                                           v
 start_btn_i -> edge ---+--> start --> acq_ctrl -- bytes --> uart_tx --> uart_tx_o
                                      (gen_en, avg_start)

 spi_req_* --> spi_master --> SCLK / MOSI / MISO / CS_SRC, CS_UP, CS_DN
```

| Module | Role |
|---|---|
| `if_dad_pkg` | Shared constants (clock, IF, widths, tuning word, baud, SPI word), the `iq_t` result struct and the `spi_target_e` chip-select enum |
| `if_dad_top` | Wires all blocks together; synchronises the start input; registers the ADC bus |
| `waveform_gen` | NCO: 32-bit phase accumulator plus a sine table. Produces the DAC codes and the phase used by the shifter |
| `sine_lut` | 1024-entry, 14-bit sine ROM computed at elaboration from `round(8191*sin(2*pi*i/1024))` |
| `phase_shift90` | Second sine-table read at phase + 90°, giving the quadrature reference |
| `mixer` | Signed 12 × 14-bit multiplier, registered (two instances) |
| `averager` | Windowed mean, scaling to 16 bits with clamping (two instances) |
| `acq_ctrl` | Acquisition sequencer: start, settle, measure, send real then imaginary |
| `uart_rx`, `uart_tx` | 8N1 serial link to the host through the board's USB bridge |
| `spi_master` | SPI frames for the converter and source chips, three chip selects |

## The reference: why an NCO, and how the 90° shift is exact

At a 100 MHz sample clock the 10 MHz tone has exactly ten samples per period. A
90° shift is then 2.5 samples, so a delay line cannot produce it. Instead, the
generator is a numerically controlled oscillator. Each clock, a 32-bit phase
accumulator advances by the tuning word `FTW = round(2^32 / 10) = 429496730`.
This gives 10 MHz to within 0.02 Hz. The top 10 bits of the phase address a sine
table.

The quadrature reference is a second read of the same table at the phase plus a
quarter of the table (`phase_shift90`). It is therefore exactly sin(phase + 90°)
= cos(phase), with the same one-clock latency as the DAC code, so the two
references stay aligned sample for sample. The shift is a *lead*, which makes
the imaginary part +(A/2)·sin(theta) for an echo A·sin(wt + theta). If you prefer
the opposite sign convention, subtract the quarter instead of adding it.

The generator runs only during an acquisition. While it is off, its phase is held
at zero and the DAC sits at code 0 (mid-scale). Every burst therefore starts at
the same phase, which makes the pipeline's phase offset a constant (see below).

## Averaging window, scaling and what the numbers mean

Each `averager` sums `N_AVG = 1000` products. That is exactly 100 periods of the
10 MHz tone, so the double-frequency term of the product cancels over the window.
The sum is divided by `N_AVG · 2^AVG_SHIFT` (`AVG_SHIFT = 8`), truncating toward
zero, and clamped to signed 16 bits. `sat_o` reports a clamp.

Scale: for a full-scale echo (ADC amplitude 2047) the magnitude of the result is

    |z| = 2047 · 8191 / 2 / 256 ≈ 32748

which just fits in 16 bits. A sine echo cannot clamp; only a distorted echo can,
for example a full-scale square wave (mean 0.64 · 2047 · 8191 / 256 ≈ 41700). The
attenuation in dB is `20·log10(|z| / |z_ref|)`. The phase is `atan2(im, re)`
minus a reference phase.

**Fixed phase offset.** The echo passes through the analog path and the ADC input
register, so it is correlated against a reference that is a fixed number of
samples away. At 10 MHz each clock is 36°. The pipeline as built, with an ideal
zero-delay analog path, reads about −36°. A real board adds its own cable and
converter delay. Take one zero-phase measurement and subtract its phase from
later ones, as the testbench does. The offset is constant because each burst
starts at phase zero.

**Resolution.** At −50 dB the echo is only about 6.5 ADC LSB, yet |z| ≈ 104,
because the averaging recovers resolution. ADC rounding can move a result by at
most 0.5 · 8191 / 256 ≈ 16 LSB. In the noiseless end-to-end test, attenuation
steps of 0 to −50 dB are measured within 0.2 dB and 30° phase steps within 0.05°.

## Acquisition sequence and the host protocol

1. **Start.** Any byte received on `uart_rx_i` (115200 baud, 8N1) or a rising
   edge on `start_btn_i` starts an acquisition. A start that arrives while one is
   already running is ignored.
2. **Settle.** The generator turns on. After `SETTLE = 64` clocks (640 ns), by
   which time the echo has reached the ADC, both averagers start together.
3. **Measure.** The averagers take 1000 samples, one per clock.
4. **Send.** Four bytes go out on `uart_tx_o`: real MSB, real LSB, imaginary MSB,
   imaginary LSB, in two's complement. This takes about 347 µs at 115200 baud.
5. Steps 3–4 repeat `N_POINTS` times (default 1). Then the generator turns off.
   The next window opens as soon as the last byte of a point has been handed to
   the transmitter, so it overlaps that byte's transmission.

From the edge that raises `led_busy_o` to `result_valid_o` takes
SETTLE + N_AVG + 3 clocks (about 10.7 µs). The serial link, not the averaging,
sets the rate of a series. Once it is busy, results follow every four byte
times: 4 · (10 · 868 + 1) = 34724 clocks (347 µs). A 10 µs window is short
next to that. If a host wants more averaging per point, `N_AVG` can grow up to
about 34000 without slowing a series. Keep it a multiple of 10. The
accumulator width follows from `N_AVG`, and the sum is divided by `N_AVG`, so
the scale of the result does not change.

## Converter configuration port (SPI)

The board header carries SCLK, SDI, SDO and the chip selects CS_SRC, CS_UP and
CS_DN, for the signal source and the up and down converters. The register maps
of those chips are not part of this design. `spi_master` is therefore a generic
frame engine: a request gives a target (`spi_target_e`) and a 24-bit word. The
word is shifted out MSB first in SPI mode 0 (SCLK idles low, 10 MHz by
default). The 24 bits that come back on MISO in the same frame are returned on
`spi_rsp_data_o`. The request port is a top-level port, because nothing in the
FPGA is specified to drive it. Change `SPI_W` and `SPI_HALF` to fit the actual
chips. Which header pin is MOSI and which is MISO depends on the board wiring.

## Top-level interface

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 100 MHz clock; asynchronous active-low reset |
| `uart_rx_i` / `uart_tx_o` | in/out | 1 | Serial link to the USB bridge |
| `start_btn_i` | in | 1 | Start input (asynchronous, synchronised inside) |
| `dac_o` | out | 14 | Signed DAC code |
| `adc_i` | in | 12 | Signed ADC code, registered on entry |
| `led_ready_o`, `led_busy_o` | out | 1 | Idle / acquisition running |
| `result_valid_o`, `result_o` | out | 1, 32 | Each result as `iq_t {re, im}` |
| `sat_o` | out | 1 | The last result was clamped |
| `spi_req_valid_i/ready_o/target_i/data_i` | | 1/1/2/24 | SPI request |
| `spi_rsp_valid_o`, `spi_rsp_data_o` | out | 1, 24 | SPI response |
| `spi_sclk_o`, `spi_mosi_o`, `spi_miso_i`, `spi_cs_n_o[2:0]` | | | SPI pins; cs `[0]` source, `[1]` up, `[2]` down |

| Parameter | Default | Origin |
|---|---|---|
| `FTW` | 429496730 | 10 MHz tone at 100 MHz: from the design |
| `N_AVG` | 1000 | own choice (100 whole periods) |
| `AVG_SHIFT` | 8 | own choice (full scale fits 16 bits) |
| `SETTLE` | 64 | own choice |
| `N_POINTS` | 1 | own choice |
| `CLKS_PER_BIT` | 868 | own choice (115200 baud) |
| `SPI_HALF` | 5 | own choice (10 MHz SCLK) |

The design fixes the 100 MHz clock, the 10 MHz IF, the 14-bit DAC, the 12-bit
ADC, the 16-bit results, the real-then-imaginary output order, the start command
from the host and the three SPI chip selects. Everything else listed above is a
choice made in this implementation.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_waveform_gen` | Every DAC code against `round(8191·sin(2π·a/1024))`, with `a` computed from `n·FTW`; ten samples per period; rest at 0; restart from phase 0 |
| `tb_phase_shift90` | All 1024 table addresses plus random phases against a cosine |
| `tb_mixer` | Random and extreme signed operands |
| `tb_averager` | Random windows with gaps in `in_valid`; truncation; both clamps; extra products ignored; latency |
| `tb_acq_ctrl` | Settle time; byte order; `N_POINTS = 3`; ignored re-start; generator on/off |
| `tb_uart_tx`, `tb_uart_rx` | Frames decoded and produced by independent models; bit timing; framing error; glitch rejection |
| `tb_spi_master` | Slave models on each chip select: word received, read-back, clock count, frame length, other chips untouched |
| `tb_if_dad_top` | End to end at **default parameters** (see below) |
| `tb_if_dad_points` | A 17-point series from one start (see below) |

`tb_if_dad_points` builds the top with `N_POINTS = 17` and starts it once.
Between points it steps the echo phase by 30°, like a host session that plots a
series. It checks the 17 results and 68 bytes, each phase, and the exact spacing
of results set by the serial link.

`tb_if_dad_top` replaces the analog path with a return model: a generator locked
to the board's 10 MHz whose amplitude and phase the test sets. It sends start
bytes as a host would and decodes the serial output. It runs a calibration, an
attenuation sweep from 0 to −50 dB in 10 dB steps, a phase sweep from 0° to 180°
and from −150° back to 0° in 30° steps, a saturating square-wave echo, a
board-input start with an ignored second start, and SPI frames to all three
chips. It counts every mechanism and fails if one never happened. It takes
under a second.

The return model is noiseless and has no delay. Noise, filter group delay and
converter non-linearity are not modelled. So the test shows that the logic is
correct, not how accurate the board is.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/if_dad_pkg.sv tb/tb_if_dad_top.sv --top-module tb_if_dad_top -o sim
./obj_dir/sim
```

Replace `tb_if_dad_top` with any other testbench name.

## Departures and open points

* **Magnitude.** The mean of the product is built, so each part is A/2 times the
  reference amplitude. A magnitude of A/√2 would need a different scaling.
  Either way the scaling is a constant, and attenuation in dB is unaffected.
* **Sign of the imaginary part.** The 90° reference leads the transmitted sine,
  so that a positive phase shift gives a positive imaginary part.
* **One channel.** The board has two output and two input connectors. This
  design drives one DAC channel and reads one ADC channel.
* **Start command.** Any byte starts an acquisition; no command set is defined.
  The board-input start allows operation without a host command.
* **SPI.** The register contents for the converters are not defined here. The
  master sends whatever words it is given.
* **No processor.** All sequencing is in hardware (`acq_ctrl`); no soft
  processor is used.
* **ADC/DAC coding** is two's complement at the ports. If the converters use
  offset binary, invert the MSB at the pins.
* **Warnings.** Verilator lint reports some unused package constants and
  unused low phase bits in `phase_shift90`, which needs only the table-address
  bits. It also reports `rst_n` being used both as an asynchronous reset and in
  the `disable iff` of assertions. None of these affects the circuit.
