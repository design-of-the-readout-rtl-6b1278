# METPC: a photon-counting pixel readout with four energy bins and charge-sharing correction

METPC is the readout chip of a hybrid X-ray detector for spectral imaging. Every pixel counts the
photons that hit it and sorts each one into four energy bins, so that one exposure gives four
images, one per energy window. The hard part is charge sharing. With a 110 µm pixel, a
photon that lands near a pixel edge or corner splits its charge over two or four pixels. A
plain counter would then record two or four low-energy photons instead of one photon at the right
energy. METPC avoids that in two steps:

* **Energy from a summing node.** At each corner shared by four pixels, the analog front ends
  add their charges. The time this summed signal stays above the discriminator threshold is its
  time over threshold (ToT), and it measures the full photon energy.
* **Position from arbitration.** Each pixel also has a local ToT from its own charge. A pixel
  takes the photon only if its local ToT lasts at least as long as the local ToT of every one of
  its eight neighbours. Exactly one pixel wins, and it counts the summed energy.

This repository holds the digital part of the chip in synthesizable SystemVerilog: the per-pixel
logic, the 112 × 8 pixel matrix, SPI configuration, and seven serial readout channels with CRC-32,
8b10b coding and a DDR serializer. The analog front end is not included: the preamplifiers, shapers,
discriminators, threshold DACs, LVDS drivers and pads. Its discriminator outputs, the local and sum
ToT pulses, are inputs of the top level.

## Pixel: what happens to one photon

`pixel_digital` joins six small blocks. Each event goes through a fixed sequence, and every
step is one clock of `clk`, the 100 MHz ToT clock in the chip:

1. **OR gates** (`tot_or_gate`). One OR combines the nine local ToTs of the 3 × 3 neighbourhood
   (`local_or`). A second OR combines the four sum ToTs of the summing nodes at the pixel's four
   corners (`sum_or`).
2. **Arbitration** (`compare_logic`). A four-state machine:
   * **IDLE.** It leaves IDLE when `sum_or` rises and the shutter is open.
   * **COUNT.** It stays here while `sum_or` is high and records two flags:
     * *seen*: its own local ToT was high at some point;
     * *lost*: the neighbourhood OR was high while its own local ToT was already low, so some
       neighbour's ToT outlasted it.
   * **COMPARE.** One clock after `sum_or` falls, the state machine moves here. `hit` is high
     for this one clock if *seen* is set and *lost* is not.
   * **RESET.** One clock that clears the ToT counter; then back to IDLE.

   All local ToTs of one photon start together, so "lasts at least as long" is the same as
   "ends last". A tie lets both pixels count; the design does not break ties.
3. **ToT counter** (`tot_counter`). A 5-bit counter counts clocks while `sum_or` is high. At
   100 MHz the full range is 310 ns. The counter stops at 31 instead of wrapping, so a 320 ns
   pulse still lands in the top bin.
4. **Digital thresholds** (`digital_threshold`). The count is compared with the four 5-bit
   thresholds in the configuration word. The thresholds are the edges of four energy bins and
   should be programmed in ascending order. On a hit, the cycle after COMPARE gives a one-clock
   write pulse to the counter of the bin the energy falls into: counter *k* takes
   `thr[k] < energy <= thr[k+1]`, and counter 3 takes everything above `thr[3]`. Energies at or
   below `thr[0]` are not counted. The parameter `WINDOWED = 0` switches to integral counting
   instead: counter *k* then counts every hit above `thr[k]`. Masked pixels produce no write
   pulses.
5. **Energy-bin counters** (`energy_bin_lfsr`). There are four 12-bit linear-feedback shift
   registers:
   * **Counting.** While the shutter is low, a write pulse advances the register by one LFSR
     step. The feedback is XNOR, so the all-zero reset value is a valid state.
   * **Polynomial.** It is x¹² + x¹¹ + x¹⁰ + x⁴ + 1, taps on bits 11, 10, 9 and 3, which is
     maximal length: 4,095 distinct counts.
   * **Readout.** While the shutter is high, the same register is a plain shift register: `rd`
     shifts it toward bit 11, and bit 11 is the serial output.
   * **Decoding.** A count is recovered by stepping the LFSR from zero until it matches the word.
     The testbenches do this with `lfsr_count()` in `tb/tb_util_pkg.sv`; a real system would
     use a 4,096-entry table.
6. **Configuration register** (`config_register`). A 30-bit shift register, written while
   `cfg_sel_n` is low. It holds:

   | bits   | field |
   |--------|-------|
   | 4:0    | threshold 0 (lowest) |
   | 9:5    | threshold 1 |
   | 14:10  | threshold 2 |
   | 19:15  | threshold 3 |
   | 27:20  | 8-bit code for the pixel's analog DAC (`dac_code` output) |
   | 28     | mode bit (`mode` output) |
   | 29     | mask |

   New bits enter at bit 29 and leave at bit 0 into the next pixel of the column.

**Timing of one event**, counted from the clock edge where `sum_or` falls:
* `hit` is high one cycle later;
* the counter write pulses follow one cycle after that;
* the pixel is idle again two cycles after `hit`.

The whole dead time is therefore the sum-ToT length plus three clocks.

**Shutter.** While the shutter is high (the readout phase), arbitration is off and new photons are
ignored.

## Matrix wiring: which pulses a pixel sees

`pixel_matrix` places 112 columns × 8 rows of pixels. Pixel (c, r) has flat index `c*ROWS + r` in
every packed port. How the ToT pulses reach each pixel is the part most worth understanding before
changing anything:

* **Summing nodes.** The node indexed (c, r) is the corner shared by pixels (c, r), (c+1, r),
  (c, r+1) and (c+1, r+1). Its ToT pulse comes in as `sum_tot[c*ROWS + r]`. So pixel (c, r) sees
  four nodes: (c, r), (c−1, r), (c, r−1) and (c−1, r−1). Nodes past the last row or column carry
  no pulse, so the top row and the last column have no node of their own.
* **Neighbourhood.** Pixel (c, r) receives its own `local_tot` and those of its eight neighbours.
  A missing neighbour at the matrix edge reads as 0.
* **Configuration chain.** Each column has one chain. `cfg_in[c]` enters the row-0 pixel, and the
  bits move up through rows 1 … 7. The last pixel's output is left open. To load a column, send
  the top row's 30 bits first, bit 0 first, and row 0's bits last: 240 bits per column.
* **Readout chain.** Each column also has a 384-bit readout chain (8 rows × 4 counters × 12 bits).
  Inside a pixel the bits pass from the pixel above into counter 0, then counters 1, 2 and 3, then
  down to the next pixel. The chain leaves at row 0 (`rd_out[c]`). The first bits out are row 0's
  counter 3, MSB first, then its counters 2, 1, 0, then row 1, and so on. Zeros are shifted in at
  the top, so the counters read as zero afterwards, ready for the next frame.

## Configuration over SPI

`spi_slave` is a mode-1 slave (CPOL = 0, CPHA = 1), MSB first, 16-bit words:

| bits  | field |
|-------|-------|
| 15:13 | section (0–6) |
| 12:9  | column within the section (0–15) |
| 8     | unused |
| 7:0   | data byte |

* **Sampling.** The SPI lines are oversampled by the system clock through two-flop synchronisers,
  so SCLK must be at most 1/8 of `clk`. The chip runs SCLK at clk/16, 20 MHz.
* **Edges.** SDI is taken on the falling SCLK edge, and SDO changes on the rising edge.
* **SDO.** It echoes the previous complete word and is held low when SS_n is high.

`config_loader` takes each received word, selects the addressed column by pulling its `cfg_sel_n`
low, and shifts the data byte into that column's chain, MSB first, one bit per clock. A column
needs 30 words. Words with an address outside the matrix are dropped and flagged on `addr_err`.
All columns share one data line (`cfg_data`); only the selected column moves.

## Readout: shutter, sections and the serial frame

Taking the shutter high ends the exposure. Its rising edge starts all seven sections at once. A
section is 16 columns with its own serial output (`sdout[s]`), built from four blocks in series.

1. **`column_readout`.** Reads the 16 columns one after another, one bit per clock, and packs
   the bits into 32-bit words, first bit in bit 0. A section gives 16 × 384 = 6,144 bits = 192
   words. If the next stage is not ready, shifting pauses.
2. **`crc32_gen`.** A running CRC-32 with polynomial 0x04C11DB7 over the data words:
   * it starts from 0xFFFFFFFF at each frame;
   * each word is fed MSB first, in one clock;
   * there is no bit reflection and no final inversion.

   After the last data word, the CRC is sent as one more word.
3. **`enc_8b10b`.** A standard 8b10b encoder with running disparity, which can also send the
   control symbols.
4. **`ddr_serializer`.** Takes a 32-bit word and sends bytes 0 to 3 in order. Each byte goes
   through the encoder, and the 10-bit symbol is split into even and odd bits:
   * the even bits go into a shift register clocked on the falling edge;
   * the odd bits go into one clocked on the rising edge;
   * `clk` selects between the two registers, so the line carries two bits per clock, LSB first.

   When no word is waiting, it sends K28.5 comma symbols, which a receiver uses to find symbol
   boundaries.

**A frame** on each line is therefore: commas, 192 data words (768 symbols), one CRC word (4
symbols), and commas again. `readout_busy[s]` is high from the shutter edge until the CRC word has
been handed to the serializer.

**Throughput.** A 32-bit word takes 20 clocks on the line, but 32 clocks to shift out of the
columns. The column shifting therefore sets the pace: about 6,170 clocks per frame, 6,169 in the
full-size test. That is 19 µs at 320 MHz or 62 µs at 100 MHz, far inside the 1 ms frame of a
1,000 frame/s system.

**Unpacking a frame.** The data words of section *s* form a bit stream: word 0 bit 0 first.
Split it into 16 column blocks of 384 bits; within each, the order is the chain order given above.

## Clocking

The whole design runs on one clock, `clk`, with an asynchronous active-low reset `rst_n`. The
original chip uses two:
* a 100 MHz ToT clock in the pixels;
* a 320 MHz clock for the serializer and SPI logic, which gives its 640 Mb/s per section and the
  20 MHz SCLK.

Their common divider is not specified well enough to build. With one clock, the ToT scale and the
line rate are tied together: at 100 MHz, ToT counts are 10 ns but the line runs at 200 Mb/s. A
two-clock version would need a clock-domain crossing between the column readout and the
serializer, for example an asynchronous FIFO; none is built here. The LFSR counters use a clock
enable instead of the clock multiplexer of the original (write pulses while counting, readout
clock while shifting). The behaviour is the same.

## Where this RTL departs from, or fills in, the original description

* **LFSR polynomial.** The polynomial above is the one stated for the counters. A count sequence
  printed with the original's simulation (0, 1, 2, 5, 11, 22, 45, …) instead matches XNOR feedback
  from bits 0, 2, 4 and 11. That register repeats after only 1,302 states, too few for the required
  counting depth. `energy_bin_lfsr` keeps the taps as a parameter (`TAPS`). `tb_energy_bin_lfsr`
  shows that `TAPS = 12'h815` reproduces that sequence.
* **Shutter polarity.** Counting happens while the shutter is low and readout while it is high,
  as in the detailed logic description. An earlier overview states the opposite.
* **Energy bins.** A hit advances only the counter of its bin, following the description of the
  counting logic. A counter simulation shown with the original has the write pulses of the higher
  bins nested inside those of the lower ones, which fits integral counting instead. That mode is
  available as `WINDOWED = 0`. "Above a threshold" is read as strictly greater.
* **CRC variant.** The initial value, bit order and absence of reflection and final XOR come from
  reference values the original lists for a word sequence. `tb_crc32_gen` checks all six of them.
* **Frame format.** Commas when idle, and the CRC as a trailing word, are this design's choice. The
  original does not specify any framing.
* **Readout start** on the shutter's rising edge, the one-bit-per-clock column shift, and the
  32-bit packing order are this design's choices.
* **Arbitration details.** Ties, the one-clock `hit` and the exact state timing are this design's
  choices. The states and their roles follow the original.
* **SPI.** Only writing is built. The original also mentions read transfers, but gives neither
  their command encoding nor what they return. The echo latency of one word is this design's
  choice.
* **Not built:**
  * the analog front end (charge amplifiers, shapers, discriminators, the per-pixel DAC, and the
    mode bit's analog effect);
  * the LVDS transceivers and pads;
  * the clock divider.

  The DAC code and the mode bit are brought out as ports (`dac_code`, `mode`) so that a front-end
  model can use them.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `metpc_top` | `COLS`, `ROWS`, `SECTIONS` | 112, 8, 7 | matrix size; `COLS` must be a multiple of `SECTIONS` and at most 16 columns per section, to fit the SPI address |
| `pixel_digital` | `NTHR`, `TOT_W`, `CNT_W`, `CFG_BITS`, `TAPS` | 4, 5, 12, 30, 12'hE08 | thresholds, ToT width, counter width, configuration width, LFSR taps |
| `digital_threshold` | `WINDOWED` | 1 | 1: one counter per energy window; 0: integral counters |
| `column_readout` | `COLS_PER_SEC`, `BITS_PER_COL` | 16, 384 | section width, bits per column chain |
| `crc32_gen` | `POLY`, `INIT` | 0x04C11DB7, 0xFFFFFFFF | CRC definition |
| `spi_slave` | `WORD_W` | 16 | SPI word length |

Shared constants (widths, the configuration field positions, K28.5) are in `rtl/metpc_pkg.sv`.

## Simulating

Every block has a self-checking testbench in `tb/`, named `tb_<module>`. Each prints
`TB_RESULT checks=N failures=M` at the end, and each has a watchdog. Shared helpers are in
`tb/tb_util_pkg.sv`:
* LFSR count decoding;
* a word-wide CRC-32 model;
* a disparity-checking 8b10b decoder;
* comma search in a captured bit stream.

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_metpc_top \
    rtl/metpc_pkg.sv tb/tb_util_pkg.sv rtl/*.sv tb/tb_metpc_top.sv -Mdir obj_top
./obj_top/Vtb_metpc_top +verilator+rand+reset+2
```

Replace `tb_metpc_top` to run another testbench.

The end-to-end test goes through one whole operation:
* configure every pixel over SPI, with a distinct DAC code, random thresholds and one masked
  pixel;
* expose: single-pixel, two-pixel (60/40) and four-pixel (60/15/15/10) events, an over-range
  ToT, a hit on the masked pixel, and a few hundred random clusters;
* read out, capturing every serial line on both clock edges;
* decode the 8b10b symbols and check the CRC of every frame;
* check all four counts of every pixel against a reference model.

It also counts how often each mechanism occurred and fails if one never did.

Its body is in `tb/metpc_top_tb_body.svh`, shared by two testbenches:
* `tb_metpc_top` runs it on a 4 × 4 matrix with 2 sections, in well under a second;
* `tb_metpc_full` runs the default 112 × 8 chip with 7 sections, which takes about two minutes
  of run time.

`tb_workload_rate` runs one pixel through a full 1 ms frame at the chip's specified counting
rate. That rate is 3.63 million photons per second per pixel, 3,630 photons in the frame. Every
photon must give one hit, and the bin counter must read 3,630 afterwards, inside the 4,095 counts
a 12-bit LFSR can hold.

Two points about the simulator matter when writing new tests:
* Verilator has two logic states, so every flip-flop that is read has a reset.
* The tests drive inputs on the falling clock edge.
