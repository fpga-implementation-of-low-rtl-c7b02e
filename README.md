# Memory-based digital QPSK modulator with LTC2624 DAC output

A conventional digital QPSK transmitter builds every symbol at run time:
it splits the data into I and Q streams, maps them to ±1, multiplies them
with cosine and sine carriers from a direct digital synthesiser (DDS), and
adds the two products. This design drops the DDS and the multipliers.
Because QPSK has only four possible symbols, one carrier period of each
finished waveform is stored in its own small memory. The 2-bit symbol then
only has to pick which memory plays. The aim is lower power on an FPGA:
there is no continuously running phase accumulator and no carrier mixing,
and only one of the four stores is active at a time.

The RTL targets a Spartan-3E Starter Kit style board. The modulated samples
go through a root-raised-cosine (RRC) interpolator and leave the FPGA over
SPI to DAC A of the on-board LTC2624. The design follows the published
description of this modulator (Digital_QPSK). Everything the publication
leaves open was chosen here. Those choices are listed under
[Departures and choices](#departures-and-choices).

## Signal chain

```
            bit_req (2 per symbol)
      +-------------------------------+
      v                               |
  pn_gen --bit--> demux_1to2 --pair--> qpsk_modulator --sample--> rrc_tx_filter --> DAC code --> dac_spi_master --> dac_cs
 (LFSR)          (serial -> 2 bits)    | symbol control  |  20 bit   (x4 up-sampling)  (12 bit)   (24-bit frames)     dac_sck
                                       | phase_ram x4    |                                                           dac_mosi
                                       | mux_4to1        |
                                       +-----------------+
```

| Module            | Role |
|-------------------|------|
| `qpsk_pkg`        | Shared widths and types. Elaboration-time function `qpsk_sample` that defines the stored waveforms. |
| `pn_gen`          | 7-bit LFSR (x^7 + x^6 + 1, period 127) that produces the test data. |
| `demux_1to2`      | Pairs consecutive serial bits: the first bit is I, the second is Q. |
| `phase_ram`       | One 100-sample carrier period for one symbol, with its own address counter. |
| `mux_4to1`        | Routes the selected store's sample to the output. |
| `qpsk_modulator`  | Symbol controller plus four `phase_ram` instances and the `mux_4to1`. |
| `rrc_tx_filter`   | 25-tap polyphase RRC interpolator: alpha 0.5, 4 outputs per input. |
| `dac_spi_master`  | LTC2624 write-and-update frames, MSB first, SCK = clk/2. |
| `digital_qpsk`    | Top level. Board pins as listed below. |

## The four waveform stores

This is the core of the design. Store k serves symbol value k and holds
`DEPTH = 100` signed 20-bit samples:

```
q_k[n] = sI * round(A*cos(2*pi*n/100)) + sQ * round(A*sin(2*pi*n/100)),   A = 65534
sI = +1 if the I bit (symbol[1]) is 1, else -1
sQ = +1 if the Q bit (symbol[0]) is 1, else -1
```

The sum equals `sqrt(2)*A*cos(2*pi*n/100 + phase)`, which puts the symbols
at these phases:

| Symbol (I Q) | Store  | Phase   | Stored waveform |
|--------------|--------|---------|-----------------|
| 00           | RAM 1  | 135°    | -cos - sin      |
| 01           | RAM 2  | 225°    | -cos + sin      |
| 10           | RAM 3  | 45°     | +cos - sin      |
| 11           | RAM 4  | 315°    | +cos + sin      |

The peak is about ±92 680, which fits in 20 bits with room to spare. The
tables are computed when the design is elaborated (`$cos` and `$sin` in a
constant function), so no data file is needed. In synthesis each store is a
100 x 20 ROM. The publication calls the stores RAMs but describes no way to
write them, so they are read-only here.

Each store has its own 7-bit address counter. It advances only in the
cycles where that store plays, and it wraps from 99 to 0. Reset puts every
counter at 99. An idle store therefore sits at 99, and the store selected
next starts at 0 on its first step. This matches the published simulation
traces.

## Symbol timing and where the bits come from

- A symbol lasts exactly one pass through a store: 100 samples, one carrier period.
- The modulator *steps* once per sample that its consumer takes
  (`smp_valid & smp_ready`). The first step after reset happens on its own,
  to fill the pipeline.
- On the step that crosses a symbol boundary, the symbol register loads the
  pair that the demultiplexer last completed. Only the store selected for
  the coming sample advances.
- `bit_req` pulses on the step into sample 0 and on the step into sample 50.
  It advances the LFSR and clocks the demultiplexer. Two bits are therefore
  collected during each symbol and played as the next symbol. This gives the
  QPSK relation Ts = 2·Tb.
- The first symbol after reset is 00, because the demultiplexer resets to 00.
  From then on, symbol s ≥ 1 is {PN bit 2(s-1), PN bit 2(s-1)+1}.
- When `smp_ready` is held high, the core gives one sample per clock and one
  symbol per 100 clocks. With an 8 ns clock that is 800 ns per store pass,
  as in the published run.

An assertion checks that the selected store's counter always equals the
symbol's sample index.

## RRC pulse-shaping interpolator

The publication asks for an RRC transmit filter that shapes the pulse and
up-samples the waveform. It gives no roll-off, length or factor. This design
uses:

- roll-off alpha = 0.5 (`ALPHA_PCT`);
- up-sampling factor L = 4;
- an impulse response over 6 input periods: 25 taps, computed at elaboration
  and quantised to 16 bits with 14 fractional bits;
- tap scaling so that the taps sum to L, which gives each polyphase branch a
  gain of about 1;
- rounding of the output back to 20 bits, with saturation.

The filter holds 7 input samples. After taking an input it produces the four
outputs `y_p = sum_j h[p + 4j]·x[j]` for p = 0..3, one per output handshake.
It takes the next input only after the fourth output (`in_ready = !have`).
The RRC response is not itself Nyquist, so a constant input comes out
slightly different in the four phases (within about 3 %).

## DAC link

`dac_spi_master` sends each 12-bit code as one LTC2624 frame, MSB first.

| FRAME_BITS | Bits, first to last |
|------------|---------------------|
| 24 (default) | `0011` (write and update) · `0000` (DAC A) · code[11:0] · `0000` |
| 32           | eight `0` bits, then the same 24 bits |

Timing of one frame:

- On the clock that accepts a code, `dac_cs` falls and bit 23 appears on `dac_mosi`.
- Each bit takes two clocks: one with `dac_sck` low, one with it high.
  `dac_mosi` changes only together with a falling SCK and is stable for a
  full clock before each rising edge, where the DAC samples it.
- After the last high phase, `dac_cs` rises while SCK falls. It stays high for at least one clock.
- Back-to-back frames repeat every 49 clocks (65 clocks for 32-bit frames).

Two assertions check the SPI pins:

- SCK never pulses while CS is high.
- CS changes only while SCK is low.

Filter output to DAC code: `code = clamp((y >>> DAC_SHIFT) + 2048, 0, 4095)`,
with DAC_SHIFT = 6. This is offset binary around mid-scale. The default
amplitude gives codes of roughly 600 to 3500. DAC A then outputs
`Vout = code/4096 · 3.3 V`.

The top also drives the other devices on the board's shared SPI bus to
their inactive levels:

- `spi_ss_b`, `amp_cs`, `sf_ce0` and `fpga_init_b` are held at 1.
- `ad_conv` is held at 0.
- `dac_clr` is held at 1, so the DAC is never cleared.

## Pacing and rates

The chain is pulled from the DAC end:

- the SPI master takes one filter output per frame (49 clocks);
- the filter takes one modulator sample per 4 outputs;
- the modulator requests two bits per symbol.

One symbol therefore takes 100 × 4 × 49 = 19 600 clocks. At 50 MHz that is
392 µs, so the carrier (one period per symbol) is 2.55 kHz and the bit rate
is 5.10 kHz. Every stored sample reaches the DAC.

The publication also quotes a 13 kHz carrier with a 3.25 kHz input bit
rate. That would be 8 carrier periods per symbol, which its own waveform
traces (one store pass per symbol) do not show. This design follows the
traces. To change the rates, change the clock, L or the SPI frame length.

## Top level `digital_qpsk`

| Port | Dir | Meaning |
|------|-----|---------|
| `clk` | in | board clock (50 MHz on the target board) |
| `reset` | in | synchronous, active high |
| `dac_cs`, `dac_sck`, `dac_mosi` | out | SPI to the LTC2624 |
| `dac_clr` | out | 1 |
| `spi_ss_b`, `amp_cs`, `sf_ce0`, `fpga_init_b` | out | 1 (other SPI devices off) |
| `ad_conv` | out | 0 |

Parameters and their defaults:

| Module | Parameter | Default | From |
|--------|-----------|---------|------|
| `qpsk_modulator`, `phase_ram` | `N` / `DEPTH` | 100 | publication |
| | `SAMPLE_W` | 20 | publication |
| | `AMPL` | 65534 | publication |
| `pn_gen` | `LFSR_W`, `TAPS`, `SEED` | 7, 7'h60, all ones | this design |
| `rrc_tx_filter` | `L`, `SPAN`, `ALPHA_PCT`, `COEF_W`, `COEF_FRAC` | 4, 6, 50, 16, 14 | this design |
| `dac_spi_master` | `FRAME_BITS` | 24 | publication |
| | `CMD` | 0011 | publication |
| | `DAC_ADDR` | 0000 | publication |
| `digital_qpsk` | `DAC_SHIFT` | 6 | this design |

Synthesised with default parameters, the top has about 90 flip-flops, four
100 × 20 ROMs and 7 multipliers in the filter.

## Departures and choices

Taken from the publication:

- four stores of 100 20-bit samples;
- the symbol-to-phase table above;
- one store pass per symbol, with idle counters at 99;
- the PN source, 1-2 demultiplexer and 4-1 multiplexer structure;
- an RRC filter ahead of the DAC;
- the 24-bit LTC2624 frame (command 0011, DAC A, MSB first, sampled on the
  rising SCK, SCK at half the clock);
- the top-level port list and the fixed board-signal levels.

Chosen here:

- **Waveform tables.** The published sample table shows DDS quantisation
  artefacts, such as the cosine staying at 65534 for four samples. Here the
  tables are exactly rounded cosine and sine.
- **Symbol mapping.** An introductory constellation sketch in the
  publication puts 00 in the first quadrant. Its RAM table puts 00 at 135°.
  The RAM table is followed. The first bit of a pair is I and the second is
  Q, as the publication states. Its "odd"/"even" labels contradict each
  other, so they are not used.
- **PN source.** The LFSR length, polynomial and seed are chosen here, and
  the LFSR steps only on request.
- **Handshakes and reset.** The valid/ready handshakes, the reset values
  (first symbol 00) and the synchronous active-high reset are chosen here.
- **RRC filter.** All RRC parameters and the polyphase structure are chosen
  here. One passage of the publication suggests that the DAC receives the
  raw stored samples, while its block diagram places the filter in the
  path. The block diagram is followed.
- **DAC code.** The conversion from the signed sample to the 12-bit DAC code is chosen here.
- **CS gap.** The one-clock CS-high gap between frames is chosen here.
- **Not built.** Parts outside the FPGA logic are not modelled in RTL: the
  LTC2624 itself, the oscillator, the external RF up-converter, and the
  up-conversion, AWGN channel and coherent demodulator. The publication
  builds the last three in a MATLAB simulation. A behavioural model of the
  DAC's SPI side, `tb/ltc2624_model.sv`, exists for the testbench only.
- **Power.** The power comparison (44 mW against 76 mW for a DDS-based
  modulator) is a vendor-tool estimate and is not reproduced.

## Verification

Every testbench checks its block against values it works out itself and
ends with a line `TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|-----------|----------------|
| `tb_pn_gen` | Output against the recurrence o[k] = o[k-7] ^ o[k-6]; period 127 with 64 ones; hold while idle; reseed on reset. |
| `tb_demux_1to2` | Random bits at random times; pair order; one-clock `pair_valid`; pair holds between pulses. |
| `tb_phase_ram` | All four stores against `sqrt(2)·A·cos(2πn/100 + phase)` within 2 LSB; counter reset, hold and wrap. |
| `tb_mux_4to1` | Random routing. |
| `tb_qpsk_modulator` | 60 symbols of random bits with and without consumer stalls; every sample against the phase formula; symbol order; 100 clocks per symbol; two bit requests per symbol; idle stores at 99. |
| `tb_rrc_tx_filter` | Exact match with an integer model built from its own RRC formula; symmetric taps, tap sum and peak; unity DC gain; four outputs per input; stalls. |
| `tb_dac_spi_master`, `tb_dac_spi_master_32` | A receiver decodes the frames. Checks command, address, code and padding; SCK = clk/2; MOSI stable at the rising edge; 48 (64) clocks with CS low; 49 (65) clocks per frame. |
| `tb_digital_qpsk` | End to end at default parameters: 24 symbols (9600 DAC frames), each against a reference model of the whole chain within 1 LSB; board-signal levels; 49 clocks per frame; 19 600 clocks per symbol. It requires each symbol value, a symbol change, a repeated symbol, all four filter phases and output on both sides of mid-scale to occur at least once. |

To run a testbench with Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/qpsk_pkg.sv tb/tb_digital_qpsk.sv --top-module tb_digital_qpsk
./obj_dir/Vtb_digital_qpsk
```

Replace the testbench name to run another one. The end-to-end test runs in
under a second.
