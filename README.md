# Digital synchronous demodulator with square-wave references

This RTL measures how the complex amplitude of a narrow-band sine signal
changes over time. Bio-impedance probing is a typical use: a ~100 kHz probing
current is slowly modulated in amplitude and phase by heartbeat and breathing.
Every measurement gives two Fourier coefficients of the input over a whole
number of periods of a reference frequency:

    a(t_i) ~ sum_k x(t_k) * sign(cos w t_k)
    b(t_i) ~ sum_k x(t_k) * sign(sin w t_k)

From these the host computes the peak amplitude `sqrt(a^2 + b^2)` and the phase
`-atan(b/a)`.

The main idea is to replace the sine and cosine references with **square
waves** R_C and R_S that take only the values +1 and -1. A multiplier is then
just an add/subtract control. The whole demodulator becomes two 24-bit
accumulators that run on the ADC clock. There are no multipliers and no
sine tables. The price is that odd harmonics of the input are not rejected.
For a clean narrow-band input this error is small, and this design does no
correction for it.

## Block structure

```
 adc_data[11:0] ──► offset→2's compl. ──► processing_block ─────────► readout_fifo ─► host_interface ◄──► host bus
 (10 MHz, from ADC)                       ├ data_accumulator (R_C) → a    20480 x 24     (bytes, status,
                                          ├ data_accumulator (R_S) → b                    registers)
                                          └ readout_mux (a, then b)
                                                ▲ en/load/dump/sel   ▲ wr          │ reg writes
 ref_gen ── R_C, R_S ───────────────────────────┘                    │             ▼
  ▲  └── period_start ──────────────────► control_circuit ───────────┘◄── ext_trig
  └──────────── quarter (setting) ────────────┘
```

| Module | Role |
|---|---|
| `dm_processor` | top level; everything runs on one clock, nominally 10 MHz |
| `ref_gen` | frequency divider that makes R_C, R_S, the probing output and a period-start mark |
| `processing_block` | two `data_accumulator`s and the `readout_mux` |
| `data_accumulator` | 24-bit signed add/subtract accumulator with a result register |
| `readout_mux` | 2:1 select of the a or b result for the FIFO |
| `readout_fifo` | 20480 words × 24 bits, which is 10240 readouts |
| `control_circuit` | settings registers, triggering, interval timing, FIFO writes |
| `host_interface` | asynchronous byte bus to a PC, for example through a parallel-port adapter |
| `dm_pkg` | widths, enums, the settings struct and the register map |

The ADC and the clock oscillator are outside this RTL. `adc_data` is the
converter's parallel output, sampled on the same edge as the references. `clk`
is the sampling clock. Converter pipeline delay only adds a fixed phase
offset, which is the same in every readout.

## The reference generator

The reference period is `4 × quarter` clocks, so f_ref = f_clk / (4·quarter).
At 10 MHz:

| quarter | f_ref |
|---|---|
| 50 | 50.00 kHz |
| 26 | 96.1538 kHz (reset value) |
| 25 | 100.0 kHz |
| 17 | 147.06 kHz |

The intended range is 50 to 150 kHz. 150 kHz itself falls between quarter = 17
and quarter = 16 (156.25 kHz).

Inside the divider, a quarter counter steps a 2-bit Gray counter through
00 → 01 → 11 → 10. The two Gray bits, inverted, are the references:

| quadrant | R_S (sign sin) | R_C (sign cos) |
|---|---|---|
| 0 | +1 | +1 |
| 1 | +1 | −1 |
| 2 | −1 | −1 |
| 3 | −1 | +1 |

Both references therefore come straight out of flip-flops, and `ref_out`, the
square wave to be low-pass filtered into the probing signal, is free of
glitches. `ref_out` carries R_S. `period_start` is high in the first clock of
quadrant 0. When the quarter setting is written, the divider restarts at the
start of a period. Change it only while measurements are stopped.

## How a measurement is timed

This part needs the most care. The behaviour lives in `control_circuit`.

* **Whole periods.** A measurement starts in a `period_start` clock and lasts
  exactly N = 2, 4, 8 or 16 reference periods, which is N·4·quarter samples.
* **Triggers.** A trigger makes one measurement *pending*. The pending
  measurement starts at the next period boundary at which the accumulators are
  free. There are three trigger modes:
  * `TRIG_CONT`: always pending while `run` = 1. Measurements follow each
    other with no gap.
  * `TRIG_INT`: a timer fires every `trig_period` clocks, the first time as
    soon as `run` is set. The default evaluation uses 1761 clocks (0.1761 ms)
    with N = 16 (1664 clocks). Starts then snap to the next boundary, so the
    spacing between readouts varies by up to one period but averages
    `trig_period`.
  * `TRIG_EXT`: a rising edge on `ext_trig`. The input is synchronised by two
    flip-flops; the measurement starts at the first boundary that comes
    3 or more clocks after the edge. A trigger that arrives while one is already pending is
    merged into it.
* **No lost sample between readouts.** At the boundary that ends a measurement,
  `acc_dump` copies both running sums into the result registers. In the same
  clock `acc_load` restarts the sums from the boundary sample if another
  measurement is pending. The readout rate can therefore reach f_ref/2. With a
  100 kHz reference and N = 2 that is one readout every 200 clocks, or 50 kHz.
* **Writing the FIFO.** In the two clocks after a dump, the multiplexer writes
  a, then b. If the FIFO does not have room for both words, the readout is
  dropped whole and the sticky `overflow` status bit is set. Half a readout is
  never stored.
* **Readout limit.** If `limit` is not 0, a run starts at most `limit`
  measurements and then reports `done`. This allows burst operation, such as
  10 000 readouts at 50 kHz collected in the FIFO and read out later. Writing
  `run` from 0 to 1 starts a new cycle.
* **Stopping.** Clearing `run` abandons a measurement in progress. Nothing is
  written for it.
* **Ancillary outputs.** `meas_active` is high while accumulating.
  `readout_strobe` pulses in the dump clock. Both are meant for other parts of
  an instrument, such as analog input multiplexers that must switch between
  measurements.

Sum range: at most 16 periods × 200 clocks × 2048 = 6 553 600 < 2^23, so the
24-bit accumulators cannot wrap anywhere in the frequency range. The words are
raw sums. The 2/N scaling of the Fourier estimate is left to the host.

## Host bus and register map

The host side is asynchronous: `host_addr[3:0]`, `host_din[7:0]`,
active-low `host_wr_n` and `host_rd_n`, plus `host_dout[7:0]` with an enable
`host_dout_en` for an external tri-state driver. Rules:

* Address and data must be stable while a strobe is low.
* Each strobe must be low, and high between strobes, for at least 4 clocks.
* A write happens once per `host_wr_n` pulse.
* For a read, `host_dout` is valid from about 3 clocks after `host_rd_n`
  falls. The data register advances when `host_rd_n` rises again.

| addr | name | access | content |
|---|---|---|---|
| 0 | CTRL | R/W | [0] run, [2:1] mode (0 cont, 1 internal, 2 external), [4:3] N code (0..3 → 2, 4, 8, 16); writing [5]=1 clears the FIFO and `overflow` |
| 1 | QUARTER | R/W | quarter period in clocks |
| 2/3 | TPER_L/H | R/W | internal trigger period, clocks |
| 4/5 | LIMIT_L/H | R/W | readouts per run, 0 = no limit |
| 6 | STATUS | R | [0] data available, [1] overflow, [2] measuring, [3] done, [4] FIFO memory full |
| 7/8 | COUNT_L/H | R | 24-bit words available to read |
| 9 | DATA | R | next byte of the readout stream |

The readout stream is 6 bytes per readout: a[7:0], a[15:8], a[23:16], b[7:0],
b[15:8], b[23:16]. Both words are two's complement. The interface prefetches
the head FIFO word into a holding register. COUNT includes that word, so the
host can read COUNT words at any time, even during a gapless run. Reading DATA
with nothing available returns 0 and does not advance.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `dm_processor.FIFO_WORDS` | 20480 | FIFO depth in 24-bit words; two words per readout |
| `dm_pkg::SAMPLE_W` | 12 | ADC sample width |
| `dm_pkg::ACC_W` | 24 | accumulator width |
| `dm_pkg::QUARTER_W` | 8 | width of the quarter-period setting |
| `dm_pkg::TPER_W` | 16 | width of the internal trigger period |
| `dm_pkg::LIMIT_W` | 16 | width of the readout limit |

`adc_data` is straight offset binary (2048 = mid-scale). The top converts it
by inverting the MSB. If your converter outputs two's complement, remove that
inversion in `dm_processor`.

## What follows the original design and what is chosen here

These points follow the original instrument: the sign-controlled accumulation, two
identical 24-bit accumulators with a multiplexer into a FIFO, 12-bit samples
at 10 MHz, a frequency-divider reference generator (50 to 150 kHz, 96.1538 kHz
in the evaluation), intervals of 2/4/8/16 periods, internal periodic and
external triggering, gapless continuous measurement, a FIFO of 10K 48-bit
readouts read by a PC, and ancillary signals for other instrument parts.

These are this implementation's own choices:

* the divide-by-4·quarter scheme and the Gray quadrant counter;
* R_S as the probing output;
* the result registers and the exact load/dump timing;
* continuous as a separate trigger mode;
* the timer and the readout limit;
* the overflow policy (drop the whole readout);
* the 24-bit FIFO word, with 10K taken as 10240;
* the whole host bus and register map;
* offset-binary input;
* asynchronous active-low reset.

The original hardware split the logic over two small programmable devices and
used a separate FIFO memory chip. Here everything is one synchronous design.
No check was made that it fits devices of that size; in particular, the result
registers add 48 flip-flops.

Not included: the ADC, the oscillator and the host software. The host
software is what computes amplitude and phase from (a, b).

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` at the end and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_ref_gen` | R_C/R_S/period_start clock by clock against an independent phase counter; 4Q period for quarter = 26, 17, 50, 1 |
| `tb_data_accumulator` | random samples, signs and strobes against an integer model; the worst-case sum of 3200 × 2048 |
| `tb_processing_block` | a sampled tone over 2–16-period intervals, and random stimulus; both results and both mux positions |
| `tb_readout_mux` | select logic |
| `tb_readout_fifo` | full depth (20480): fill, drain, random traffic across the wrap, clear; order, count, empty and full against a queue |
| `tb_control_circuit` | interval lengths for every N; dump and load in the same clock; a-then-b writes; internal-trigger start times; external-trigger windows; limit and `done`; overflow and its clear |
| `tb_host_interface` | one write per strobe; register and status readback; byte order; count; empty reads; clear |
| `tb_dm_processor` | whole design at default size (see below) |
| `tb_dm_workloads` | the evaluated setting for 1000 readouts read while running; 10 000 readouts at 50 kHz buffered in the FIFO and read back |

`control_circuit` also carries assertions, active in every simulation run with
`--assert`. They check that intervals open and close only on period
boundaries, and that every readout is written as an a/b pair.

How `tb_dm_processor` works:

* It drives a noisy sine into the ADC port and plays the host over the byte
  bus.
* An independent monitor cuts time into reference periods from the `ref_s`
  output and keeps the signed sums per period. The reference waveform itself
  is checked separately, by `tb_ref_gen`.
* Every readout must equal the sum over N consecutive periods. Its position
  shows when the measurement ran: back-to-back, 0.1761 ms apart, or after an
  external trigger.
* The test also runs 2/4/8/16 periods, reading during a gapless run, a change
  to 147 kHz, the readout limit, filling the FIFO to overflow and clearing it.
  It counts each of these and fails if one never happened.

Run any testbench with plain Verilator. List the package first:

```
verilator --binary --timing --assert -Irtl rtl/dm_pkg.sv \
    $(ls rtl/*.sv | grep -v dm_pkg) tb/tb_dm_processor.sv \
    --top-module tb_dm_processor -Mdir obj && ./obj/Vtb_dm_processor
```

The full-size end-to-end test simulates about 1.5 million clocks in a few
seconds. The workload test simulates about 4 million.
