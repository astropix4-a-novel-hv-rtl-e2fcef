# AstroPix4 timing and readout core in SystemVerilog

AstroPix4 is a monolithic HV-CMOS pixel sensor prototype for the silicon
tracker of a space-borne Compton/pair gamma-ray telescope. In space the whole
sensor may use only about 1.5 mW/cm², and in the predecessor chip the digital
part alone used twice that. Most of it went into a 200 MHz clock tree that
measured time over threshold. AstroPix4 measures time with only slow clocks:

* a 20 MHz clock, made on chip by a PLL from a 2.5 MHz reference, drives an
  18 bit gray time-stamp counter (25 ns steps);
* every pixel has its own **hit buffer** below the matrix. The buffer holds a
  small asynchronous **Flash-TDC**: a 16-element delay line that only runs
  between a hit edge and the next rising clock edge. This refines each edge
  time to 50 ns / 16 = **3.125 ns**;
* one global **DLL** holds the delay of 16 elements at exactly one clock
  period, whatever the process, voltage and temperature;
* a **column-drain** readout takes complete hits out of the buffers one pixel
  at a time. Pixels no longer share OR-ed row and column lines, so hits in
  the same row or column cannot mask each other.

This repository holds RTL for the digital parts and behavioural models for
the analog ones (PLL loop, delay lines, DLL loop). They are joined into one
top level, `astropix4_top`, that simulates end to end with Verilator.

## How an edge time is measured

```
clk20      ___|‾‾‾‾‾‾‾‾‾‾‾‾|____________|‾‾‾‾‾‾‾‾‾‾‾‾|_____
count         n                          n+1
hit        __________________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
                             ^ t          ^ stop = next rising edge
TDC line                     |--- k elements passed ---|
```

At the hit edge, the buffer stores the counter value, which is count `n` plus
the falling-edge bit. The edge also enters the buffer's delay line. At the
next rising clock edge the buffer stops writing its TDC cells. The cells then
hold a thermometer code: `k` ones for the `k` elements the edge got through.
The edge therefore happened

    t = t_edge(n+1) − k · 3.125 ns       (0 ≤ k ≤ 16, error in [0, 3.125) ns)

where `t_edge(n+1)` is the rising clock edge that followed count `n`. In
units of 1/16 clock period this is `16·(n+1) − k`. The package function
`astropix4_pkg::edge_fine_time` computes exactly that. `tdc_count` counts the
ones, `gray2bin` decodes the counter, and `ts_half_count` gives the 25 ns
stamp from the count and the falling-edge bit. Time over threshold is the
trailing-edge time minus the leading-edge time. Both edges are measured the
same way.

The falling-edge bit copies the binary LSB of the rising-edge count at every
falling edge. Within period `n` it therefore differs from `n[0]` in the first
half and equals it in the second. A hit in the first half must show `k ≥ 8`
and one in the second half `k < 8`, so offline code can use the bit to check
the count latched near a clock edge.

The 17 bit count wraps every 2^17 × 50 ns = 6.55 ms.

## The DLL and its start-up (`dll_startup_ctrl`, `dll_model`)

Each delay element is two current-starved inverters. Its delay varies by
several TDC steps over process corners. The DLL drives a replica of the pixel
delay line with the 20 MHz clock and compares the replica output with the
next clock edge. It then moves a control voltage, shared by every pixel's
line, until 16 element delays equal 50 ns.

A DLL has two classic failure modes:

* **Harmonic lock:** the line settles at 2 or 3 periods instead of 1.
* **Stuck state:** the line starts shorter than the period, and the loop
  drives the control voltage into the rail.

`dll_startup_ctrl` is a three-flip-flop chain clocked by the reference. It
avoids both failures as follows:

* During reset, and until the first clock edge after it, `vctrl_force` holds
  the control voltage at the supply. The line starts at its shortest delay,
  so only the wanted lock point can be reached.
* The clock reaches the delay line (`clk2vco`) from the 2nd edge on. It
  reaches the phase detector (`clk2pfd`) from the 3rd edge on, one period
  later. The detector therefore compares the replica output of pulse *k* with
  reference edge *k+1*. The replica is shorter than the period at start, so
  the loop can only lengthen it into lock.

In the model the control voltage is a 10 bit code, with the supply as the
highest code. The element delay is `cell_min_ps + (1023 − code) · 4 ps`
(`astropix4_pkg::cell_delay_ps`). `cell_min_ps` stands for the process
corner and is an input of the top level. One code step changes the 16
element delay by 64 ps, about 1/50 of a TDC step. The tests lock the loop for
corners from 1.0 ns to 2.5 ns per element and reach the 50 ns line delay to
within 0.2 TDC steps.

## Hit buffer (`hit_buffer`)

Per edge (leading, trailing) the buffer has:

* an 18 bit time-stamp register, written by the hit edge itself;
* 16 level-sensitive TDC cells, written while `WrEn` is high. These latches
  are intended: on the chip they are 3T-DRAM cells;
* a *start* flag, set by the hit edge, and a *stop* flag, which copies
  *start* on the next rising clock edge. `WrEn = start & ~stop`.

Both flags stay set until the readout pulses `clear`. Until then a new pulse
on the pixel cannot restart the TDC or overwrite the stored times. This is
the lock-out the chip uses so that a stored hit is not lost before it is
read. The trailing edge is recorded only after a recorded leading edge.
`ready` (= trailing *stop*) is in the clock domain and tells the readout that
a complete hit is waiting. The trailing TDC word is inverted on output: after
a falling edge the passed elements read 0. With the inversion, both words
read 1 for "passed".

## Readout

**Column drain (`column_drain_readout`).** Each column has an end-of-column
(EoC) priority encoder that picks the lowest ready row. A round-robin arbiter
picks one column per clock cycle, starting after the column served last. The
chosen buffer's data is registered as one 80 bit hit word, and the buffer
gets a one-cycle clear. A full matrix drains at one hit per 50 ns cycle. The
output is a valid/ready stream, and an assertion checks that a stalled word
stays unchanged.

Hit word, MSB first:

| bits  | field                     |
|-------|---------------------------|
| 79:74 | row                       |
| 73:68 | column                    |
| 67:50 | leading edge time stamp (gray count 17 bit, falling-edge bit) |
| 49:34 | leading edge TDC thermometer (bit 0 = first element) |
| 33:16 | trailing edge time stamp  |
| 15:0  | trailing edge TDC thermometer |

**Serial link (`spi_readout`, `async_fifo`).** Words cross into the SPI clock
domain through a 16-word gray-pointer FIFO. While words are queued,
`interrupt_n` is low. On the chip this is an open-drain line shared by all
chips on a bus. The master pulls `cs_n` low and clocks `sck`. The chip
changes data after falling `sck` edges, and the master samples on rising
edges. In `sck` period *k* of a word, `miso[1]` carries bit 79−2k and
`miso[0]` carries bit 78−2k. A word takes 40 periods, which at 20 MHz is
5 MB/s. An empty queue sends the idle word of all ones (row 63 does not
exist).

The read side learns about new words only through synchronisers clocked by
`sck`. After `sck` has been stopped, the first word can therefore be idle
although `interrupt_n` is low. A master should read until `interrupt_n` is
high and drop idle words. The word position counter clears on a rising edge
of `cs_n` or a falling edge of the chip reset while `cs_n` is low. After
power-up, the master must raise `cs_n` once before the first read.

## Clock generation (`pll_model`, `pll_divider`)

The PLL multiplies the 2.5 MHz reference by 8. The oscillator output is
`clk20`. In the feedback path, `pll_divider` divides it by 8 with a ripple
chain of three toggle flip-flops. A final flip-flop on the oscillator clock
re-samples the divided output, so the ripple jitter does not accumulate. The
phase detector, charge pump, loop filter and ring oscillator are analog. The
model treats them at the level of edge times:

* the detector pairs the first reference edge and the first feedback edge;
* the filter is a proportional-plus-integral update of the oscillator
  period, starting from a 44 ns free-running period.

The model locks in about 35 reference periods.

## What is synthesizable and what is a model

| module | kind |
|--------|------|
| `astropix4_pkg` | package: sizes, `edge_time_t`, `hit_word_t`, decode functions |
| `ts_gray_counter`, `pll_divider`, `dll_startup_ctrl`, `hit_buffer`, `column_drain_readout`, `spi_readout`, `async_fifo` | synthesizable RTL |
| `tdc_delay_line`, `dll_model`, `pll_model` | behavioural models of analog circuits (real-valued delays), simulation only |
| `astropix4_top` | top level, RTL plus the models above |

The models use `real` arithmetic and computed delays. In simulation they give
the digital logic the edges and codes the silicon would give, with no jitter,
mismatch or noise. The delay-line model computes its 16 outputs from the last
three input edges rather than running one process per element, so that
1225 pixel lines can be simulated.

The analog pixel front end (charge amplifier, shaper, comparator) is outside
this RTL. Its comparator outputs are the `hit[column][row]` inputs of the top
level. The bias DACs and their configuration registers are not modelled.

## Where this RTL goes beyond what is documented for the chip

The block structure, counter widths, clock frequencies, TDC length, DLL
start-up scheme, DRAM write-enable behaviour and per-pixel column-drain idea
are the chip's. The following are this design's own choices:

* the encoding of the falling-edge time-stamp bit;
* the flag circuit of the hit-buffer enable logic, and the rule that a
  trailing edge needs a recorded leading edge;
* the EoC priority (lowest row first), the round-robin column arbitration,
  the 80 bit word and the valid/ready stream;
* the SPI data protocol. Two MISO lines and the 5 MB/s rate match the chip
  family's interface; the bit order, idle word and FIFO depth are this
  design's own. The chip-to-chip daisy chain and configuration over SPI are
  not implemented;
* all loop gains, the linear delay law and the lock flags of the models;
* resets of the counter, divider and readout (asynchronous, active low).

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/astropix4_pkg.sv tb/tb_hit_buffer.sv --top-module tb_hit_buffer
./obj_dir/Vtb_hit_buffer
```

| testbench | what it checks |
|-----------|----------------|
| `tb_ts_gray_counter` | gray sequence, one bit per edge, 25 ns stamp in both half periods |
| `tb_pll_divider` | 400 ns period, 50 % duty, edges on oscillator edges |
| `tb_pll_model` | lock, 20 MHz output within 0.2 %, feedback phase, re-lock after reset |
| `tb_dll_startup_ctrl` | forced start, clk2vco from edge 2, clk2pfd from edge 3 |
| `tb_dll_model` | forced start at the shortest delay; lock and 50 ns ± 0.2 TDC step in three corners |
| `tb_tdc_delay_line` | element-by-element propagation of both edges; a pulse shorter than the line |
| `tb_hit_buffer` | count and TDC code of 40 hits against expected values, lock-out, clear |
| `tb_column_drain_readout` | every hit exactly once, lowest row first, round robin, stall stability, 1 word/cycle |
| `tb_spi_readout` | word order and content, back-pressure, back-to-back streaming, idle words, data-ready line |
| `tb_astropix4_top` | whole chip on an 8 × 8 matrix: PLL and DLL lock, three hits sharing rows and columns, random hits, lock-out, back-pressure, every ToA/trailing edge/ToT within one TDC step |

The end-to-end testbench counts every mechanism it exercises and fails if any
count stays zero. The mechanisms are PLL lock, the DLL's forced start and
lock, hits sharing rows and columns, two hits in one column, hit-buffer
lock-out, back-pressure into the column drain, idle SPI words and the
data-ready line.

All testbenches pass with random power-up values
(`+verilator+rand+reset+2`). Each one gives the asynchronous resets a real
falling edge at time zero.

**Full size.** `tb_astropix4_top` runs the whole chip on 8 × 8 pixels, set
by its localparams `R` and `C`. With `R = C = 35` it runs the full 35 × 35
matrix, the top's default size. Built that way, Verilator needs about
10 minutes and 6 GB of memory, because each of the 1225 pixels has its own
delay-line model. The run then takes about 20 seconds. The largest size
simulated in the regular test runs is 8 × 8, which builds in under a minute.

## Sizes at the default parameters

* 35 × 35 pixels, one hit buffer each: 2 × (18 + 16) storage bits plus four
  flags per pixel;
* 18 bit time stamp (17 + 1), 16-element TDC, 3.125 ns steps at 20 MHz;
* readout of one hit per 50 ns from the matrix, and one hit per 2 µs
  (80 bits) over the two-line serial link at 20 MHz. The expected event rate
  in orbit is about 10 per second.
