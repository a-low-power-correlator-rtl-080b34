# Low-power many-antenna correlator chip (X-unit) in SystemVerilog

A radio-telescope correlator multiplies the signal of every antenna with
the conjugate of every other antenna's signal and averages the products.
With N dual-polarisation antennas that is 2N signals and about 2N² complex
correlations. The work grows with N², and in large arrays it sets the power
budget.

This chip is the "X" half of an FX correlator. An external filter bank (the
"F" half) splits every signal into narrow frequency channels and sends each
chip all 2N signals of its share of the bandwidth. The chip holds one fixed
64 × 64 array of complex multiply-accumulate units (CMACs), which computes
4096 correlations at once: every one of 64 "row" signals against every one
of 64 "column" signals. For more than 64 signals, the samples of a whole
integration are stored in a large on-chip memory. The array is then reused,
one sub-integration (SI) per pair of 64-signal groups, until every group
pair has been correlated. One design therefore serves any N. As N grows,
only the bandwidth one chip can handle goes down, and more chips share the
band.

The RTL follows the chip's published block structure. Its sizes are the
published ones: 4b+4b complex samples, 16b+16b results, a 64 × 64 CMAC
array, a memory of 64K words of 1024 bits, a 32-bit input port, a 16-pin
output port and twelve 20-bit control registers. The published description
gives the blocks and their duties but not their protocols. The memory word
layout, the schedule, the register map, the SPI frame, the output order and
every clock-domain crossing are this implementation's own. They are listed
in "Departures and own choices" below.

## Blocks

```
 DATAIN[31:0], INTEGRATE        SPI (4 wires)
        |                            |
  corr_input (CLKIN->sysclk)    spi_control (CLKIN): 12 x 20-bit registers
        | 1024-bit words             | N, T, PLL dividers, run, start addresses
        v                            v
  corr_memory 64K x 1024  <-- addr_gen (sysclk) --> cmac_mode, si_dump
        | rdata                      |
  corr_buffer  --- 64 row + 64 column samples / cycle --->  cmac_array 64x64
                                                               | 4096 x 32 bit
  clock_gen (PLL model): CLKIN -> sysclk, outclk (or USROUTCLK)  v
                                          corr_output (outclk) -> DATAOUT[15:0],
                                                                  SYNCOUT, CLKOUT
```

| file | role |
|---|---|
| `rtl/corr_pkg.sv` | sizes, sample/result types, CMAC mode code, register map |
| `rtl/corr_chip.sv` | top level; ports named as on the chip |
| `rtl/corr_input.sv` | packs 32 input words into one memory word, hands it to sysclk |
| `rtl/corr_memory.sv` | single-port 64K × 1024 sample memory |
| `rtl/addr_gen.sv` | memory schedule, SI sequencing, CMAC mode, sync pulses |
| `rtl/corr_buffer.sv` | splits row/column words into per-cycle sample vectors |
| `rtl/cmac.sv`, `rtl/cmac_array.sv` | one CMAC; the 64 × 64 array |
| `rtl/corr_output.sv` | streams the 4096 results of an SI on 16 pins |
| `rtl/spi_control.sv` | SPI slave and the control registers |
| `rtl/clock_gen.sv` | behavioural PLL model (simulation only) |
| `rtl/sync_2ff.sv` | two-flop synchroniser |

## Data layout: what one memory word holds

A sample is one byte: the real part is in bits 7:4 and the imaginary part in
bits 3:0, both twos complement. A 1024-bit memory word holds 128 samples.
These are one 64-signal group at two consecutive sample times:

* bits 511:0: signals 64g+0 … 64g+63 at time 2p (signal k in bits 8k+7:8k);
* bits 1023:512: the same signals at time 2p+1.

Each CMAC cycle needs 64 row samples and 64 column samples of one sample
time. That is 128 samples, one memory word's worth. So one row word and one
column word feed exactly two CMAC cycles, and a single-ported memory doing
one access per cycle keeps the array busy.

The input port delivers four samples of one sample time per CLKIN edge.
`corr_input` puts input word w (0…31) of a memory word into bits
32w+31:32w. Words 0–15 are therefore signals 0–63 at the even time, and
words 16–31 are the same signals at the odd time. Across memory words, the
stream is expected in time-major order: for each time pair p, first group 0,
then group 1, … up to group G−1, where G = 2N/64 = N/32. Group g, time
pair p then lands at `write_start + p·G + g`. This is the natural order for
a filter bank that emits all signals of one time before the next.

## Sub-integrations and the memory schedule

This is the part of the design that takes the most care. It lives in
`addr_gen`.

**What an SI is.** An SI correlates one row group r with one column group c
over T samples. It reads T/2 word pairs: a row word at `row_start + p·G`,
then a column word at `col_start + p·G`, for p = 0 … T/2−1. The stride
G = N/32 comes from the N register (a value below 32 counts as one group).
The host chooses the group pair by writing `row_start = base + r` and
`col_start = base + c`. With G groups, all distinct pairs take
G(G+1)/2 SIs, about 2(N/64)² for large N.

**Per-SI registers.** At the start of every SI, `addr_gen` latches three
registers: the row start, the column start, and the write start for input
arriving during this SI. While one SI runs, the host writes the three values
for the next SI. SIs follow each other with a one-cycle gap for as long as
the `run` bit is set. Clearing `run` lets the current SI finish and then
stops.

**Integration-synchronised SIs.** When CTRL bit 2 is also set, a new SI waits
for the first word of an integration (the one marked by INTEGRATE). That
word's write is deferred by one cycle and goes to the newly latched write
address. Each integration then starts exactly at the chosen address, while
the SI correlates the previous integration from another memory region.
This is the natural mode when one SI covers a whole integration (N = 32).
It also gives double-buffered memory use without the host knowing the exact
input timing.

**Writes displace reads.** Input words arrive at a fixed rate and must not
be lost, so a pending input word is always written at once. The read that
would have happened in that cycle waits, and so does the CMAC array.
Outside SIs the write pointer reloads from the write-start register on the
first word of each integration (the word that came with INTEGRATE). Inside
SIs it continues from the value latched at the SI start.

**Alignment.** The memory returns data one cycle after a read. The buffer
presents the even time one cycle after the column word arrives and the odd
time one cycle after that. `addr_gen` therefore delays its bookkeeping to
match:

| cycle | event |
|---|---|
| k | column read issued for pair p |
| k+1 | `ld_col`: rdata holds the column word |
| k+2 | even-time samples at the array; `cmac_mode` = FIRST if p = 0, else ACC |
| k+3 | odd-time samples; `cmac_mode` = LAST if p = T/2−1, else ACC |
| k+4 | readout registers hold the SI result; `si_dump` pulses |

Column reads are at least two cycles apart, so these slots never overlap.
A new row word may arrive in cycle k+2. The buffer still produces the odd
time from its held copy of the old row word.

**CMAC modes.** `FIRST` starts a new sum with this cycle's product. `ACC`
adds the product. `LAST` adds the product and copies the total into the
readout register. `IDLE` holds everything. Each CMAC forms
row·conj(column) and saturates at ±32767/−32768 for each component. A
readout register keeps its value until the next `LAST`. The output block
therefore has one whole SI to send the results.

## Output

After `si_dump`, `corr_output` sends the 4096 results in 8192 outclk
cycles. The order is CMAC (0,0), (0,1), … (0,63), (1,0), …, where CMAC
(i,j) holds row signal i against column signal j of the SI's groups. Each
result goes out as two 16-bit halves, real half first. SYNCOUT is high
during the first cycle only, and DATAOUT is 0 between readouts. DATAOUT and
SYNCOUT change after the rising edge of CLKOUT (= outclk), so a receiver
samples them on the falling edge. outclk must finish 8192 cycles within one
SI. If a new SI ends before then, the readout restarts and an internal
`late` flag is set.

## Clocks and crossings

* **CLKIN** clocks the input packer and the control registers. The
  registers need a clock before the PLL is programmed.
* **sysclk** (PLL) clocks the memory, `addr_gen`, the buffer and the array:
  f_sys = f_CLKIN · FBDIV / (REFDIV · SYSDIV).
* **outclk** (PLL, or the USROUTCLK pin when CTRL bit 1 is set) clocks the
  output: f_out = f_CLKIN · FBDIV / (REFDIV · OUTDIV).

A finished input word is held in a CLKIN-domain register for 32 CLKIN
cycles. A toggle tells the sysclk domain, through a two-flop synchroniser,
that the word is ready. sysclk must let the write happen within that
window; otherwise the sticky `overrun` flag in `corr_input` is set.
`si_dump` reaches outclk the same way, and the readout registers are read
directly, since they are stable for a whole SI. The `run` and
integration-sync bits are synchronised. The address, N and T registers are read as quasi-static
values, so the host must not write them at the very moment an SI starts.
The SPI pins are oversampled by CLKIN, which must be at least 8× SCLK.
RESETN resets all blocks asynchronously.

## Programming

Registers (20 bits each, all readable and writable):

| addr | name | meaning | reset |
|---|---|---|---|
| 0 | CTRL | bit 0 run SIs, bit 1 outclk from USROUTCLK, bit 2 start SIs only at integration starts | 0 |
| 1 | N | antennas; sets the group stride N/32 | 32 |
| 2 | T | samples per SI; even, at least 2 | 256 |
| 3 | ROW_ADDR | row start word for the next SI | 0 |
| 4 | COL_ADDR | column start word for the next SI | 0 |
| 5 | WR_ADDR | write start word for the next SI (or the next integration while idle) | 0 |
| 6–9 | PLL REFDIV, FBDIV, SYSDIV, OUTDIV | clock dividers, 0 counts as 1 | 1 |
| 10, 11 | spare | no function | 0 |

SPI frame: SPI mode 0, MSB first, 25 bits inside one CS_N-low period. The
first bit is 1 for a write and 0 for a read. The next 4 bits are the
register address, and the last 20 bits are the data. On a read, the
register value comes out on MISO during the 20 data bits.

A typical run:

1. Set the PLL, N, T and WR_ADDR.
2. Stream one integration.
3. Set ROW/COL/WR for the first SI and set `run`.
4. After each SYNCOUT, write the three addresses for the SI after next.
5. Clear `run` during the last SI.

## Sizes and rates

* Memory: 65536 × 128 = 8,388,608 samples. One integration takes G·T/2
  words. To keep one integration in memory while the next is written, G·T
  must be at most 65536. That allows T ≤ 65536 at N = 32, T ≤ 4096 at
  N = 512 and T ≤ 512 at N = 4096. Larger N needs integrations split into
  partial integrations, which the published analysis also uses for
  N ≥ 1024.
* Pins: 32 input bits and 16 output bits at up to 500 MHz give the
  published 16 Gb/s and 8 Gb/s limits. For example, N = 512 at 1.953 MHz
  bandwidth needs 1024 signals × 1.953 M samples/s × 8 bits = 16 Gb/s in.
* Array throughput is 4096 complex MACs per sysclk cycle, minus the cycles
  given to input writes (one per 32 CLKIN cycles).
* Coarse synthesis (word-level cells, before technology mapping): the CMAC
  array is about 69,600 cells and 262,144 flip-flop bits (64 per CMAC:
  accumulator and readout register). The memory is 67,108,864 bits. The
  buffer is 3,073 flip-flop bits, and the input packer is 2,030. The PLL
  model is not synthesizable, so there is no figure for the whole chip.

## Departures and own choices

The following are not given by the published description and were chosen
here:

* the memory word layout and time-major input order described above;
* the group stride N/32 on reads;
* the integration-synchronised start of SIs (CTRL bit 2);
* the single-ported memory with write priority;
* conjugation of the column sample;
* saturating 16-bit accumulators;
* the register map, SPI frame and reset values, and the `run` bit;
* output order, half order and edge timing;
* all clock-domain crossings, including the overrun and late flags, which
  have no register to be read from;
* the PLL divider structure.

The published block diagram also shows a memory control signal labelled
"CRA" without saying what it is; it is not modelled. The memory is an array
where silicon would use SRAM macros. The PLL, the pads and the external
filter bank are outside the synthesizable RTL: `clock_gen` is a behavioural
model with real-valued delays. Power and area, which the published work
estimates for a 32 nm SOI process, are not something this RTL can confirm.

## Simulation

Every testbench in `tb/` checks itself and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -Irtl \
    rtl/corr_pkg.sv tb/tb_corr_chip.sv --top-module tb_corr_chip
./obj_dir/Vtb_corr_chip
```

(`-y rtl` lets Verilator find each module in `rtl/<name>.sv`; replace the
testbench name for the others). Blocks that use an async reset need a falling RESETN edge at the
start of simulation, because sysclk does not run while the PLL is unlocked.

| testbench | what it checks |
|---|---|
| `tb_cmac` | products, accumulation, idle holds, saturation of both signs |
| `tb_cmac_array` | all (i,j) results of an 8 × 6 array over random SIs |
| `tb_corr_memory` | full 64K × 1024 write/read-back, latency, hold |
| `tb_corr_buffer` | even/odd halves, a new row word right after a column word |
| `tb_addr_gen` | every access against a reference schedule; mode and dump timing; stalls |
| `tb_corr_input` | packing, INTEGRATE realignment, clock crossing, overrun |
| `tb_corr_output` | 2·N_RES cycles, SYNCOUT, order, start latency, late flag |
| `tb_spi_control` | reset values, write/read of all registers, bad addresses |
| `tb_clock_gen` | lock, periods for two divider settings, USROUTCLK select |
| `tb_corr_chip` | whole chip at full size, described below |
| `tb_corr_n32` | N = 32 workload in continuous operation, described below |

`tb_corr_chip` runs the whole chip at its default size. It uses N = 64 and
T = 2048 and runs four SIs (three back to back, one after switching outclk
to USROUTCLK). All 16,384 results are compared with a software
correlation. It also requires that write stalls, back-to-back SIs,
saturation, PLL relock and the clock switch each happen.

`tb_corr_n32` runs the smallest published configuration, N = 32, at the
full 500 MHz input rate. It uses T = 1024 and double-buffered memory (two
regions, one being written while the other is correlated). SIs start on
integration boundaries. It checks three consecutive integrations result by
result. It also checks that each SI finishes within its integration, that
the input never overruns and that every readout ends before the next SI
does.

Building either full-chip test takes a few minutes, because the 4096 CMAC
instances are compiled. Running takes about a minute.
