# Hit time and position on an FADC readout module

A silicon strip detector read out by APV25 chips samples each strip's shaped
signal at 40 MHz. When the trigger jitters by more than the shaping time,
knowing only *that* a strip fired is not enough: background hits from other
bunch crossings cannot be rejected. This design computes, on the readout
board itself, the arrival time of every hit from the shape of its pulse. It
then sends one compact word per hit instead of six raw samples. Hits whose
time cannot be found unambiguously are not dropped: their six samples are
sent unchanged with a marker that says why.

The RTL covers the digital back end of a 16-input readout module:

```
 16 x hit processor (outside)     4 x time_calc_unit (4 inputs each)           final_data_block
 strip words: 8-bit height  -->  input FIFOs -> strip_time_buffer -> scan  --> headers, hit words,
 + hit bit, 6 time blocks        -> hit_time_processor -> output FIFO          trailers, CRC16
                                   (max_selector + 2 x time_lut)                -> 32 data + 4 ctrl
 APV25 headers, CM corrections -------------------> event_checker ---------------^
```

The per-input hit processors are existing logic that this design does not
contain. They reorder the APV25 output, subtract pedestals, apply two passes
of common-mode correction and set a hit bit per sample above threshold. The
ADCs, the analog front end and the VME controller are also outside. Their
signals are ports of `fadc_top`.

## Finding the maximum and the coarse time

Every strip has six samples T1..T6, 25 ns apart. The shaped pulse
rises to one peak and falls. Three samples around the peak are enough to fit
its time. `max_selector` looks for the middle sample Tm (m = 2..5) of three
neighbours that satisfies

    T(m-1) < Tm  and  Tm >= T(m+1)        (for m = 5: T5 > T6)

So a sample counts as the peak when it is higher than its left neighbour and
not lower than its right one. This rule splits the 100 ns range into four
25 ns windows without gaps or overlaps. Coarse time is `m - 2`, i.e. 0, 25, 50
or 75 ns. Together with ±50 ns of trigger jitter, that is why six samples are
taken. The selector also reports how many positions satisfy the rule.

## Fine time: two chained tables

A 3-sample fit would need a 24-bit address. A single table of that size is too
big for an FPGA, so the lookup is split into two 64K x 9 tables (`time_lut`):

```
 {left, centre}  (16 bit) --> table 1 --> 9 bit --+
                                                   +--> {9 bit, right[7:1]} --> table 2 --> 9 bit
 right[7:1]      (7 bit) ---- delayed one clock ---+
```

Table 1 compresses the first two samples into a 9-bit intermediate code.
Table 2 combines that code with the top 7 bits of the third sample. Its 9-bit
result is used as follows:

| bits | meaning |
|---|---|
| 3:0 | fine time in steps of 25/16 ns |
| 7:4 | quality of the time information |
| 8 | not found: the samples do not fit the shaping curve |

The contents depend on the shaping curve and are not part of the RTL. They
are loaded through the `lut_we/lut_sel/lut_addr/lut_wdata` port (all 16
processors get the same contents). The testbenches fill the tables with two
pseudo-random functions of the address and predict the results with the same
functions:

* table 1: bits 16..8 of `addr * 40503 + 12345`;
* table 2: `{h[31:29] == 0, h[23:16]}`, where `h = addr * 0x9E3779B1`.

## Event classes

`hit_time_processor` puts each strip that has a hit bit into one class. The
checks run in this order, and the first one that matches decides:

| code | class | condition | output |
|---|---|---|---|
| 2 | B, border | no sample T2..T5 is a maximum (peak outside the window) | 6 raw words |
| 3 | C, two maxima | more than one position satisfies the rule | 6 raw words |
| 5 | F, small pulse | peak below the programmable `limit` | 6 raw words |
| 4 | D, no fit | table 2 sets "not found" | 6 raw words |
| 1 | A, single | otherwise | 1 hit word with time |

A strip that looks like two real pulses (class E in the original scheme) cannot
be told apart from class C on the board, so it is reported as C. While the six
raw words of a strip go out, the processor holds its input ("stop read").
Class A strips flow at one per clock through a three-stage pipeline.

`case_counters` counts the classes per time calculator. The ratios between
the counters should stay roughly constant over a run. `time_histogram` bins
the 6-bit time (coarse and fine) of class-A hits per input.

## Buffering one event per time calculator

One `time_calc_unit` serves four inputs. Each input has a 128 x 9 FIFO
followed by six 128 x 9 dual-port memories, one per time block. The
`strip_time_buffer` therefore has 24 memories in all. Reading one address
returns all six samples of a strip in one clock.

The unit runs in three phases:

1. **WRITE** fills the memories from the FIFOs.
2. **SCAN** reads strips 0..127 of input 0, then of input 1, and so on. Strips
   without any hit bit are skipped, and the rest go to the processor. After
   each input, once the processor is empty, the unit writes an end-of-input
   marker.
3. **DRAIN** covers that final wait for the processor and the marker.

The input FIFOs keep filling during the scan. When they are full they hold the
inputs back through `in_ready`. The result goes into a 16384 x 33 output
FIFO, where the extra bit marks the end-of-input entries.

Throughput follows from this structure. Reading in an event takes 768
clocks per input, and the four inputs load in parallel. The scan takes one
clock per strip (512 per unit) plus 5 extra clocks for every strip sent raw.
Because there is only one set of memories, the next event can load no more
than its first 128 words per input (the FIFO depth) during the scan. In the
end-to-end test each event takes about 2100 clocks. That test uses 16
inputs at 20 % occupancy, leaves a gap on each input one clock in ten, and
keeps the receiver busy one clock in six.

## Data block and word formats

`final_data_block` takes the four unit streams in turn. It builds one block
per trigger and buffers it in a 2048-word FIFO towards the receiver. Every
32-bit word travels with 4 control lines, bits 3..0: HEADER, TRAILER, HALF_EV
(stop) and DA_EN.

| word | 31..0 | ctrl |
|---|---|---|
| main header | `0`, 30-27 trigger type, 25-23 data type, 20-16 clock-to-trigger time, 15-14 crate, 13-9 module, 7-0 event number | 1001 |
| input header (optional) | `1`, 29-23 channel event number, 19-16 input, 15-9 common-mode correction 2, 8-0 correction 1 | 1001 |
| hit with time | `1`, 30-27 quality, 26-23 fine time, 22-20 index of the peak sample (2..5), 19-16 input, 15-9 strip, 7-0 pulse height | 0001 |
| raw sample | `0`, 26-23 class code, 22-20 time block 1..6, 19-16 input, 15-9 strip, 7-0 pulse height | 0001 |
| input trailer (optional) | `1`, 19-16 input, 1 header missing, 0 event number error | 0100 |
| main trailer | 31-16 CRC16 of all earlier words of the block, 15-0 mask of inputs with an error | 0101 |

The CRC uses polynomial 0x1021 with start value 0xFFFF. It takes each 32-bit
word MSB first and has no final inversion. `in_hdr_en` and `in_trl_en` switch
the optional words on or off between blocks.

`event_checker` counts APV25 headers per input and compares the count with
the system event number at the start of each block. It flags inputs that
sent no header since the last block. It also keeps a sign balance of both
common-mode corrections (positive minus negative values), which should stay
near zero. The event number and corrections in the input headers are the
values captured at block start.

## Transparent data for the slow control

For checking pedestals, thresholds and the reorder, the VME system needs
the complete data of an input, not only the hits. `transparent_spy` taps the
strip words going into the time calculators. It keeps, per input, the
position of the next word in the event and an event count. When enabled and
free, it waits for the next event of the selected input whose count is a
multiple of 256, and stores the 128 words of the selected time block
(1..6) in a 128 x 9 memory. `spy_full` then holds the memory until
`spy_ack`. Read words have bits 22-20 time block, 19-16 input, 15-9 strip
and 8-0 the strip word (hit bit and pulse height). The upper bits are 0.

## Where this design departs from the original module

* The original passes hit words between FPGAs two at a time on a 64-bit bus
  and shares one 16K x 72 FIFO between two FPGAs. Here each time calculator
  has its own 33-bit-wide FIFO and delivers one word per clock.
* The original reads the inputs in every sixth clock. Here each input moves
  one word per clock whenever its FIFO has data.
* Class B strips are always sent raw. The original would send them raw only
  above some amplitude, which is not specified.
* The following are not built:
  * dummy words (control 1100);
  * the HALF_EV line, which is always 0;
  * continuous transparent readout of raw ADC samples before the hit
    processor;
  * the main and spy memories on the Finesse side;
  * a time of the hit relative to the clock edge, which the original leaves
    open.
* This design chose several details:
  * the contents of the trailers apart from the CRC;
  * the class codes;
  * the split of the table output bits;
  * the CRC polynomial;
  * the block input order 0..15.

## Simulating

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` at the end. The reference model in
`tb/tb_ref_pkg.sv` covers:

* the table functions;
* the selection rule;
* the expected words;
* the CRC;
* random strip generation.

Packages must be compiled first. For example, the end-to-end test at full
size (16 inputs, four events, about 140,000 clocks, of which 131,072 load the two tables; a few seconds):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/fadc_pkg.sv tb/tb_ref_pkg.sv rtl/*.sv tb/tb_fadc_top.sv \
  --top-module tb_fadc_top -o sim && obj_dir/sim
```

The glob repeats the package file. If your Verilator version complains, list
the rtl files one by one. A unit test uses the same command with its own
`tb/tb_<module>.sv` and `--top-module`.

`tb_fadc_top` runs four events back to back:

* events 1-3 with input headers and trailers, event 4 with both switched off;
* input 6 misses its APV25 header in event 2;
* the receiver is busy at random.

Every block is compared word by word with a block rebuilt by the reference
model. The test counts how often each mechanism occurs and fails if one never
does. The mechanisms are:

* classes A, B, C, D and F;
* inputs held back;
* receiver busy;
* blocks with and without optional headers;
* missing input;
* event number mismatch;
* transparent capture of one input and time block.

A typical run sees about 980 class-A hits and between 48 and 320 strips of
each raw class.
