# AMT-2 TDC core in SystemVerilog

The AMT-2 is a 24-channel time-to-digital converter for the drift tubes of
the ATLAS muon spectrometer. Each channel records when its discriminated
hit signal rises and falls, with 0.78125 ns bins. The hits are held in a
shared buffer for the trigger latency. When a level 1 trigger arrives, only
the hits whose time lies in a window tied to that trigger are sent out. This
repository holds a synthesizable RTL model of the chip's digital core:

- the time measurement and its buffers;
- the trigger matching;
- serial and parallel read-out;
- 15 control and 6 status registers, reached through a 12-bit bus or JTAG;
- a control chain for three ASD (amplifier/shaper/discriminator) chips;
- built-in self-test of the buffer memories;
- a PLL frequency check.

The chip is also built to survive radiation. The channel buffers and the L1
buffer carry a parity bit per word. The control registers are guarded by a
stored total parity. The self-test can be stopped with every memory word at
a known value and resumed later, so that upsets collected in between show up
in its signature.

## Time base

The chip's PLL multiplies the 40 MHz LHC clock to 80 MHz. An asymmetric ring
oscillator splits each 12.5 ns period into 16 phases. In this RTL the
oscillator is outside the core and is modelled as follows:

- `clk` is the 80 MHz clock.
- `hit_samples[c]` carries, for each clock period, the level of channel c's
  hit signal at each of the 16 phases. Bit 0 is the earliest phase.

A time is 17 bits:

- the upper 13 bits are a coarse count of 12.5 ns periods (`coarse_counter`);
- the lower 4 bits are the fine bin.

The bunch id is the time in 25 ns units, `time[16:5]`, 12 bits. Trigger tags
and the match window use this unit. The bunch count reset input (`bcr`) loads
the coarse counter from control register 7, doubled, so the bunch id can be
aligned with the machine.

## Channels and channel buffers (`tdc_channel`)

Each period, the channel looks for a 0→1 step (leading edge) and a 1→0 step
(trailing edge) among its 16 samples and the last sample of the previous
period. The bin of a step is its fine time. There are two modes:

- **Edge mode:** each edge becomes a word. A pulse that starts and ends in
  the same period gives two words in that cycle, written in time order.
- **Pair mode:** a leading edge is held until its trailing edge arrives.
  Then one word holds the leading time and the width in bins, saturated at
  1023.

Words go into a 4-word channel buffer. Each stored word carries even parity,
checked when the word leaves. A bad word goes on with its `err` bit set and
raises the channel-parity error flag. A word that finds the buffer full is
dropped and raises the channel-buffer overflow flag.

At most one leading and one trailing edge are kept per 12.5 ns period. Two
pulses closer than that can therefore lose the second pulse's leading edge.
The chip is specified below 10 ns of double-hit resolution, so this is a
known departure.

## L1 buffer and arbitration (`channel_arbiter`, `l1_buffer`)

A round-robin arbiter moves one word per clock from the channel buffers
into the 256-word L1 buffer, a circular buffer of 36-bit words (35-bit hit
plus parity). That is 80 M words/s against the 19.2 M words/s of 24 channels
at 400 kHz with both edges.

The L1 buffer has two pointers:

- **`wp`** is the write pointer. It advances when a hit is written.
- **`base`** is the release pointer. The trigger matcher owns it and
  advances it as hits become useless.

The buffer is full when `wp - base` reaches 256. A hit that arrives then is
lost and raises the L1 overflow flag. Reads are random access with one
clock of latency, and parity is checked on every read.

## Trigger matching (`trigger_interface`, `trigger_matcher`)

This is the part that needs the most care.

A trigger pulse stores the current bunch id as the trigger's time tag in the
8-word trigger FIFO. A trigger that finds the FIFO full is lost and raises a
flag. Event ids are counted as triggers are taken from the FIFO, and `ecr`
resets the count.

For a tag T, the matcher takes these from control registers 1 to 4, in bunch
units:

| Register | Name | Reset value |
|---|---|---|
| CR1 | window | 20 |
| CR2 | latency | 100 |
| CR3 | search margin | 8 |
| CR4 | reject margin | 4 |

The match window is `[T − latency, T − latency + window)`. Handling one
trigger runs in six steps:

1. **Wait.** Hold until the current bunch id has passed the end of the window
   by more than the search margin. Hits of the window may still sit in
   channel buffers or wait for the arbiter, and the margin covers that delay.
2. **Header.** Write the header word: event id and tag.
3. **Scan.** Read the L1 buffer from `base` towards `wp`, two clocks per word.
   For each hit, take `d = hit bunch − window start`, modulo 2^12:
   - `d < 0`: the hit is too early. If it is also older than the reject
     margin and sits at `base`, release it by advancing `base`. No later
     trigger can want it, because tags arrive in time order.
   - `0 ≤ d < window`: the hit matches. Copy it out as a data word.
   - `d ≥ window + search margin`: the scan can stop. Hits after this one in
     the buffer are later still, except for the arbitration skew the margin
     allows for.
   - Otherwise, skip the hit.
4. **Trailer.** Write the trailer word: event id and the word count,
   including header and trailer.
5. **Pop.** Take the trigger from the FIFO.
6. **Age release.** With no trigger queued, the matcher keeps checking the
   hit at `base`. Once it is older than latency plus reject margin, it is
   released, because no trigger still to come can claim it. This check never
   runs in the cycle in which a trigger is being taken.

A full read-out FIFO stalls the matcher wherever it is.

Each time the differences wrap modulo 4096 bunches, the windows stay
correct as long as every difference stays under 2^11 bunches (51.2 µs). The
chip's maximum trigger latency is 51 µs. At 400 kHz per channel with both
edges, however, 51 µs of hits is about 980 words, more than the L1 buffer
holds. Long latencies therefore need lower hit rates.

Read-out words are 32 bits. The upper 4 bits give the type:

| Type | Word | Fields |
|---|---|---|
| A | header | event id 12, bunch id 12, 0000 |
| C | trailer | event id 12, 8'h0, word count 8 |
| 3 / 4 | leading / trailing edge | channel 5, parity error 1, 5'h0, time 17 |
| 5 | pair | channel 5, width 8 (saturated), time[14:0] |
| 6 | error | 16'h0, error flags 12 |

These formats are this design's own.

## Errors

Six error flags are kept, sticky, in status register 0:

- control parity;
- channel-buffer parity;
- L1 parity;
- channel-buffer overflow;
- L1 overflow;
- trigger FIFO overflow.

Control register 9 selects which of them drive the `error_out` pin. When
control register 0 bit 8 is set, the matcher writes an error word between
events whenever an enabled flag newly rises. Control register 0 bit 10,
held high, clears the flags.

## Read-out (`sync_fifo`, `serial_tx`)

Matched data wait in the 64-word read-out FIFO. They leave in one of two
ways:

- **Parallel:** control register 0 bit 6 set. Words go out on `par_data`
  with a valid/ready handshake.
- **Serial:** a frame is a start bit '1', 32 data bits MSB first and a stop
  bit '0'. Frames follow back to back, 34 bit periods each. The bit period
  is 1, 2, 4 or 8 clocks (80, 40, 20, 10 Mbit/s), set by control register 0
  bits 5:4. There are two line codes:
  - **DS:** data plus a strobe that toggles whenever the data line does not.
  - **Data+clock:** the 80 Mbit/s setting falls back to 40 Mbit/s, because
    one clock period cannot carry a clock edge.

How much the serial link carries decides which rates the core can run
without loss. With a 20-bunch window, 400 kHz of hits per channel and
100 kHz of triggers, an event in edge mode holds about 9.6 data words plus
header and trailer. That is 39.4 Mbit/s, nearly all of a 40 Mbit/s link.
Random bursts then fill the read-out FIFO, the matcher stalls and the L1
buffer overflows. At those rates use 80 Mbit/s, or pair mode, which halves
the data words.

## Control and status registers (`csr`)

There are 15 control registers of 12 bits, 180 bits in all, and 6 status
registers. The bus reaches control registers at addresses 0–14 and status
registers at 16–21. JTAG loads or reads all 180 control bits at once.

Every write stores the total parity of the new contents. The parity of the
live contents is compared with it on every clock, so a flipped control bit
raises the control-parity flag until the registers are written again.

Control register 0 bits:

| Bit | Function |
|---|---|
| 0 | pair mode |
| 1 | matching on |
| 2 | serial on |
| 3 | DS code |
| 5:4 | serial speed |
| 6 | parallel output |
| 7 | ASD reset |
| 8 | error words |
| 9 | PLL check start (rising edge) |
| 10 | clear errors |

The other control registers:

| Register | Contents |
|---|---|
| 1–4 | match window, latency, search margin and reject margin (see trigger matching) |
| 5, 6 | channel enables |
| 7 | coarse offset |
| 8 | general purpose outputs |
| 9 | error enables |

The status registers:

| Register | Contents |
|---|---|
| 0 | error flags |
| 1 | L1 occupancy |
| 2 | trigger FIFO and read-out FIFO counts |
| 3 | PLL count, low bits |
| 4 | PLL count, high bits; done and busy bits |
| 5 | stored parity, ASD and serial busy bits, the three general purpose inputs |

## JTAG (`jtag_tap`)

The TAP samples TCK, TMS and TDI with the 80 MHz clock, so it runs in the
core clock domain. TCK must be a few times slower than 80 MHz. The
instruction register is 4 bits:

| Code | Register | Length | Use |
|---|---|---|---|
| 1 | IDCODE | 32 | 0x0A4D2001 |
| 8 | CONTROL | 180 | captures the control registers; Update-DR loads them |
| 9 | STATUS | 72 | status registers |
| A | ASD | — | see ASD chain |
| B | BIST | 48 | captures status and signature; Update-DR takes a command from the low 12 bits |
| C | DEBUG | 64 | captures internal registers: coarse count, L1 write and release pointers, event id, FIFO counts, error flags, busy bits |
| 0 | EXTEST | 114 | boundary-scan register; output pins driven from its update latches |
| 2 | SAMPLE | 114 | boundary-scan register; pins stay with the core (SAMPLE/PRELOAD) |
| others | BYPASS | 1 | |

For the ASD instruction, each Shift-DR clock shifts one bit through the
external ASD chain. TDO is the chain's return, and Update-DR pulses
`asd_load`.

BIST command bits:

| Bits | Meaning |
|---|---|
| 0 | start |
| 1 | resume |
| 2 | pattern |
| 4:3 | memory: 0 L1, 1 trigger FIFO, 2 read-out FIFO |
| 7:5 | stop before element (7 = never) |

BIST status bits:

| Bits | Meaning |
|---|---|
| 11:9 | element |
| 8 | paused |
| 7 | fail |
| 6 | done |
| 5 | busy |
| 4:3 | memory |

### Boundary scan (`boundary_scan`)

The boundary-scan register has one cell per logic pin, 114 cells in all.
The 50 input cells come first from TDO:

- `trigger`, `bcr`, `ecr`, `par_ready`;
- `bus_we`, `bus_addr`, `bus_wdata`;
- `asd_in`, `gpi`;
- the 24 hit inputs, each scanned as its level in the last fine bin of the
  clock period.

The 64 output cells follow:

- `sdata`, `sstrobe`;
- `par_data`, `par_valid`;
- `error_out`;
- `bus_rdata`;
- the four ASD outputs;
- `gpo`.

Capture-DR loads every cell from its pin. Shift-DR moves the chain. Under
EXTEST, Update-DR drives the output pins from the output cells, which is
used for testing board wiring. Input pins always reach the core, so there is
no INTEST.

The chip also scans internal registers for debugging. Here that is the
DEBUG register. From bit 0 it holds:

- the coarse count (13 bits);
- the L1 write pointer and release pointer (9 bits each);
- the event id (12 bits);
- the trigger FIFO count (4 bits) and read-out FIFO count (7 bits);
- the error flags (6 bits);
- the busy bits of the matcher, BIST and serial sender, and PLL done.

The choice of registers is this design's own.

## ASD chain (`asd_ctrl`)

Five lines go to the three daisy-chained ASD chips: clock, data out, data
in, load and reset. `asd_ctrl` turns each shift request into one clock pulse
with set-up and high times of a few core clocks (parameters SETUP, HIGH,
LOAD). It turns each update request into a load pulse. One request of each
kind can wait while the previous one finishes.

## Memory self-test (`bist_ctrl`)

The self-test runs a 13N march over the selected memory:

`⇑w0; ⇑(r0,w1,r1); ⇑(r1,w0,r0); ⇓(r0,w1,r1); ⇓(r1,w0,r0)`

There are two backgrounds:

- pattern 0: all zeros;
- pattern 1: a checkerboard, alternating by bit and by address.

Every read is folded into a 36-bit multiple-input LFSR (x^36 + x^11 + 1).
Any wrong bit therefore changes the final signature, and a wrong read also
sets `fail`. A full run takes 13·N + 1 clocks.

The run can stop before any element. Stopping before element 2 leaves every
word at its "1" value. The memory can sit like that, for example in a beam,
and `resume` then finishes the test, so any bit that flipped in between
shows in the signature. While the test owns a memory, matching and read-out
from it are held off.

## PLL check (`pll_check_counter`)

A gate of 4096 cycles of the 40 MHz reference is made in that clock domain.
It is synchronised into the 80 MHz domain, where PLL clocks are counted
while it is open. A locked PLL reads 8192 ± 1.

## Top level (`amt2_top`)

`amt2_top` wires the blocks above together. Its ports are the chip's logic
pins, plus `hit_samples` in place of the oscillator and LVDS inputs. These
parts are outside the RTL:

- the ring oscillator PLL;
- the LVDS receivers and drivers;
- the ASD chips themselves (a behavioural model is in `tb/asd_chip_model.sv`).

The shared sizes and word types live in `rtl/amt_pkg.sv`. The three buffers
together hold 256×36 + 8×12 + 64×32 = 11,360 bits, and the control
registers 180 bits.

Departures from the chip and choices of this design:

- The double-hit resolution is one period (12.5 ns).
- The following are this design's own: the word formats, the register bit
  maps, the match-window parameters, the JTAG instruction codes, and the
  BIST march and backgrounds.

## Simulation

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/amt_pkg.sv tb/tb_amt2_top.sv --top-module tb_amt2_top
./obj_dir/Vtb_amt2_top
```

`tb_amt2_top` runs the whole core at its default sizes. It drives random
pulses on all 24 channels and random triggers. It decodes the parallel,
DS and data+clock outputs, and compares every event with the hits a
reference model picks for the trigger's window. It also covers:

- a stress phase with channel-buffer, L1 and trigger FIFO overflows, a
  full read-out FIFO and error words;
- JTAG register access;
- an ASD chain load;
- boundary scan: SAMPLE of the pins and EXTEST on `gpo`;
- a BIST run that is stopped and resumed;
- the PLL check;
- the internal registers read over JTAG (DEBUG).

It counts each of these mechanisms and fails if any never happened. The
JTAG bench tasks are in `tb/jtag_tasks.svh`.

`tb_amt2_rates` runs the specified rates through the full-size core:
random pulses on all 24 channels and 100 kHz random triggers, about 500
events per run. The runs are:

- 400 kHz per channel in edge mode, with parallel read-out;
- the same over DS serial at 80 Mbit/s;
- 100 kHz per channel over data+clock at 40 Mbit/s;
- 400 kHz per channel in pair mode over data+clock at 40 Mbit/s.

Each run must read out every event unchanged and set no overflow flag.
Together the four runs take about ten seconds of simulation.
