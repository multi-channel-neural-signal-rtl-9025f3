# 2048-channel neural recording controller

This is the FPGA logic of a neural recording system for an implantable
brain-computer interface. The system reads 2048 electrode channels at
30 kS/s with 16-bit resolution. The channels sit on sixteen sensor units.
Each unit carries two RHD2164 front-end chips, and each chip holds 64
amplifiers, a multiplexer and a 16-bit ADC. The controller sits between the
sensor units and a host PC. It drives all sixteen SPI buses at once and frames
the samples into fixed-size packets. It streams them to a USB bridge and
carries out the host's instructions: start, stop, sampling rate, and raw
commands for the chips.

The logic is split into an SPI master, a command manager, a clock manager and
data storage. This design adds a sample buffer and a packet formatter to
produce the upload format.

```
 host words ──► cmd_manager ──┬──► spi_master ×16 ──► SCLK/MOSI/CS_n[2] ──► sensor unit
 (32-bit)            │        │        ▲ MISO[2]
               clock_manager  │        │ {B,A} per chip
               (SCLK enable,  └──► sample_buffer (two banks)
                sample tick)                │
                                 packet_formatter ──► data_fifo ──► upload words (32-bit)
```

## One sample period

One sample period runs all the way through the design in these steps:

1. **Tick.** `clock_manager` pulses `sample_tick` every `period` system
   clocks. At reset, `period` is 3200 cycles of the 96 MHz clock, which gives
   30 kS/s per channel.
2. **34 SPI frames, in lock step.** `cmd_manager` sends the same command to all
   sixteen `spi_master`s in the same cycle, so they stay in lock step. It
   follows the `done` of unit 0, and an assertion in the top checks that every
   unit agrees. The commands are `CONVERT(0)` … `CONVERT(31)` and then two
   dummy reads.
3. **Two channels per chip per frame.** MISO is double data rate. The bit read
   just before each rising SCLK edge belongs to *channel A*, which is channel
   `c`. The bit read just before each falling edge belongs to *channel B*,
   which is channel `c+32`. So 32 frames cover all 64 channels. This is the
   only way the budget closes. Reading one channel per frame would need
   64 × 16 bits × 30 kHz = 30.7 Mbit/s, but the SCLK is only 24 MHz.
4. **Two-frame result latency.** The chip returns a result two frames after
   the command that asked for it. Frame `j` therefore carries the results of
   `CONVERT(j-2)`. `cmd_manager` writes frames 2…33 to buffer words 0…31. The
   two dummy frames at the end only drain the pipeline.
5. **Bank hand-over.** When frame 33 ends, the filled bank of `sample_buffer`
   goes to `packet_formatter` together with the period's 8-bit sequence
   number. The next period then writes the other bank.
6. **Upload.** `packet_formatter` emits 32 packets of 33 words each, 1056
   words in total, into `data_fifo`. The USB side drains the FIFO.

Timing budget at the defaults:

| item | cycles (96 MHz) |
|---|---|
| one SPI frame: 1 + 32 + 1 + 7 half periods of SCLK, 2 cycles each | 82 |
| 34 frames | 2788 |
| sample period (30 kS/s) | 3200 |
| upload of one period, one word per cycle | 1056 |

## Upload format

All words are 32 bits. A sample period produces one packet per chip. Chip `k`
is `2*unit + chip`, and packets go out in order k = 0…31:

| word | content |
|---|---|
| header | `{16'hBBAA, seq[7:0], group[3:0], channel[3:0]}` with group = k mod 4, channel = k div 4 |
| data 0…31 | `{B[15:0], A[15:0]}`: word w holds channel w in the low half and channel w+32 in the high half |

So one period's headers read `BBAAss00, BBAAss10, BBAAss20, BBAAss30,
BBAAss01, …`, where `ss` is the sequence number. A unit with no chips
attached reads `FFFFFFFF`, because its MISO lines are pulled high. After the
last period of a run, a single ending flag `DDCCBBAA` follows.

The sequence number counts sample periods from START, modulo 256. It also
counts a period that was dropped (see below), so a host sees the loss as a gap
in the numbers.

## Host instructions

These are 32-bit words on a valid/ready stream, with the op code in bits
[31:28]:

| op | name | argument | behaviour |
|---|---|---|---|
| 1 | START | [23:0] number of periods, 0 = until STOP | restarts the sample timer; the first tick comes one period later |
| 2 | STOP | – | the period in progress completes, then the ending flag is sent |
| 3 | SPI | [15:0] command, [17:16] chip mask | sent to the selected chips of every unit; held off (`h_ready` low) while a run is active; results are discarded |
| 4 | SET_PERIOD | [15:0] period in clocks (min 2) | takes effect at the next tick |

Configuring the chips (register writes, calibration) is left to the host,
which uses SPI commands for it. The controller itself only sends CONVERT and
dummy READ commands.

## When the data does not keep up

There are three overload cases:

- **USB back-pressure.** When `data_fifo` is full, the formatter stalls. The
  FIFO holds 4096 words, about four periods.
- **Overrun.** Sometimes a period finishes while the formatter is still
  sending the previous one. The new period is then dropped, not queued.
  `overrun_cnt` counts such periods, and the next period writes over the same
  bank.
- **Missed tick.** If `period` is shorter than the 34 frames need (below about
  2800 cycles), a tick that comes during a running conversion is ignored and
  counted in `tick_miss_cnt`. In effect the sample rate halves.

The full rate needs 126.7 MB/s upstream (1056 words × 4 B × 30 kHz). The USB
link must sustain that, or the overrun path is taken.

## Modules

| file | role |
|---|---|
| `rtl/ncr_pkg.sv` | sizes, RHD2164 command codes, header struct, host op codes |
| `rtl/ccm_top.sv` | top: wiring of everything below, lock-step assertion |
| `rtl/clock_manager.sv` | SCLK half-period enable and programmable sample tick |
| `rtl/spi_master.sv` | 16-bit mode-0 SPI master, shared SCLK/MOSI, per-chip CS_n/MISO, DDR read of A/B |
| `rtl/cmd_manager.sv` | instruction parser, 34-frame sequencer, bank and sequence bookkeeping, end request |
| `rtl/sample_buffer.sv` | 2 banks × 16 units × 32 words × 64 bits; all units written at once, one word read asynchronously |
| `rtl/packet_formatter.sv` | header / data / ending-flag stream |
| `rtl/data_fifo.sv` | 4096 × 32 FIFO with registered output |

Top parameters are `SYS_CLK_HZ` (96 MHz), `SCLK_HZ` (24 MHz), `SAMPLE_HZ`
(30 kHz) and `FIFO_DEPTH` (4096). The unit and chip counts are in `ncr_pkg`.
The packet header has room for at most 32 chips.

All flip-flops reset asynchronously on `rst_n` low. Memory contents are not
reset.

## What follows the source and what is this design's own

These values come from the published system:
- 16 units × 2 chips × 64 channels
- 16-bit samples and 16-bit SPI words at 24 MHz
- SCLK idles low
- shared SCLK/MOSI with separate CS/MISO per chip
- 30 kS/s
- the packet header fields, magic number and ending flag
- 64 channels per packet as 32 A/B word pairs

These are this design's own choices:
- the 96 MHz system clock
- the lock-step sequencing and the 34-frame period
- the 2-frame result latency and the CONVERT/READ codes, taken from the
  RHD2164 itself
- the chip-to-group/channel numbering (chosen to reproduce header sequences
  like `BBAA0000, BBAA0010, BBAA0020`)
- the double-banked buffer and the FIFO depth
- the host instruction encoding
- the stop, overrun and missed-tick policies

The source gives the channel-number field as both "0-7" and "0-127". This
design uses 0-7, because that fits a 4-bit field.

Not included:
- the RHD2164 itself (analog, bought in)
- the USB bridge, power supply and JTAG
- the host software, which does settings, display and spike extraction

MISO is sampled at the SCLK edge the master itself produces. A long cable
would need a delay-compensated capture, which is not provided.

## Simulation

Each module has a self-checking bench in `tb/`, which prints
`TB_RESULT checks=N failures=M`. `tb/rhd2164_model.sv` is a behavioural
model of the chip's SPI side. It has DDR MISO, the two-frame result latency,
register WRITE/READ and a sample formula
`{chip_id[4:0], channel[5:0], sample_index[4:0]}`, which lets a bench check
every word it receives.

`tb/tb_ccm_top.sv` runs the full-size design with all parameters at their
defaults. Units 0–14 carry models and unit 15 is left open. The bench decodes
and checks every uploaded word and goes through these steps:
1. a forwarded register write
2. a 2-period run, checking the 3200-cycle period
3. a continuous run at a new rate with the USB side stalled, which fills the
   FIFO, stalls the formatter and drops periods, ended by STOP
4. a run with a too-short period, which misses ticks

It counts each of these mechanisms and fails if one never happens.

```
verilator --binary --timing --assert -y rtl -y tb rtl/ncr_pkg.sv tb/tb_ccm_top.sv \
    --top-module tb_ccm_top -Mdir obj_top
./obj_top/Vtb_ccm_top
```

`tb/tb_unconnected_dump.sv` runs the top, again at its defaults, with no
chips attached at all. It checks the byte layout of a three-period upload:
- headers `BBAA0000`, `BBAA0010` and `BBAA0020` at byte offsets 0x000, 0x084
  and 0x108
- every data word `FFFFFFFF`
- `DDCCBBAA` as the last word

The other benches build the same way. Name the bench file and its module in
place of `tb_ccm_top`, and keep `rtl/ncr_pkg.sv` first so the package is read
before the modules that import it.
The full-size run takes well under a second.
