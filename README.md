# RHD2000 headstage peripheral for a soft-core acquisition platform

Intan RHD2000-family headstages amplify and digitise up to 32
electrophysiology channels. The host talks to them through a 16-bit SPI
command stream. Every sample of every channel costs one SPI word, and every
answer comes back two words late. A small soft-core processor driving that
stream by software would spend most of its time on it and would also add
jitter to the sample clock.

This RTL moves the whole conversation with the chip into FPGA logic. The
processor writes a few registers over AXI4-Lite and starts one of three
hardware processes:

- **INI** sets up the chip. It writes the 18 configuration registers, runs the
  ADC calibration and copies the chip's ROM into the peripheral.
- **Direct Com** sends one arbitrary command and returns the chip's answer.
- **CH Reader** is the acquisition loop. After each stimulus trigger it raises
  a blanking output and converts a chosen set of channels at a fixed sample
  period for a fixed window. It streams the frames to the host through a
  65,536-word FIFO and a UART.

The processor is interrupted only when a process ends (`i_peri`) or when
data was lost (`i_tx_overrun`).

The design targets a 96 MHz clock, the rate of the reference platform (an
Artix-7 with a Cortex-M1 soft core). At that rate the SPI clock is 24 MHz,
the fastest the headstage accepts.

```
            AXI4-Lite                                             SPI
 processor ==========> rhd_axi_regs ----> rhd_control (FSM, IRQs)
                       64 x 32 regs            | sel
                        |   ^                  v
           cfg, cmd,    |   | results   +-------------+      +----------------+
           loop/Tx      v   |           | rhd_spi_mux |<====>| rhd_spi_master |<==> headstage
           settings  +-----------------+|             |      +----------------+
                     | rhd_ini         ||  one of     |
                     | rhd_direct_com  ||  three      |
                     | rhd_ch_reader --++-------------+
                     +-------|---------+
                             | header + samples          stim_trig --> rhd_ch_reader --> out_blnk
                             v
                       rhd_tx_data: rhd_tx_fifo (65,536 x 16) -> rhd_uart_tx --> uart_txd
```

## The SPI word and the two-word answer delay

`rhd_spi_master` sends one command per chip-select frame:

- SCLK idles low.
- MOSI changes on the falling edge. The chip samples it on the rising edge.
- MISO is captured on the rising edge.
- Both words go MSB first.

By default a frame uses these clock counts:

| Phase | Clocks |
|---|---|
| CS low to first SCLK rise | 2 |
| First SCLK rise to last SCLK fall | 15.5 SCLK periods = 62 |
| Last SCLK fall to CS rise | 2 |
| CS high | 16 minimum |

When a process issues words back to back, one word takes **84 clocks
(875 ns)**. That is the 82 clocks above plus a two-clock handshake between
words, so CS stays high for 18 clocks between consecutive words. The rising edge of CS starts the chip's next ADC conversion.

The word the chip returns during a frame is the answer to the command sent
**two frames earlier**. Each process handles this delay in its own way:

- **Direct Com** sends the command, then two dummy `READ(63)` words. It keeps
  the word received during the last dummy. One direct command costs 3 words;
  `done` comes 253 clocks after `go`.
- **INI** walks a fixed list of 41 words:

  | Words | Content |
  |---|---|
  | 0–1 | 2 dummies |
  | 2–19 | `WRITE(r, cfg[r])` for registers 0..17 |
  | 20 | `CALIBRATE` |
  | 21–29 | 9 dummies (calibration time) |
  | 30–38 | `READ` of 40..44 and 60..63 |
  | 39–40 | 2 dummies |

  INI takes the answer to word *w* during word *w*+2. That fills the ROM copy
  ("INTAN", die revision, unipolar flag, amplifier count, chip id). The run
  takes 1 + 41 × 84 clocks (about 36 µs).
- **CH Reader** tags each word it sends with its channel number. The tag goes
  into a three-entry shift register, so the answer arriving with a word
  belongs to the entry that is two positions older. Each sweep ends with two
  dummy words, so all of a sweep's samples arrive within that sweep. Words
  left in the chip by another process are never taken for samples.

Command encodings (RHD2000 convention):

| Command | Word |
|---|---|
| `CONVERT(c)` | `00cccccc_00000000` |
| `CALIBRATE` | `01010101_00000000` |
| `CLEAR` | `01101010_00000000` |
| `WRITE(r,d)` | `10rrrrrr_dddddddd` |
| `READ(r)` | `11rrrrrr_00000000` |

## The acquisition loop (CH Reader)

Loop settings come from four registers:

- **ChSel**: 32-bit channel mask.
- **Time**: sample period in clocks in `[15:0]`. The window length in frames
  (Tsave × Fs) is in `[31:16]`.
- **Blanking**: the OUT_BLNK length in clocks.
- **Nest**: the number of stimuli.

**Stimulus mode (Nest > 0).** The loop waits for a rising edge on `stim_trig`.
The input is asynchronous, synchronised by two flip-flops. The edge does two
things:

- It raises `out_blnk` for exactly Blanking clocks. Conversions go on during
  blanking; the pulse is for the external circuit that suppresses the
  stimulation artifact.
- It opens a window of `nsave` frames, one every `period` clocks, starting at
  once.

Triggers that arrive while a window is open are ignored. After Nest windows
the loop ends and raises `i_peri`.

**Free-running mode (Nest = 0).** Frames are taken from the start command
on, with no trigger and no blanking, until software sets the stop bit. Stop
also works in stimulus mode. It takes effect at the next frame boundary, or
at once while the loop waits for a trigger.

**A frame** is one sweep of SPI words:

- `CONVERT(c)` for each selected channel, in ascending order;
- then two dummy words.

A sweep of *n* channels takes (*n* + 2) × 84 + 1 clocks. All 32 channels take
2857 clocks (29.8 µs), so they can be sampled up to about 33.6 kHz.

The period counter is 16 bits of the 96 MHz clock. The longest period is
65,536 clocks (a period field of 0) = 682.7 µs, so the lowest sample rate is about 1.46 kHz. If
the period is shorter than a sweep, the next tick is remembered and the next
sweep starts one clock after the current one ends. The loop then runs as fast
as the SPI allows and nothing is skipped silently.

Each sample goes to that channel's ChR register. When `Tx_ctl[16]` is set it
is also pushed into the Tx FIFO as part of a packet:

```
{8'hA5, frame_number[7:0]}  sample(ch_a)  sample(ch_b) ...   (ascending channel order)
```

The frame number restarts at 0 with each loop and counts frames across
windows. A receiver that does not find `A5` where the next header should be
has lost bytes. A jump in the frame number means whole packets were lost.

## Data path and the rate budget

`rhd_tx_data` pops one word at a time from the FIFO. It sends each word as
two 8N1 bytes, high byte first (big-endian), with `Tx_ctl[15:0]` clocks per
bit. The reset value is 96, which gives 1 Mbit/s. A value of 8 gives
12 Mbit/s, the ceiling of a typical USB-UART bridge. While the FIFO holds
data, one word leaves every 20 × div + 6 clocks.

Words are sent as soon as they reach the FIFO, while the window is still
running. They are not held back until the window ends. The FIFO only fills
when the loop produces words faster than the line can carry them.

Since each 16-bit word costs 20 bits on the line, one stimulus period can
carry R / (20 · F_stim) words. The loop produces Fs · (N + 1) · Tsave words
per stimulus, where the +1 is the header. The loop settings must satisfy

    R / (20 · F_stim)  ≥  Fs · (N + 1) · Tsave

or the FIFO keeps growing from one stimulus to the next.

Within one stimulus the FIFO absorbs bursts. It holds 65,536 words: 3855
frames of 16 channels, or 0.39 s at 10 kHz. A word written into a full FIFO
is dropped and sets the I_TX_OVERRUN flag.

Worked examples:

| Configuration | Sample period | Words/s | Fits? |
|---|---|---|---|
| 16 ch @ 10 kHz | 9600 clk | 170,000 | Continuous at 12 Mbit/s (578 k words/s). At 1 Mbit/s with a 1 Hz stimulus: Tsave ≤ 0.29 s |
| 16 ch @ 5 kHz | 19,200 clk | 85,000 | Continuous at 12 Mbit/s. At 1 Mbit/s: Tsave ≤ 0.59 s |
| 16 ch @ 1 kHz | 96,000 clk | 17,000 | **No**: above the 16-bit period limit. Needs `PERIOD_W = 17` in `rhd_ch_reader` |
| 32 ch, full sweep | ≥ 2857 clk | up to 1.1 M | Period fits; the UART limits the duty cycle |

## Register map

All registers are 32 bits wide at byte address 4 × index. The layout mirrors
the chip's own register map: indices 0..17 hold the chip's configuration
registers, and 40..44 and 60..63 hold copies of its ROM. The peripheral's own
registers fill the gaps.

| Index | Name | Access | Fields |
|---|---|---|---|
| 0..17 | Config | RW | `[7:0]` value written to chip register *i* by INI |
| 18 | DirectCMD | RW | `[15:0]` command word for Direct Com |
| 19 | DCResp | RO | `[15:0]` answer to the last direct command |
| 20 | Status | see right | Bits 0..3: write 1 to start INI, Direct Com or the loop, or to stop the loop (they read 0). Bit 8 busy, bits 10:9 control state (0 idle, 1 INI, 2 Direct Com, 3 loop), bit 11 OUT_BLNK. Bits 16 and 17: I_PERI and I_TX_OVERRUN flags, write 1 to clear. Bits 26:24: which process raised I_PERI last (loop, Direct Com, INI) |
| 21 | ChSel | RW | channel mask |
| 22..37 | ChR | RO | latest sample of channel 2k in `[15:0]`, of 2k+1 in `[31:16]` |
| 38 | Blanking | RW | OUT_BLNK length, clocks |
| 39 | Time | RW | `[15:0]` sample period in clocks, 0 meaning 65,536 (reset 9600 = 10 kHz); `[31:16]` frames per window (reset 1) |
| 40..44 | ROM | RO | copy of chip registers 40..44 ("INTAN") |
| 45 | Tx_ctl | RW | `[15:0]` clocks per UART bit (reset 96); `[16]` stream loop data |
| 46 | Tx_status | RO | `[16:0]` FIFO level; 17 overrun flag; 18 Tx busy |
| 47 | Nest | RW | `[15:0]` stimuli per loop, 0 = free running |
| 60..63 | ROM | RO | copy of chip registers 60..63 |

Behaviour of the bus and control logic:

- **Bus.** Writes honour WSTRB. The AW and W channels are accepted
  independently. B answers one clock after both have arrived, and R one
  clock after AR. Every response is OKAY.
- **One process at a time.** The control FSM runs one process at a time.
  A start request that arrives while a process runs is ignored. If several
  start bits are written together, INI wins over Direct Com, and Direct Com
  over the loop.
- **Interrupts.** Both lines are levels. They stay high until software
  writes 1 to the matching Status bit.

## Typical session (software view)

1. Write Config 0..17. Write 1 to Status bit 0. Wait for `i_peri`, then clear
   it. The ROM copy should now read "INTAN".
2. Optionally: write a command to DirectCMD, set Status bit 1, wait for
   `i_peri`, and read DCResp.
3. Write ChSel, Time, Blanking and Nest. Write Tx_ctl with bit 16 set.
   Set Status bit 2. Each stimulus trigger then yields one window of packets
   on `uart_txd`. When all Nest windows are done, `i_peri` rises with cause
   "loop".

## Files

| File | Block |
|---|---|
| `rtl/rhd_pkg.sv` | constants, register indices, state and selection enums, SPI request/response structs, command encoders |
| `rtl/rhd_peripheral.sv` | top level: all blocks wired together |
| `rtl/rhd_axi_regs.sv` | AXI4-Lite slave and register bank |
| `rtl/rhd_control.sv` | control FSM, SPI grant, interrupt flags |
| `rtl/rhd_ini.sv`, `rtl/rhd_direct_com.sv`, `rtl/rhd_ch_reader.sv` | the three processes |
| `rtl/rhd_spi_mux.sv`, `rtl/rhd_spi_master.sv` | SPI path |
| `rtl/rhd_tx_data.sv`, `rtl/rhd_tx_fifo.sv`, `rtl/rhd_uart_tx.sv` | data path to the host |
| `tb/tb_*.sv` | one self-checking testbench per block, plus `tb_rhd_peripheral` (end to end) and `tb_rhd_workloads` (recording configurations) for the whole design |
| `tb/rhd2132_model.sv` | behavioural model of the headstage's SPI side (simulation only) |
| `tb/uart_rx_model.sv` | 8N1 receiver used to decode `uart_txd` |

The top-level parameters are `FIFO_DEPTH` (65,536), `SCLK_DIV` (4) and the
chip-select margins `CS_LEAD`, `CS_TRAIL` and `CS_OFF` (2, 2 and 16 clocks).
`rhd_ch_reader` has `PERIOD_W` (16).

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends itself. Each
also has a watchdog. With Verilator 5:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/rhd_pkg.sv tb/tb_rhd_peripheral.sv --top-module tb_rhd_peripheral
./obj_dir/Vtb_rhd_peripheral
```

Replace `tb_rhd_peripheral` with any other `tb_*` module to test one block.

The end-to-end test runs the top at its default parameters, including the
full 65,536-word FIFO. It takes about 20 s and goes through:

- INI;
- two direct commands;
- a two-stimulus loop, with a stray trigger, whose UART stream is decoded
  word by word;
- a free-running loop whose period is shorter than a sweep, stopped by
  software;
- a 32-channel loop at 1 Mbit/s that fills the FIFO until I_TX_OVERRUN fires.

It counts each of these mechanisms and fails if one never happened.

`tb_rhd_workloads` runs the recording configurations this peripheral is
meant for, also at default parameters, in about 10 s:

- 16 channels at 10 kHz and at 5 kHz, streamed at 12 Mbit/s;
- 16 channels at 10 kHz at the 1 Mbit/s default, with one stimulus rate
  that meets the rate budget and one that does not.

It checks three things:

- Sweeps start exactly one period apart.
- The first sweep follows the trigger edge by a fixed 5 clocks.
- Every packet arrives intact. The FIFO is empty before the next stimulus
  exactly when the budget inequality holds.

The expected samples come from a formula in the headstage model, not from the
design. The testbenches rebuild the expected stream from it on their own.

## How far to trust it, and where it is this design's own

**Source.** The block split, the register names, the ports, the interrupts,
the FIFO size, the 24 MHz SPI, the big-endian two-byte samples, the packet
header and the rate budget all follow the published peripheral. That
description gives the function of each block but not its internals.

**This design's own choices:**

- the register indices and bit fields;
- the header value;
- the chip-select margins;
- the trigger input;
- the free-running mode and the stop bit;
- the one-process-at-a-time FSM and its priorities;
- the flag-and-clear interrupt style;
- the drop-on-full FIFO policy;
- sending samples while the window is still running.

The INI command list and the command encodings come from the RHD2000 data
sheet conventions, not from the peripheral's own description.

**Blanking.** OUT_BLNK is only a timed pulse that starts with the trigger.
The published peripheral manages blanking to suppress stimulation
artifacts, but it does not say how. Any adaptive behaviour beyond a
programmable window is not modelled.

**Sample period limit.** The 16-bit period counter matches the stated
longest period of about 682 µs. That rules out the 1 kHz per-channel rate
that was also used in bench tests. Widen `PERIOD_W` if that rate is needed.

**Internal links.** The internal links are plain valid/start/done handshakes,
not AXI4-Stream.

**What is not here:**

- the Cortex-M1;
- the MMCM that makes 96 MHz;
- the command UART and its text protocol (software on the processor);
- the DDR3L buffering mode;
- the USB bridges;
- the headstage itself.

The AXI4-Lite port, the SPI pins, `stim_trig`, `uart_txd` and the interrupt
lines are where those parts connect.

**Verification.** Everything has been simulated against the behavioural
headstage model. Nothing has been run on hardware. The SPI master captures
MISO on the SCLK rising edge without compensating for cable delay. With long
headstage cables, that sampling point may need to move.
