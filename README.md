# Acquisition and control FPGA for a 64-pixel cosmic-ray camera

A silicon-photomultiplier camera sees two very different kinds of cosmic-ray
signal on the same 64 front-end trigger lines. Some showers are a flash of a
few nanoseconds that lights several pixels at once. Others last tens of
nanoseconds or longer and show up only as a rise in the photon rate summed
over the whole camera. This design watches every line in two ways at the same
time:

* a **sampler** takes a 1 GS/s bit picture of all 64 lines and fires a
  *majority trigger* when enough pixels are lit within a few nanoseconds;
* a **counter** chain counts photon pulses per pixel at up to 250 MHz and
  fires a *slow trigger* when the moving average of the summed counts
  crosses a threshold.

A **trigger manager** combines the two triggers and an external one through a
programmable coincidence table. It issues Trig-Out, timestamps the event and
briefly drops ACQUIRE. While ACQUIRE is low, each module copies the stretch of
its free-running ring memory around the trigger into a double-buffered stack.
A **peak reader** then digitises the analog peak detectors of the pixels that
were hit. A host computer drains the stacks over a byte-stream protocol with
flow control; in this design the link is a UART. Everything is written in
synthesizable SystemVerilog in `rtl/`. Self-checking testbenches are in `tb/`.

```
 trig_in[63:0] ──┬─► counters_module ── slow trigger ───────┐
                 │    (500 MHz dual counters, ring, stacks)  │
                 │                                           ▼
                 ├─► sampler_module ── majority trigger ──► trigger_manager ──► Trig-Out
                 │    (4 x 250 MHz phases, ring, stack,      ▲   │  (coincidence, stamp,
                 │     phase detector, hit info)             │   │   ACQUIRE, resets,
                 │            │ hit info        trig_ext_in ─┘   │   rates, PPS/10 MHz time)
                 │            ▼                                   │ ACQUIRE
                 │     peak_reader ◄── ADC / front-end mux        ▼ (to both modules)
                 │
 host UART ◄──► uart_rx/uart_tx ◄──► io_comm_controller ──device bus──► cfg_regs, stacks,
                                      (ATN/COMMAND/RESPONSE/PAYLOAD)     time, rates, SPI, I2C,
                                                                         test pulser
```

## Clocks

| Clock | Frequency | Used by |
|---|---|---|
| `clk` | 250 MHz | System clock. Also phase 0 of the sampler. |
| `clk_ph[1..3]` | 250 MHz, shifted 90°/180°/270° | The other three sampler capture stages. |
| `clk_fast` | 500 MHz | Edge detectors and dual counters only. |
| `clk10m`, `pps` | 10 MHz and 1 Hz | External time reference. Synchronised inside. |

All clocks are top-level inputs; the PLL that makes them is outside this RTL.
Resets are asynchronous and active low (`rst_n`).

## Sampling at 1 GS/s with four 250 MHz stages

A single flip-flop cannot be clocked at 1 GHz, and neither can block RAM.
Instead, four identical capture stages each sample all 64 lines on their own
phase clock, so their samples are 1 ns apart. `phase_sync` is a register chain
that walks ACQUIRE through the phases in order (stage *i* registers stage
*i*−1 on `clk_ph[i]`). This makes all four stages start and stop on the same
frame, so a frame never holds samples from two different acquisitions. The
four 64-bit samples are then registered again on `clk_ph[0]` as one 256-bit
*frame*, and everything after that point runs on `clk`.

Each frame goes to:

* **the ring memory** (`ring_memory`): 64 frames of 256 bits (256 ns),
  written every clock while acquiring and frozen when ACQUIRE falls;
* **the majority trigger** (`majority_trigger`): one stage per phase.
  Stage *p* ORs sample *p* with the three samples before it; for *p* < 3 the
  window reaches back into the previous frame. This way a shower spread over
  up to four consecutive nanoseconds still counts fully. The lit pixels are
  then counted in a two-level adder pipeline (groups, then total) and
  compared with the threshold `thr`. The latency is fixed at 4 clocks from
  frame to `stage_trig`, whatever the data. That fixed latency is what lets
  a fixed read offset put the trigger frame at a known position in the
  event. `thr = 0` disables the trigger;
* **the trigger phase detector** (`trig_phase_det`): because of the OR,
  neighbouring stages usually all fire together. The detector pulses
  `trigger` on the first clock with any stage set, and reports the lowest
  set stage as `trig_phase`. That stage is the sample of the frame in which
  the majority was first reached, giving 1 ns resolution. It re-arms when
  all stages are quiet again;
* **the hit-info generator** (`hit_info_gen`): builds the 64-bit map of
  pixels the peak reader should digitise. It has three modes:

  | Mode | Pixels in the map |
  |---|---|
  | 1 | The OR word of the first trigger only. |
  | 2 | That word, plus the OR word of every later trigger. |
  | 3 | That word, plus every later frame's OR word. |

  Optionally (`win_en`) the accumulation stops `win_len` clocks after the
  first trigger. The map is cleared when the next acquisition starts.

When ACQUIRE falls, the sampler waits for the trigger pipeline to drain. It
then writes an event to its stack:

1. A four-word header: seconds, tenths of a microsecond, and event counter
   from the stored timestamp, then an info word. The info word holds bit 31
   "a trigger was seen", the trigger phase in bits 17:16, and in bits 15:0
   the number of frames written after the trigger frame.
2. `ev_rows` frames of 8 words each. The last frame copied lies `ev_offset`
   frames before the newest one. In a frame, word *j* bit *c* is sample
   *s*, pixel *k*, where 32·*j* + *c* = 64·*s* + *k*.

The defaults are 8 frames, offset 4 and threshold 4 pixels.

## Counting photons at 500 MHz

Each pixel line first goes through `edge_loss_det` on `clk_fast`. This block
turns a pulse of any length (the shortest front-end pulses are about 2 ns)
into one enable per leading edge. It also raises `loss` if the line stays
high for 64 fast clocks.

That enable drives `dual_fast_counter`: two 8-bit synchronous counters with
asynchronous clear. The pulse is never used as a clock. Only one counter of
the pair counts at a time. The other one holds still, is read, and is then
cleared through its asynchronous clear. This is why there are two: an
asynchronous clear cannot be timed into a single clock cycle without losing
counts. The counter is small and simple so that it closes timing at
500 MHz. With `SHIFT_ENC = 1` it is built as a Johnson shift register plus
encoder instead of a binary counter, which can be easier to place on some
devices.

In `counters_module`, the `acq_clear_timer` ticks every `period` clocks of
`clk` while ACQUIRE is high (default 64, i.e. 256 ns). Each tick does the
following:

1. It toggles which counter of every pair counts.
2. The toggle is synchronised into the fast domain.
3. Three `clk` cycles later, the now-stopped counters are captured in `clk`
   flops.
4. The stopped counters get a two-cycle clear.

While ACQUIRE is low, both counters of every pair are held clear. `period`
must be at least 8 clocks. It must also be short enough that no counter
passes 255 within one period.

Each captured word goes to three places:

* **the per-pixel `counter_acq_block`**: a ring of the last 64 words, and a
  32-bit adder that accumulates `rate_ticks` words (default 16) into one
  background-rate word for its own small stack. When ACQUIRE falls, an event
  of 3 header words plus `ev_len` count words (default 16) is copied to the
  per-pixel event stack. The newest word copied is `ev_offset` ticks older
  than the last one written;
* **the slow trigger** (`slow_trigger`): sums all 64 words in two pipelined
  stages. It keeps a moving average over 2^`avg_log2` transfers (1 to 16)
  and raises `trigger` when the average first exceeds `thr`. The
  `trigger_dly` output goes through a delay line of up to 63 clocks, chosen
  by `delay`. The trigger manager uses `trigger_dly`;
* **a data-out multiplexer**: the host reads one pixel's stacks at a time,
  and register 3 selects the pixel.

## Trigger manager and the acquisition cycle

`trigger_manager` treats the counter trigger, the sampler trigger and
`trig_ext_in` alike. Each one is synchronised, its leading edge is found, and
the edge opens a coincidence window (`coinc_input`) of programmable length.
A new edge restarts the window. The three window levels index an 8-entry
truth table `coinc_lut` (entry index = {ext, sampler, counters}). Any OR,
AND or 2-of-3 rule can be loaded. Examples: `0xFE` is any source, `0x88` is
counters AND sampler, `0xF0` is external only.

While the run flag is set and ACQUIRE is high, a rising edge of the table
output is **Trig-Out**. Trig-Out does three things:

* it copies the current seconds, tenths of a microsecond and event counter
  into `stamp`, then advances the counter;
* it drives `trig_ext_out` for other instruments;
* it drops ACQUIRE for `acq_hold` clocks (default 512), which is the time
  the modules need to copy their events.

ACQUIRE then rises again by itself as long as run is set. The counters and
the sampler each get their own ACQUIRE and can be enabled separately.

Each fall of ACQUIRE starts a `reset_timer`: after `delay` clocks it gives a
reset pulse of `width` clocks to the front end (`acq_reset_fe`). Four
`rate_meter`s count counter-trigger edges, sampler-trigger edges,
external-trigger edges and Trig-Outs per PPS second.

`time_generator` synchronises PPS and 10 MHz to `clk` and keeps two 32-bit
counters:

* seconds, which advance on PPS and can be preset from the host;
* tenths of a microsecond since the last PPS, counted on 10 MHz edges.

At each PPS it also reports a *shift error*: the number of 10 MHz edges
counted in that second minus 10,000,000.

## Peak reader

Reading one peak detector takes five steps: select it on the front-end mux,
let the mux settle, start the ADC, wait for it, and store the result. Done
one channel at a time, this would dominate dead time. `peak_reader` instead
runs a three-stage pipeline in fixed slots of `slot_cycles` clocks
(default 8). While channel *n* settles on the mux, channel *n*−1 converts and
channel *n*−2 is written to the stack.

At each slot boundary three things happen:

* the converting channel's result is taken (the boundary waits while
  `adc_busy` is high);
* the settled channel gets `adc_start`;
* one clock later the mux moves on (`ch_addr` with a `ch_clk` strobe).

It starts at the end of every sampler acquisition. Which channels it reads:

* By default, only channels whose bit is set in the hit map. The map comes
  from the sampler's hit info, or from the front end's own `hit_fe` lines.
* With *complementary* set, the pair channel (address XOR 1) of every hit
  channel too.
* With *all* set, every channel.
* With *pre-scan* set, the reader first scans the hit map into an address
  list and then addresses the list directly. Without it, the reader searches
  for the next selected channel in place.

Each record has three parts:

| Part | Contents |
|---|---|
| Header (optional) | Seconds, tenths of a microsecond, time shift error, event counter. |
| Body | Per channel: an optional time word, then `{channel[7:0], hit, 7'b0, adc[15:0]}`. |
| Footer (optional) | Hit map (2 words), sum of the ADC values, maximum value, channel of the maximum, read time in clocks. |

`ch_clr` clears the peak detectors at the end of the record. Starts that
arrive while the stack has no room are refused and counted in `dropped`.

## Double-buffered stacks

Every event store (`dbuf_stack`) has two banks. The writer fills one bank
with whole events while the host empties the other, so readout never stops
acquisition. A bank is handed to the reader when one of two things happens:

* after an event, fewer words are free in it than the largest possible
  event;
* the host sets the flush flag.

The reader sees only completed banks. `rd_avail` is the number of words left
in the readable bank, and `rd_data` shows the word at its head. Writes that
find no free bank are refused and counted; the writer never blocks.

## Host protocol

`io_comm_controller` speaks a transaction protocol over any byte stream. In
this design the stream is a UART, 8N1, 25 clocks per bit, which is 10 MBaud
at 250 MHz.

Every transaction runs as follows:

1. The host sends ATN (`A5`).
2. The device answers ATN_RET (`5A`).
3. The host sends a 4-byte COMMAND: op, address high, address low, and
   length in words (0 = 256).
4. The device answers BUSY (`B5`), READY (`C3`), and a 6-byte RESPONSE:
   op | 0x80, status (0 = accepted, 1 = unknown op), and a 32-bit value.
   Values are sent most significant byte first.

Then, depending on the op:

| Op | Type | After the response |
|---|---|---|
| `10` / `11` set / clear flag[addr] | TASK | Nothing. |
| `12` read lines, `13` read status, `14` read flags | TASK | Nothing (the value is in the response). |
| `20` WRITE (incrementing address), `21` WRITE_FIX (fixed address) | WRITE | The device sends READY, the host sends `len` words, the device sends READY. |
| `30` READ (incrementing address), `31` READ_FIX (fixed address) | READ | The device sends BUSY, READY, `len` words, then READY. |

During a READ payload, the host can send BUSY to pause the device and READY
to resume it. If a COMMAND or WRITE payload stalls for `TIMEOUT` clocks
(default 250,000, i.e. 1 ms), the transaction is abandoned and counted.
Outside a transaction, only ATN is honoured. Payload words move over a
simple device bus: a write is strobed with address and data; a read is
strobed and the data is taken on the next clock. The op codes and byte
values are all in `io_cmd_pkg`, so they can be changed in one place.

### Configuration registers (device bus addresses 0–31)

| Reg | Fields | Reset |
|---|---|---|
| 0 | counter transfer period [15:0]; ticks per rate word [31:16] | 64, 16 |
| 1 | counter event length [6:0]; counter event offset [13:8] | 16, 0 |
| 2 | slow-trigger threshold [13:0]; log2 average length [18:16]; delay [29:24] | 256, 0, 0 |
| 3 | pixel whose counter stacks are read | 0 |
| 4 | majority threshold [6:0]; sampler frames [13:8]; frame offset [21:16]; hit mode [25:24]; hit window enable [26] | 4, 8, 4, 1, 0 |
| 5 | hit window length [15:0] | 0 |
| 6 | peak slot clocks [7:0]; read all [8]; complementary [9]; pre-scan [10]; header [11]; footer [12]; body time word [13]; use front-end hits [14] | 8, header and footer on |
| 7 | coincidence table [7:0]; counters enable [8]; sampler enable [9] | `0xFE`, both on |
| 8 | counter window [15:0]; sampler window [31:16] | 16, 16 |
| 9 | external window [15:0]; ACQUIRE hold [31:16] | 16, 512 |
| 10 | reset delay [15:0]; reset width [31:16] | 0, 2 |
| 11 | test pulse width [15:0]; period [31:16] | 4, 64 |
| 12 | test pulse count [15:0] (0 = continuous); amplitude [31:16] | 0, `0x800` |
| 13 | SPI write data (low `len` bits are sent, MSB first) | 0 |
| 14 | SPI length [5:0]; SPI divider [15:8]; I2C divider [23:16] | 32, 4, 4 |
| 15 | I2C command [1:0] (0 START, 1 STOP, 2 WRITE, 3 READ); nack [2]; write byte [15:8] | 0 |
| 16 | seconds preset | 0 |
| 17 | byte to send on the service UART [7:0] | 0 |

**Flags:**

| Flag | Meaning |
|---|---|
| 0 | Run. |
| 1 | Flush the stacks. |
| 2 | Start the test pulser (acts on the rising edge). |
| 3 | Stop the test pulser. |
| 4 | Start an SPI transfer (rising edge). |
| 5 | Issue the I2C command (rising edge). |
| 6 | Load the seconds preset (rising edge). |
| 7 | Send register 17 on the service UART (rising edge). |

**Read addresses:**

| Address | Contents |
|---|---|
| `0x100` | Counter event stack pop (use READ_FIX). |
| `0x101` | Counter rate stack pop. |
| `0x102`, `0x103` | Their word counts. |
| `0x104` | Slow-trigger moving average. |
| `0x200` | Sampler stack pop. |
| `0x201` | Its word count. |
| `0x202`, `0x203` | Hit info, low and high words. |
| `0x300` | Peak stack pop. |
| `0x301` | Its word count. |
| `0x302` | Refused peak readouts. |
| `0x400`–`0x402` | Seconds, tenths of a microsecond, shift error. |
| `0x403`–`0x405` | Last stamp. |
| `0x408`–`0x40B` | Rates: counters, sampler, external, Trig-Out. |
| `0x500` | SPI read data. |
| `0x501` | I2C: {ACK, read byte}. |
| `0x502` | Service UART: {received byte count [31:16], last received byte [7:0]}. |

A pop of an empty stack returns 0. Any other address returns `0xDEADBEEF`.

**Status word** (op `13`), bit by bit:

| Bit | Meaning |
|---|---|
| 11 | Any counter input lost. |
| 10 | Sampler ACQUIRE. |
| 9 | Counters ACQUIRE. |
| 8 | Test pulser busy. |
| 7 | I2C busy. |
| 6 | SPI busy. |
| 5 | Peak reader busy. |
| 4 | Sampler busy. |
| 3 | Counters busy. |
| 2 | Hit window active. |
| 1 | Sampler data available. |
| 0 | Peak data available. |

## Service controllers

* `spi_master`: mode 0, 1–32 bits, `sclk` = `clk`/(2·(div+1)). The read
  data is returned right-aligned.
* `i2c_master`: byte-level START/STOP/WRITE/READ commands with open-drain
  enables. There is no clock stretching or arbitration.
* a second `uart_tx`/`uart_rx` pair on `svc_uart_tx`/`svc_uart_rx`, for
  service devices that use a serial line. It runs at the host UART's rate,
  sends one byte per flag-7 edge, and counts and keeps the received bytes.
* `test_pulse_gen`: bursts of 1–65535 pulses, or continuous pulses, with
  programmable width and period. It also outputs the amplitude word for the
  external pulser circuit.
* `cfg_regs`: the 32 configuration registers, all visible in parallel.

## How far this follows the original system, and what is missing

The system this RTL implements is described at block level only. The
following come from that description:

* the partitioning;
* each block's function;
* the 500 MHz dual counters with asynchronous clear and the choice of
  binary or shift-register build;
* the OR of four consecutive samples before the majority count;
* the constant-latency pipeline and its offset compensation;
* the trigger phase detector;
* the three hit-info modes and window;
* the peak-reader pipeline, hit skipping, pre-scan, complementary channel
  and header/body/footer contents;
* the coincidence-window trigger manager with Trig-Out, stamp, ACQUIRE and
  reset;
* the 32 + 32-bit timestamp at 100 ns;
* the ATN/ATN_RET/BUSY/READY transaction protocol with TASK, WRITE and
  READ.

Everything below is this design's own choice, because the description
leaves it open:

* all widths, depths and word layouts;
* the register and address map and the op codes;
* the rule for the coincidence algorithm (a truth table);
* the hold time before ACQUIRE re-arms;
* the loss-detector rule;
* the moving-average window as a power of two up to 16;
* the meaning of the shift error;
* using the complementary channel as address XOR 1;
* the UART framing;
* the SPI and I2C details.

Where the design differs from or falls short of the original:

* **Host link.** Only the UART is built. It carries about 1 MB/s, whereas
  the original reaches about 100 MB/s through USB/eSATA bridge chips. The
  FT232H/FT60x/JM2033x interface controllers, the SPI host link, the
  gigabit SERDES master/slave link and the SERDES emulator are not built,
  because their controllers are not described.
* **Event storage.** Sampler events and peak records go to two separate
  stacks, matched by the event counter in their headers. The original
  keeps a portion of the samples and the peak values together.
* **Device bus.** A simple single-master register bus replaces the original
  full-duplex internal bus.
* **Counter width.** The counters are 8 bits per transfer period. The
  32-bit photon count exists only as the per-pixel background sum
  (`rate_ticks` periods), not as a free-running 32-bit counter.
* **Sustained rate.** At the defaults, one event is about 5 kB: 64 pixels ×
  19 counter words, 68 sampler words and about 20 peak words. The trigger
  side can take about 480 k triggers/s, since the hold is 2 µs. But the
  UART can unload only about 190 full events per second, or about
  2,500 sampler-plus-peak events. The stacks absorb bursts: about 12
  default sampler events per bank and 4 counter events per bank.
* **Outside the FPGA.** The analog front end, the peak detectors and their
  mux, the ADC, the HV supply, the sensors, the pulser amplitude stage, the
  PPS/10 MHz source and the clock PLL are not part of this RTL.
  Behavioural models of the mux/ADC, an SPI slave and an I2C slave exist
  only in the testbenches.

## Simulating

Everything compiles with plain Verilator 5. The three packages must come
first. For example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -Irtl -y rtl -y tb +libext+.sv \
  rtl/acq_pkg.sv rtl/io_cmd_pkg.sv rtl/peak_fmt_pkg.sv tb/tb_acq_system_top.sv \
  --top-module tb_acq_system_top
./obj_dir/Vtb_acq_system_top
```

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself,
with a watchdog that fails the run if it hangs. There is one testbench per
module, `tb/tb_<module>.sv`. Two exercise the whole chip through its pins
only:

* **`tb_acq_system_top`** runs at 4 clocks per UART bit and with a
  200-mark "second". It plays host, ADC, SPI slave and time reference. It
  goes through:
  * configuration;
  * a sampler trigger, a counter trigger, an external trigger, and a
    counters AND sampler coincidence (with a negative case);
  * the automatic ACQUIRE restart and front-end resets;
  * flush and readback of all three stacks, with their headers checked
    against the Trig-Out count and a BUSY pause in the middle of a payload;
  * SPI, I2C, the service UART (looped back) and the test pulser;
  * the time preset, PPS and rates;
  * a command timeout.

  At the end it prints how often each mechanism occurred, and it fails if
  any never happened.
* **`tb_acq_system_full`** uses the top at its default parameters, with the
  host link at the real 10 MBaud rate. It runs one complete acquisition:
  configuration read, run, an 8-pixel sampler trigger, ACQUIRE drop and
  restart, flush, and readback of the sampler event and the peak record.
  It then runs two rate checks:
  * one pixel pulsing at 250 MHz must give exactly 1024 counts per
    background-rate word (16 transfers × 64 pulses), with no signal loss;
  * five sampler triggers 10 µs apart (100 kHz) must all be taken and
    stored as complete events.

  It takes about one minute of wall time in Verilator.

Some unit tests use smaller sizes to stay fast: `tb_counters_module` uses 8
pixels, and `tb_time_generator` uses a 50-mark second. The sampler and peak
reader tests run at the full 64 channels.

Verilator reports two kinds of warning that are expected:

* flops that use a signal both as an asynchronous reset and as data (the
  dual counters' clear);
* unconnected optional outputs in the top.
