# SAS: a smart analogue sampler for a photomultiplier front end

An underwater neutrino telescope records short light flashes with
photomultipliers (PMTs). Most PMT pulses are short: under about 150 ns, and
they can arrive at more than 300 kHz. A few last longer than 500 ns. Digitising
everything all the time would waste bandwidth. This sampler chip stores a
pulse as analogue samples in switched-capacitor cells, time-stamps it, and lets
a slow external ADC read only the samples that matter.

The chip works like this:

* Three copies of the anode signal, at gains 1, 1/8 and 1/64, are sampled
  together at 200 MHz (5 ns per cell).
* A trigger (a threshold comparator on the PMT signal) starts sampling into
  one of **four 32-cell analogue FIFO units** (160 ns each), used in
  circular order.
* 100 ns into the window, the trigger level and a 3-bit **amplitude class**
  are taken. The class comes from three comparators, one per gain channel.
  If the trigger is still high, the pulse is long. Sampling then continues
  without a gap into a **128-cell memory** (another 640 ns).
* Each stored pulse has a digital **record** in a four-level digital FIFO.
  The record holds a 17-bit time stamp, the unit address, the class and the
  status bits.
* At readout, only the channel picked by the class is sent to the ADC, so a
  short pulse costs 32 ADC conversions instead of 96. A long pulse is read
  completely: 32 cells plus all 3 x 128 cells of the long memory.

This RTL models the whole chip as SystemVerilog. The cell storage is a
behavioural model that holds each analogue sample as a 10-bit code. Everything
around it is synthesizable logic: addressing, the output multiplexer, the
control unit, the record FIFO, the time-stamp counter and the serial record
output.

## Block structure

```
 ain[0..2] ──┬──────────────┬──────────────────────────┐
             │              │                          │
      sas_analog_fifo   sas_long_memory                │
      4 x sas_macrocell 4 x sas_macrocell (chained)    │
        (CLK1..CLK4)      (CLK5)                       │
             │ aout         │ aout                     │
             └────── shared output node ── aout, aout_valid
                            ▲ readout_clk
 trigger, th1 ──► sas_control_unit ──► sas_digital_fifo ──► sas_serializer ──► dout
                     ▲     │ request         (records)          ▲ readout_clk
            ack ─────┘     ▼
 sync_in ──► sas_ts_counter ──► time stamp, sync_ok
```

| Module | Role |
|---|---|
| `sas_top` | Chip top level: wires the blocks together, holds the shared output node and the read-side routing |
| `sas_pkg` | Record type, sizes, class-to-channel mapping |
| `sas_ts_counter` | 17-bit time-stamp counter, re-synch check (`sync_ok`) |
| `sas_control_unit` | Acquisition sequencing, clock dispatch, request/ack handshake |
| `sas_digital_fifo` | Four-level record FIFO, filled in steps during an acquisition |
| `sas_analog_fifo` | Four macrocells with separate sampling clocks |
| `sas_long_memory` | Four macrocells on one clock, chained into 128 cells |
| `sas_macrocell` | 3 x 32 cells, write/read addressing units, output multiplexer |
| `sas_addr_unit` | One-hot shift-register addressing unit (write or read) |
| `sas_cell_array` | Behavioural model of the capacitors and bank amplifiers |
| `sas_serializer` | Serial output of the record during readout |

## The macrocell and its addressing units

Every analogue memory is built from one macrocell: 3 channels x 32 cells.
A **write addressing unit** and a **read addressing unit** are each a plain
shift register, with a serial input and 32 one-hot outputs. A clock pulse
while the serial input is high puts the token in cell 1, so sampling starts
on the first pulse with no set-up. Each later pulse moves the token on by one
cell. The last stage (`sout`) is the "next write" or "next read" output.
Feed it into the serial input of another unit on the same clock, and the two
become one longer register. This is how `sas_long_memory` makes its four
macrocells into one 128-cell memory.

Writing stores all three channels in parallel at the addressed cell. Reading
is always sequential, through one output, in one of two modes set by the
first read pulse:

* **Single channel**: the multiplexer connects the classified channel, and 32
  pulses read its 32 cells. FIFO units are always read this way.
* **All channels**: when the token leaves cell 32, it comes back to cell 1 and
  the multiplexer moves to the next channel. 96 pulses read channel 1, then 2,
  then 3. Only after channel 3 does the token leave through `rd_next`. The
  long memory is always read this way.

The class-to-channel mapping (`sas_pkg::class_to_channel`) reads the most
sensitive channel whose comparator did not fire:

| th1 (bit 0 = gain 1) | channel read |
|---|---|
| xx0 | gain 1 |
| x01 | gain 1/8 |
| x11 | gain 1/64 |

All eight macrocell outputs share one node. A macrocell drives it while its
read token is inside it; otherwise its outputs are open. The top level asserts
that the FIFO side and the long memory never drive it together. A macrocell
is single-port: the control unit never reads and writes the same one at once.
Writing one unit while another is read is allowed and normal.

## Acquisition sequence

All times are 200 MHz clock cycles (5 ns).

1. **Idle.** The control unit waits for a rising edge of `trigger`, which
   passes a two-flop synchronizer.
2. **Trigger.** The time stamp goes into a new record at the tail of the
   digital FIFO. The next FIFO unit in circular order gets its sampling
   clock. The first sample is taken on the **4th rising clock edge after the
   trigger rises**. If that unit still holds unread data, then so do all four
   (they are freed in order). The trigger is then dropped and `trig_discard`
   pulses.
3. **Cell 20 (100 ns).** The synchronized trigger level (`status1`) and the
   `th1` class are written into the record.
4. **Cell 32 (160 ns).**
   * `status1 = 0`: sampling stops and the record is complete.
   * `status1 = 1` and the long memory is free: on the very next cycle, the
     long memory samples its first cell.
   * `status1 = 1` but the long memory still holds an unread pulse: sampling
     stops and the record gets `long_busy = 1`.
5. **Long cell 116.** The trigger level is sampled again (`status2`). The
   FPGA uses it to decide whether to digitise the low-pass replica of the
   signal as well.
6. **Long cell 128.** The record (`long_used = 1`) is complete.

A trigger edge that arrives while an acquisition is running is ignored.

## Record format

`sas_pkg::record_t`, 26 bits. The serial output sends them MSB first:

| bits | field | meaning |
|---|---|---|
| 25:9 | `ts` | time-stamp counter at the trigger (17 bits) |
| 8:7 | `unit` | analogue FIFO unit holding the first 32 cells |
| 6:4 | `cls` | th1 comparator outputs at cell 20 |
| 3 | `status1` | trigger level at cell 20 |
| 2 | `long_used` | pulse continues in the 128-cell memory |
| 1 | `long_busy` | continuation was wanted, but the long memory was full |
| 0 | `status2` | trigger level at long cell 116 |

## Readout protocol

The handshake with the FPGA is **two-phase**: every transition of `request`
or `ack`, rising or falling, is one action.

1. When a complete record is at the head of the digital FIFO and no request
   is open, `request` toggles.
2. The FPGA gives `readout_clk` pulses. The first pulse after a new request
   (`sas_serializer.first`) does two things. It loads the record into the
   serializer, and it starts the read addressing unit of the FIFO unit named
   in the record. After pulse *k* (counting from 1):
   * `aout` holds cell *k*, with `aout_valid` high;
   * for *k* ≤ 26, `dout` holds record bit 26-*k*.

   The digital record is therefore known after 26 pulses. That is before the
   32 FIFO cells are done, so the FPGA knows whether more cells follow.
3. If `long_used = 1`, the token leaving the FIFO unit starts the long memory
   at once. Another 384 pulses then read it:
   * macrocell 1, channels 1, 2, 3;
   * then macrocell 2, and so on.

   Sample *n* of channel *c* of the pulse, counted from the trigger, is FIFO
   cell *n* for *n* < 32 and long cell *n* - 32 after that.
4. The FPGA toggles `ack`. This removes the record and frees its FIFO unit,
   and frees the long memory too if the record used it.

A short record takes 32 pulses, and a long one 32 + 3 x 128 = 416. At the
intended 40 MHz readout clock, that is 0.8 µs and 10.4 µs.

## Clock domains

* **Write side: 200 MHz `clk`.** The counter, control unit, digital FIFO and
  write addressing units run here. The chip switches the sampling clock on
  and off for each unit (CLK1..CLK5). Here each unit has a clock enable
  instead.
* **Read side: `readout_clk` from the FPGA.** The read addressing units,
  read multiplexers and serializer run here.

There is no synchronizer on the read side. The read logic only looks at the
head record and the `request` level, and the handshake holds both still from
the request until the ack. The FPGA must only pulse `readout_clk` after it
has seen the request. `trigger`, `th1` and `ack` each pass two flip-flops
into `clk`. `sync_in` does too, inside the counter.

## Time stamp and re-synch

The counter counts modulo 100 000: that is 500 µs at 200 MHz, the interval
of the shore re-synch pulse, and it fits in 17 bits. `sync_ok` pulses for one
cycle when a rising edge of `sync_in` is seen while the counter is at 0.
Because of the synchronizer, the in-phase `sync_in` edge is the one launched
when the counter reads 99 998. If the edge comes at any other time, no pulse
appears: that missing pulse is how the FPGA finds a lost-timing interval.

## Where this departs from the original chip

* **Control timing.** The chip's control unit and digital FIFO are
  self-timed: Muller C-gates, transparent latches, and toggle cells
  controlled by request/ack. This design uses clocked logic with the same
  sequence of actions. No C-gate cells are included.
* **Analogue parts.** Analogue voltages are 10-bit codes (10 bits is the
  resolution the front end is specified for). The cell model stores codes
  exactly. It does not model the bottom-sampling switch timing, charge
  injection, leakage or the bank amplifier's reset phase. The input buffers,
  the output buffer and the LVDS clock receiver are wires.
* **Choices this design makes:**
  * counting modulo 100 000, and what "in phase" means;
  * the synchronizer depths, and with them the 4-edge trigger-to-sample
    delay;
  * the second status check at long cell 116;
  * the record layout and bit order;
  * the class-to-channel mapping;
  * the read order across channels and macrocells;
  * chaining the long memory through next-write / next-read;
  * ignoring triggers during an acquisition;
  * freeing storage only on ack.
* **Readout rate.** The original chip could not read at 40 MHz because of an
  analogue bias fault. Nothing in this RTL depends on the readout rate.

## Parameters

`sas_top` defaults are the chip's sizes:

| Parameter | Default | Meaning |
|---|---|---|
| `CELLS` | 32 | cells per channel in one macrocell |
| `FIFO_UNITS` | 4 | analogue FIFO depth |
| `LONG_UNITS` | 4 | macrocells in the long memory (x `CELLS` = 128) |
| `CHECK_CELL` | 20 | cell at which class and trigger status are taken |
| `LONG_CHECK_CELL` | 116 | long-memory cell of the second status check |
| `DFIFO_DEPTH` | 4 | digital record FIFO depth |
| `SYNC_PERIOD` | 100000 | counter modulus (re-synch interval in cycles) |

`TS_WIDTH` (17), `SAMPLE_W` (10) and `CHANNELS` (3) are in `sas_pkg`. The
record layout assumes `FIFO_UNITS` = 4 (a 2-bit unit field) and
`DFIFO_DEPTH` ≥ `FIFO_UNITS`.

## Simulation

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one ends
by printing `TB_RESULT checks=N failures=M`. Example with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb --top-module tb_sas_top \
    rtl/sas_pkg.sv tb/tb_sas_top.sv
./obj_dir/Vtb_sas_top
```

Verilator finds the other modules in `rtl/` by their file names.

`tb_sas_top` runs the full-size chip end to end, with the testbench standing
in for the PMT interface and the FPGA. It takes about 200 000 clock cycles,
one second of simulation on a workstation. The inputs carry a pseudo-random
sequence that is a known function of the clock count, so every sample read
out can be checked against the cycle it was taken on. The test covers:

* short records on all three channels;
* a long continuation;
* the long-memory-busy case;
* a discarded trigger with all four units full;
* FIFO unit wrap-around;
* two in-phase re-synch pulses, and one out-of-phase pulse with no `sync_ok`.

It counts each mechanism and fails if one never happens.

`tb_sas_rate` runs the rate workload on the full-size chip. Short pulses
arrive at random times, with exponential spacing at a mean rate of 300 kHz
and at least 300 ns apart. An FPGA model reads the records while new pulses
are still coming in. The test runs in two phases:

* **40 MHz readout**: all 150 pulses are stored and read back correctly, none
  is discarded, and at most two records are ever waiting.
* **5 MHz readout**: one record takes 6.4 µs to read, longer than the mean
  spacing of 3.33 µs. The buffer fills, triggers are discarded, and every
  record that was kept still reads back correctly. The unit
testbenches check the addressing units, cell model, macrocell read modes,
long-memory chaining, FIFO ordering, control sequencing (including the
trigger-to-sample delay and a gap-free long continuation) and the serializer
bit order.
