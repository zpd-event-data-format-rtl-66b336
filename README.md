# ZPD DAQ memories and event data format

A z-vertex pre-trigger (ZPD) module looks at a fresh snapshot of drift-chamber
track segments on every CLK4 tick. Each tick it fits up to 12 tracks and makes an
8-bit trigger decision. For data acquisition, every tick must be recorded:

* the **input record**: which of the 153 track-segment-finder (TSF) segments
  were present (the mask), plus a 4-bit cell location and the 4 leading phi bits
  for each of the 12 seed segments. That is 153 + 96 = 249 bits.
* the **output record**: z0 (8 bits), z0 error (4), curvature (8) and tan(dip)
  (8) for each of the 12 tracks, plus the 8 decision bits. That is 344 bits.

The Level 1 trigger answers several microseconds later. So each record first
goes into a 64-tick **circular buffer**, which is long enough to cover the
latency. The circular buffer's output is a tap a fixed number of ticks behind its
write pointer. That tap is copied all the time into four 8-tick **DAQ buffers**.
An L1Accept *freezes* one DAQ buffer, so it keeps the 8 ticks around the
triggered crossing. A later READ_EVENT ships the frozen buffer out as a
formatted event and releases it. The special feature of this scheme is that
the DAQ buffers are already full when the L1Accept arrives. Freezing takes no
copy time, so the trigger path never waits for memory.

This RTL models one ZPD module's DAQ path at the full size: 64-tick circular
buffers, four 8-tick DAQ buffers, 153 mask bits and 12 tracks. All four
`daq_format` readout modes are included.

## Data flow

```
 in_data (249b) --tick--> [circ_buffer 64] --offset tap--> [daq_buffer 0..3] --+
                           (u_in_mem: decoder-driver DAQ memory)               |
                                                                               +--> event_formatter --> evt_data (32b)
 out_data (344b) -tick--> [circ_buffer 64] --offset tap--> [daq_buffer 0..3] --+        ^    valid/ready/last
                           (u_out_mem: decision-module DAQ memory)                       |
                                                                                  diag_mem (debug words)
 l1_accept, read_event --> daq_ctrl --freeze / release / start--> both memories, formatter
```

| module            | role |
|-------------------|------|
| `zpd_pkg`         | Sizes, record structs (`in_rec_t`, `track_t`, `out_rec_t`), the `daq_format_e` enum, and the functions that pack records into event words. |
| `circ_buffer`     | A 64-entry ring written once per tick. It reads the entry `offset` behind the write pointer. |
| `daq_buffer`      | An 8-entry buffer. While not frozen it takes every delayed record; while frozen it ignores writes. It has a synchronous read port. |
| `daq_memory`      | One circular buffer plus four DAQ buffers. It holds the shared DAQ write pointer, the frozen flags and the oldest-tick pointer of each frozen buffer. |
| `daq_ctrl`        | Fast-control sequencing: L1Accept → freeze, READ_EVENT → start readout, done → release. |
| `event_formatter` | Streams one event: header, decision-module data, gap, decoder-driver data. |
| `diag_mem`        | 16 test bytes at 0x4000–0x400F, returned in debug mode. |
| `zpd_top`         | Wires the two DAQ memories, controller, diagnostic memory and formatter together. |

## Which ticks an event contains

This is the part that takes the most care when using the design.

The record is stored in the circular buffer on the tick where `tick` is high.
In the same clock, the entry `offset` places behind the write pointer is read.
So one clock later the circular buffer delivers the record that is `L` ticks
old, where `L = offset`, or `L = 64` when `offset = 0`. The delivered record is
written into every DAQ buffer that is not frozen, at a shared 3-bit pointer. A
free DAQ buffer therefore always holds the last 8 delayed records.

Suppose `l1_accept` is sampled on the same clock edge as tick `k`'s strobe, or
later, but before tick `k+1`'s strobe. The controller registers the command and
pulses `freeze` one clock later, on the same edge as (or after) the delayed write
of tick `k`. That write still lands. The frozen buffer then holds ticks
`k-L-7 … k-L`, and the event lists them oldest first as T = 0..7. The offset
is therefore the commissioning knob that centres the triggered crossing in the
8-tick window. Each memory has its own offset (`in_offset`, `out_offset`),
because the decision-module data comes later than the input data by the
ZPD's processing time. The maximum offset is 64 ticks, which is 17.2 µs at
the ~269 ns CLK4 period. The DAQ system needs at least 12 µs, or about 45 ticks.

Corner case: when a buffer is released, it refills only as new ticks arrive. If
it is frozen again fewer than 8 ticks after its release, some of its entries
still belong to the previous event.

## Buffer life cycle and error cases

Buffers are frozen in round-robin order (0, 1, 2, 3, 0, …) and read in the
same order, so events leave in the order they were accepted. `n_frozen`
counts frozen buffers, including the one being read.

* L1Accept with all four buffers frozen: the command is dropped and
  `overflow` pulses.
* READ_EVENT with no buffer frozen, or while a readout is running: the
  command is dropped and `read_error` pulses.
* When the formatter has sent the last word, the buffer is released in both
  memories and starts filling again.

The trigger tag (5 bits) and the trigger time counter (5 bits) are sampled
with the L1Accept. They are stored with the frozen buffer and appear in that
event's header.

## Event format

An event is a stream of 32-bit words. It is defined as 16-bit rows. In a row,
bit 0 is the first (LSB) column of the format. A field written `f[0:n]` has
`f[i]` at row bit `offset+i`. Two rows make one word, with the first row in
bits 15:0. Padding is sent as 0.

Header (one word):

| row | bits 0–1 | 2–6       | 7–11          | 12    | 13    | 14–15 |
|-----|----------|-----------|---------------|-------|-------|-------|
| 0   | `1 1`    | tag[0:4]  | counter[0:4]  | bf[1] | bf[0] | 0     |
| 1   | CSR, MSB first: CSR[15] in bit 0 … CSR[0] in bit 15 |||||

`bf` is the buffer number, also sent MSB first.

Decision-module data: 13 words per tick, 8 ticks.

| rows       | content |
|------------|---------|
| 2F         | z0(T,F)[0:7] in bits 0–7, error(T,F)[0:3] in bits 8–11 |
| 2F+1       | curvature(T,F)[0:7] in bits 0–7, tandip(T,F)[0:7] in bits 8–15 |
| 24         | decision(T)[0:7] in bits 0–7 (the 8 bits sent to the global trigger) |
| 25         | padding |

Tracks F = 0..5 come from seeds in superlayer 10 and F = 6..11 from
superlayer 7. In each group the order is (order 0, sector 2), (0, 3), (1, 2),
(1, 3), (2, 2), (2, 3).

Then comes one **gap word**. It gives the readout time to switch between the
two memories. After it comes the decoder-driver data: 8 words per tick.

| rows  | content |
|-------|---------|
| 0–9   | mask[16h … 16h+15]; row 9 holds mask[144:152] in bits 0–8 |
| 10–15 | cellloc(2j)[0:3], phi(2j)[2:5], cellloc(2j+1)[0:3], phi(2j+1)[2:5], 4 bits each from bit 0 |

`daq_format = csr[1:0]` selects what is sent:

| daq_format | content | words | bytes |
|------------|---------|-------|-------|
| 0 debug    | header + 4 diagnostic words (bytes 0x4000–0x400F, lowest address in bits 7:0) | 5 | 20 |
| 1 full     | header + decision data + gap + full decoder data | 170 | 680 |
| 2 short    | header + decision data + gap + seed rows only (3 words per tick) | 130 | 520 |
| 3 smallest | header + decision data | 105 | 420 |

## Top-level interface (`zpd_top`)

Everything runs on `clk`, with an active-low asynchronous reset `rst_n`.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `tick` | in | 1 | CLK4 strobe. Records `in_data` and `out_data`. May come on any clock; the testbenches use one tick every 4 clocks. |
| `in_data` | in | `in_rec_t` (249) | mask and seeds of this tick |
| `out_data` | in | `out_rec_t` (344) | tracks and decision of this tick |
| `in_offset`, `out_offset` | in | 6 | latency tap of each circular buffer, 0 = 64 ticks |
| `csr` | in | 16 | CSR. Copied into the header; `csr[1:0]` is `daq_format`. Sampled when a readout starts. |
| `l1_accept` | in | 1 | Level 1 Accept (one-clock pulse) |
| `trig_tag`, `trig_counter` | in | 5, 5 | sampled with `l1_accept` |
| `read_event` | in | 1 | READ_EVENT (one-clock pulse) |
| `diag_we`, `diag_addr`, `diag_wdata` | in | 1, 16, 8 | byte writes to the debug test data |
| `evt_data`, `evt_valid`, `evt_last` | out | 32, 1, 1 | event word stream; a word is held until accepted |
| `evt_ready` | in | 1 | the consumer takes the word when `evt_valid && evt_ready` |
| `n_frozen` | out | 3 | frozen buffers |
| `busy` | out | 1 | readout running |
| `overflow`, `read_error` | out | 1, 1 | one-clock pulses for dropped commands |

Timing: `read_event` → `start` one clock later → header word on the next
clock. After that, one word per clock while `evt_ready` is high, plus one idle
clock per tick while the record is fetched. A full event takes
170 + 16 clocks. If a freeze falls in the same clock as a delayed write, the
write still lands and the oldest-tick pointer accounts for it.

## Simulation

Each testbench is self-checking and ends with a `TB_RESULT checks=… failures=…`
line. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/zpd_pkg.sv tb/tb_zpd_top.sv \
          --top-module tb_zpd_top -o sim
./obj_dir/sim
```

Use the same command for `tb_circ_buffer`, `tb_daq_buffer`, `tb_daq_memory`,
`tb_daq_ctrl`, `tb_diag_mem`, `tb_event_formatter` and `tb_zpd_pkg`. Each one
runs in well under a second.

* `tb_zpd_top` runs the whole design at its default (full) size. It uses random
  records, random bursts of L1Accepts and READ_EVENTs, random `daq_format`
  values and random backpressure. It compares every event word with an event
  built from the record history and the format table, using its own bit-level
  model rather than the RTL's packing functions. It also checks that each of
  these happens at least once: freeze, buffer reuse, overflow, READ_EVENT with
  nothing frozen, READ_EVENT during a readout, backpressure stall, 64-tick
  latency, and each `daq_format`.
* The unit testbenches check each block against its own reference model. The
  formatter's testbench also checks the cycle count of a readout.
* The RTL holds assertions for the handshake rules: a word stays stable while
  it is stalled, a buffer is never frozen twice, and both memories agree on
  which buffers are frozen.

## Choices made where the format leaves room

* **Record width.** The output record is 12 × 28 + 8 = 344 bits, as the field
  list and the format table give it. The circular buffer is sometimes quoted
  as (344 + 8) bits wide. The extra byte has no field in the format, so it is
  not stored here.
* **Padding row per tick.** One padding row per tick in the decision-module
  data follows from the 420-byte total, not from a printed row.
* **Debug mode.** It sends the header plus the 16 decision-module test bytes,
  which matches the 20-byte total. The decoder driver also has test data, at
  0x4000–0x4002, …, 0x400C–0x400E. Its place in the event is not defined, so
  it is not sent.
* **Physical memory layout.** Each memory stores one record-wide word per
  tick. The original hardware has a 16-bit-wide circular buffer in the decoder
  driver and a 32-bit-wide one in the decision module, each as two RAM blocks
  used as a double buffer, and 16-bit-wide DAQ buffers. Here the formatter
  does the 16-bit row packing at readout instead. A port to block RAMs of
  those widths would need serialising logic in front of the buffers.
* **One controller.** The decoder driver and the decision module are separate
  FPGAs with their own fast control. Here one controller drives both
  memories. Both see the same commands, and an assertion checks that they
  stay in step.
* **Own choices.** The bit position of `daq_format` in the CSR, the
  valid/ready readout port (the original readout bus is not specified), the
  round-robin buffer order, the handling of dropped commands and the gap value
  0 are this design's choices.

## Changing sizes

The sizes are package constants in `zpd_pkg` (`N_MASK`, `N_SEED`, `N_TRACK`,
`TICKS`, `NUM_BUF`, `CIRC_DEPTH`). The memory modules take `WIDTH`, `DEPTH`
and `NUM_BUF` parameters. The packing functions and the formatter's word
counts assume the published layout: 10 mask rows, 6 seed rows and 13 decision
words per tick. Change those together with any size.
