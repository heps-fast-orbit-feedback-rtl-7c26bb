# Fast orbit feedback station for a 576-BPM storage ring

A fast orbit feedback (FOFB) keeps the electron beam of a storage ring on its reference
orbit at frequencies up to a few hundred hertz. Every fast-acquisition (FA) cycle, at
22 kHz, 576 beam position monitors (BPMs) measure the orbit in both planes; the feedback
multiplies the orbit error by the inverse orbit response matrix, passes the result through
a PID controller per corrector and sends new current setpoints to 192 fast corrector power
supplies per plane, all within a few tens of microseconds.

The work is split over 16 identical **stations**, one per three cells of the ring. Each
station needs the whole orbit (every corrector reacts to every BPM) but drives only its own
12 correctors per plane, i.e. 24 power supplies. This RTL is one station, `fofb_unit`.

## The data network: star into the station, ring between stations

```
 12 BPMs ──► bdt ─┐
 12 BPMs ──► bdt ─┼─► foc ──────────────► psc_interface ──► 24 power supplies
 12 BPMs ──► bdt ─┘    ▲ │  (setpoints)        (serial links, readbacks)
                       │ ▼
        from station n-1  to station n+1      (FOFB ring of 16 stations)
 timing triggers ──► aux ──► FA pulse to foc;  temperatures ──► aux ──► power_off
```

* **Star:** each BPM sends its sample point to point to the BPM data transceiver (`bdt`) of
  its cell. The transceiver waits for all 12 BPMs of the cell, checks that they belong to
  the same FA cycle and sends them one after the other on a single link to the controller.
  A BPM that fails to report only marks its own sample as invalid: after a timeout
  (500 cycles) the other eleven go out anyway.
* **Ring:** the controllers (`foc`) of the 16 stations form a one-way ring. Each station
  injects its 36 local samples, tagged with its station number, and forwards everything it
  receives from upstream. A sample that comes back to the station that injected it has
  been seen by every station and is dropped. Forwarded traffic has priority; local
  samples wait in per-link FIFOs (the *ring stall*).
* Every sample that passes a station's ring node, local or forwarded, is written into
  that station's **orbit memory** (576 entries of x, y) and also given out on the `daq_*`
  stream for data acquisition.

Packets carry a 10-bit global BPM index (0..575 for BPMs; higher indices are free for
X-ray BPMs, which a `bdt` can take in through its `N_XBPM` inputs but which do not enter
the correction).

## One FA cycle inside the controller

The FA trigger from the timing system is synchronised by `aux` and starts the
sequencer of `foc`:

| step | what happens | cycles at 100 MHz (defaults) |
|---|---|---|
| wait | ring delivers the orbit; length set by register `BPM_WAIT` (reset 0x3E7) | 1000 |
| feed | orbit memory read in index order, two BPMs per cycle; error e = position − reference orbit, or 0 if the sample is missing, stale or not from this cycle | 288 + 2 |
| matrix | two systolic arrays (x and y) finish | 12 |
| PID | 24 channels, one per cycle | 25 |
| send | `psc_interface` exchanges one frame (or more) with every power supply | 344 for set-only, about 1490 with readbacks |

Measured in the full-size testbench: 1681 cycles (16.8 µs) from FA trigger to
`fofb_finish` with set-only requests, 2831 cycles (28.3 µs) with set-and-read-back
requests. From the end of the wait to the first start bit on a power-supply line (feed,
matrix, PID) takes 329 cycles, under the 392 clock edges the reference system needs
for its correction calculation, and under its 3.5 µs budget for the algorithm. Both are inside the 35 µs (3500-cycle) controller budget and inside the
4545-cycle FA period. `latency` reports this number every cycle. A trigger that arrives
while a cycle is still running is not started; it is counted in `overrun_cnt`.

Samples of the current cycle are recognised by one flag per orbit entry (576 flip-flops
beside the memory). The trigger that starts a cycle clears all flags at once, and each
stored sample sets its flag to its `ok` bit. A BPM whose sample never arrives therefore
reads as missing, whatever is left in its memory word. A single toggling tag bit
per entry would not do: it aliases every second cycle, and after reset never-written
entries could look current.

## The correction arithmetic

This is the part to understand before changing anything.

**Orbit error.** BPM samples are 32-bit signed (nominally nm). The reference orbit
(32-bit, one word per BPM and plane) is subtracted; the 32-bit difference is the error.

**Matrix product (`sa_matvec`).** There is one array per plane. Each is a chain of 12
processing elements (PEs), one per corrector of the station. The errors enter PE 0 in BPM
order, two per cycle (BPMs 2g and 2g+1 form group g), and the group moves one PE further
each cycle. PE j holds its matrix row (576 × 32-bit signed coefficients) in two local
memory banks, even and odd columns. It reads both coefficients of the group passing by
(one cycle), adds the two 64-bit products, and accumulates them into a 64-bit
accumulator. PE j finishes j cycles after PE 0, so all 12 results are ready 12 cycles
after the last group enters: 288 + 12 cycles for the 576 BPMs. The orbit and
reference-orbit memories in `foc` are banked the same way, so the feed reads one group per
cycle. The number of lanes is the `LANES` parameter (N_IN must be a multiple of it). Two
lanes is the smallest count that fits the 392-edge target. No scaling is applied: the
result is Σ coef·e in the units of coefficient × error.

**PID (`fofb_pid`).** Time-multiplexed over the 24 channels (x channels 0..11, y channels
12..23), one per cycle, with one set of gains per plane:

```
I[n]   = sat64(I[n-1] + e[n])
u[n]   = (KP·e[n] + KI·I[n] + KD·(e[n] − e[n-1])) >>> 16      gains: signed Q16.16
sp[n]  = saturate_24( u[n] >>> TRUNC )                         TRUNC = 0..32, reset 24
```

`TRUNC` selects which 24-bit field of the PID output becomes the setpoint, so the overall
scale (matrix units, gains, amperes) is set by configuration, not by the hardware. The
setpoint is the power supply's format: 24-bit two's complement with 4 integer and
19 fraction bits, ±16 A full scale, 1.907 µA per step. Saturated channels are flagged in
`sp_sat`. Turning feedback off (register `CTRL` bit 0 = 0) clears the integrals and stops
sending; setpoints are still computed.

## The power-supply link

Each of the 24 power supplies is on its own serial line (`psc_txd`/`psc_rxd`), idle high,
4 clock cycles per bit. A frame is 43 bits, sent most significant bit first:

```
start '0' | ID (8) | data (24) | CRC-8 (8) | stop "11"
```

The CRC covers ID and data, polynomial x⁸+x⁷+x⁵+x⁴+x+1 (0xB3), initial value 0, MSB first.
Every request is answered, first by an echo of the request, then by readback frames:

| request ID | meaning | answer frames after the echo |
|---|---|---|
| 0x15 | set setpoint, read back | 0x93 status, 0x90 current, 0x95 command, 0x8A setpoint |
| 0x0A | set command, read back | same |
| 0x40 | read back only | same |
| 0x55 | set setpoint only | none |
| 0x4A | set command only | none |
| 0x00 | read setpoint and command | 0x95, 0x8A |
| 0x01 | read configuration | 0x96 version, 0x8B configuration |
| 0x02 | reserved | none |

`psc_channel` sends the request, checks the echo (ID and data), stores each readback by
its ID, counts frames with a bad CRC or bad start/stop bits and gives up after
2000 cycles without the full answer. `link_ok` holds the result of the last exchange.
All 24 channels send the same request ID each cycle (register `PSC_ID`, reset 0x55);
setpoint requests carry each channel's own setpoint, command requests the common
`PSC_CMD` word. `psc_interface` signals done when the slowest link has finished.
The control server reads the stored answers through the top's readback port: `rb_link`
picks the supply (0–23) and `rb_kind` the value (0 status, 1 current, 2 command,
3 setpoint, 4 version, 5 configuration), and `rb_data` shows it combinationally. A link
number above 23 reads 0. `rb_current` is also given out in full, for monitoring.

## BPM alignment in the transceiver

Each BPM sample carries a 16-bit FA sequence number. `bdt` takes the newest sequence number
it has seen in the current collection (modulo 2¹⁶) as the reference; a sample with
another number is sent marked `ok = 0` and counted as misaligned, a BPM that never
reported is sent marked `ok = 0` and counted as missing. Samples arriving during the
12-cycle output burst are ignored. The 500-cycle timeout starts with the first sample
of a collection, so a cell whose BPMs are all silent sends nothing that cycle. Its
orbit entries keep their cleared flags and read as missing in the controller.

## Configuration

A write bus (`cfg`: `we`, 20-bit `addr`, 32-bit `wdata`) from the control server sets
everything; `addr[19:16]` selects the region:

| region | contents | address bits |
|---|---|---|
| 0 | registers: 0x00 CTRL (bit0 feedback on, bit1 clear integrals), 0x01 BPM_WAIT, 0x02 TRUNC, 0x03 PSC_ID, 0x04 PSC_CMD, 0x10–0x12 X KP/KI/KD, 0x13–0x15 Y KP/KI/KD, 0x20 station number | [15:0] |
| 1 / 2 | x / y matrix coefficient | [15:10] corrector, [9:0] BPM |
| 3 / 4 | x / y reference orbit | [9:0] BPM |

The full set is 13,824 matrix words, 1,152 reference words and 13 registers. The station
number must be written before the ring carries traffic.

## Triggers and protection

`aux` synchronises the four timing triggers (`trig_in[0]` 291 Hz, `[1]` FA, `[2]` Sync,
`[3]` DAQ) and turns each rising edge into a one-cycle pulse. Only the FA pulse is used
by the controller here; the others are counted. Three temperature readings (controller,
power-supply interface and auxiliary boards) are compared with `temp_limit`; four
consecutive readings above it on one sensor raise `power_off`, which holds until
`temp_clear`. While `power_off` is set, FA triggers do not start cycles.

## Files

| file | contents |
|---|---|
| `rtl/fofb_pkg.sv` | sizes, frame IDs, packet and bus types, register map |
| `rtl/fofb_unit.sv` | the station (top) |
| `rtl/bdt.sv` | BPM data transceiver |
| `rtl/foc.sv` | controller: link FIFOs, orbit memory, sequencer, registers |
| `rtl/fofb_ring_node.sv` | ring forwarding and injection |
| `rtl/sa_matvec.sv` | systolic matrix-vector product |
| `rtl/fofb_pid.sv` | PID, bit-field selection, saturation |
| `rtl/psc_interface.sv`, `rtl/psc_channel.sv` | power-supply links and protocol |
| `rtl/psc_frame_tx.sv`, `rtl/psc_frame_rx.sv`, `rtl/psc_crc8.sv` | frame serialiser, receiver, CRC |
| `rtl/aux.sv` | triggers and temperature protection |
| `rtl/fifo_sync.sv` | FIFO helper |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_fofb_lab` (lab set-up) |
| `tb/psc_model.sv` | behavioural power-supply controller (link end only) |

Everything outside the station is a port: BPMs, neighbouring stations, power supplies,
timing, temperature sensors and the control server. Fibre transceivers are not modelled:
links appear as parallel valid/data streams, the power-supply lines as bit-serial signals.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/fofb_pkg.sv tb/tb_fofb_unit.sv --top-module tb_fofb_unit
./obj_dir/Vtb_fofb_unit
```

Replace `tb_fofb_unit` by any other testbench. `tb_fofb_unit` runs the station at its
full size (576 BPMs, 24 power supplies, all parameters at their defaults) for four FA
cycles in about 15 seconds: it loads the full matrices, plays the BPMs, the other 15
stations and 24 power supplies, and checks every setpoint against a matrix product computed in
the testbench and against what the power supplies received. On the way it makes happen,
and checks, a ring stall, own packets dropped, a missing BPM, a stale BPM, a corrupted
answer frame, a link timeout, a saturated setpoint, a trigger overrun, both request modes,
feedback off and an over-temperature shutdown. It also reads the stored answers back
through the readback port.

`tb_fofb_lab` is the laboratory set-up at default sizes. The station's ring output is
looped back to its input, only 4 BPMs report and only one power supply is connected.
Each cycle takes 3505 cycles: the 23 unconnected links each run into the 2000-cycle
timeout. That is inside the FA period but not the 3500-cycle budget, so a real set-up
with missing supplies needs a shorter timeout.

The other testbenches use smaller sizes
(for example a 5 × 40 matrix, a ring of four nodes, four power-supply links).

## Where this design makes its own choices

The architecture, sizes (576 BPMs, 12 correctors per plane per station, 24 power
supplies, 16 stations), the frame format, CRC polynomial, request/answer table, setpoint
format, per-plane PID gains, the selectable setpoint bit position, the BPM waiting time of
0x3E7 cycles, the 100 MHz clock and the 3500-cycle budget come from the system
description. The following are this design's own and are the first places to look when
matching real hardware:

* link bit rate (4 cycles per bit), bit order, idle level, CRC initial value;
* the response timeout (2000 cycles) and transceiver timeout (500 cycles);
* BPM sample format (32-bit x and y, 16-bit sequence number) and packet layout;
* one-way ring, source tag, priority of forwarded traffic;
* the register map and write bus;
* PID form, Q16.16 gains, 64-bit accumulation, saturation;
* two BPMs per cycle through the systolic arrays, with banked memories;
* one cycle flag per orbit entry, cleared by the FA trigger;
* the readback port (`rb_link`, `rb_kind`, `rb_data`);
* sequence-number alignment in the transceiver;
* trigger synchroniser and over-temperature debounce.

**Known differences and gaps.**
* Data acquisition to the server (Ethernet/UDP, DDR4 buffering) is not implemented; the
  stored samples are only given out as the `daq_*` stream.
* Board temperature sensors and their bus are not implemented; readings are ports.
* The ring's real link rate is not modelled: one packet per clock per link.
* Power-supply links cannot be switched off one by one. A link with nothing connected
  costs the full response timeout every cycle, as in the laboratory test bench.
