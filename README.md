# srRAS / G-srRAS rate adaptive shaper with srTCM marking

This is an IP traffic conditioner for the ingress of a Differentiated Services
network. Each of 16 flows goes through two stages:

- a **single rate Rate Adaptive Shaper** (srRAS, RFC 2963);
- a **single rate Three Color Marker** (srTCM, RFC 2697).

The shaper is a tail-drop FIFO per flow. It drains at a rate that depends on
two things: how fast the flow has been arriving, and how full its queue is.
Smoothing the bursts this way means more packets are marked green downstream.

In **G-srRAS** mode the shaper also reads how many green tokens the flow's
meter holds. When the meter already has enough tokens to mark the head packet
green, the packet is released early.

After shaping, the marker meters every packet in its flow's srTCM. It then
writes the AF codepoint of the flow's class and the packet's colour into the
DS field. The whole design is a single clock domain, intended for about 50 MHz
in an FPGA.

## Data path at a glance

```
 in_* ──► ip_header_extract ──► packet memory (external, pm_* write port)
              │ header
              ▼
          fid_search ──FID──► queue_control ◄── timing_control (arbiter)
              │                 │   ▲   │
              ▼                 │   │   └─► marker_out ──► out_*
         ear_estimator          │   │          │  ▲  (pm_* read port)
              │                 ▼   │          ▼  │
              └─► lookup_table ─► dt_calculator   token_meter ×16
                      ▲              ▲ Bc ◄──────────┘
 cpu_* ──► up_interface               (G-srRAS)
```

Packets are stored once, in an external packet memory, and are not moved
again. Everything else works on small pointers:

- a **slot** number (11 bits), which names a packet;
- a **flow identifier** (FID, 4 bits).

## The three kinds of linked queue

All queue state lives in two single-port 16-bit RAMs. They are separate so
that one step can access both in the same clock.

*Virtual memory 1* has 4131 words:

| address | block | contents |
|---|---|---|
| 0–2047 | THPB | head FID of each timing queue |
| 2048–4095 | ADB | next-slot link of each packet slot |
| 4096–4111 | FHPB | head slot of each flow queue |
| 4112–4127 | FIB | bytes queued in each flow (its buffer occupancy, BO) |
| 4128 | IFHPB | reserved |
| 4129 | IAHPB | head of the idle-address list |
| 4130 | DHPB | head FID of the departure queue |

*Virtual memory 2* has 2083 words:

| address | block | contents |
|---|---|---|
| 0–2047 | TTPB | tail FID of each timing queue |
| 2048–2063 | NPB | next-FID link of each flow |
| 2064–2079 | FTPB | tail slot of each flow queue |
| 2080 | IFTPB | reserved |
| 2081 | IATPB | tail of the idle-address list |
| 2082 | DTPB | tail FID of the departure queue |

A word that holds a FID uses bit 15 as its "valid" flag. A clear bit means the
queue is empty.

There are three kinds of queue, plus a free list:

- **Flow queues** link packet slots through ADB, one queue per flow.
- **Timing queues** link flows through NPB, one queue per departure time
  modulo 2048. At any moment a flow is in at most one timing queue or in the
  departure queue, never in two places. This holds because only a flow's
  head-of-line packet is scheduled, which is why a single next-FID word per
  flow is enough.
- **The departure queue** links flows whose departure time has come. It uses
  the same NPB links.
- **The idle-address list (IALL)** chains the free slots through ADB.

Reset walks through every address of both RAMs. It chains all 2048 ADB entries
into the idle list, which takes 4131 clocks. After that, `init_done` rises and
the real-time counter starts.

### Queue-control functions

`queue_control` runs one function at a time. `timing_control` grants it with
this fixed priority: ADDTD > ADDPT > Decision/Win > SPD. Each function takes a
fixed number of clocks:

| function | clocks | what it does |
|---|---|---|
| Decision | 6 | reads the flow's BO. Accepts if the flow is known, a slot is free and BO + L ≤ the flow's limit; otherwise tail-drops. |
| Win | 8 | appends the slot to the flow queue and adds L to BO. Prefetches the next free slot from the idle list. If the flow was empty, requests a departure time. |
| ADDPT | 7 | takes a finished departure time and appends the flow to that time's timing queue. |
| ADDTD | 7 | runs once per timeslot. Moves the timing queue of that time, as a whole, onto the tail of the departure queue. |
| SPD | 9 | pops the head flow of the departure queue and its head packet, then hands the packet to the marker. Subtracts L from BO. If packets remain, requests a departure time for the new head. |

SPD also returns the slot of the *previous* departure to the idle list. By
then the marker has finished reading that slot.

Only 2048 timing queues exist. A departure time further than 2047 timeslots
ahead is filed at t + 2047. A time that is already past is filed at t + 1.

## Departure time

A packet gets a departure time (DT) when it becomes head of its flow queue.
The calculation uses the flow's buffer occupancy BO at that moment, which
includes the packet itself.

```
SR = max(EAR, CIR)                                           BO < CIR_th
SR = max(EAR, CIR + (MIR-CIR)(BO-CIR_th)/(MIR_th-CIR_th))    CIR_th ≤ BO < MIR_th
SR = MIR                                                     BO ≥ MIR_th
T1 = t + L / SR
T2 = max(t, t + (L - Bc) / CIR_srTCM)
DT = T1               (srRAS, status bit off)
DT = min(T1, T2)      (G-srRAS, status bit on)
```

`dt_calculator` does at most three divisions one after another on a 36-clock
restoring divider: F(BO), then T1, then T2. A result takes at most 116 clocks.
That is the slowest part of the design. Requests wait in a 16-entry FIFO
meanwhile, and the other functions keep running.

A zero rate gives the largest delay. Offsets are limited to 32767 timeslots.
All quotients are rounded down.

### Number formats

| quantity | format |
|---|---|
| time | 16-bit wrapping count of timeslots; one timeslot is `TICK_CYCLES` clocks (default 64, 1.28 µs at 50 MHz) |
| rates (CIR, MIR, srTCM CIR, EAR) | bytes per timeslot, unsigned Q12.8 (20 bits) |
| bucket levels Bc, Be | bytes, Q20.8 (28 bits) |
| L, BO, CIR_th, MIR_th | whole bytes, 16 bits |

The host converts bytes per second into bytes per timeslot before writing.

## Arrival rate estimate

`ear_estimator` updates a flow's estimated arrival rate on every arrival:

```
EAR = (1 - e^(-T/K)) · L/T + e^(-T/K) · EAR_prev
```

- T is the time since the flow's previous arrival, in timeslots, and is at
  least 1.
- e^(-x) is computed as 2^(-x·log2 e). A 32-entry table covers the fraction
  and a right shift covers the integer part, giving about 2% error.
- L/T and T/K share one sequential divider, so an update takes about 80
  clocks.

The input stage waits for the estimator before it hands over the next header.

## srTCM and marking

There is one `token_meter` per flow. Once per timeslot it refills its
buckets:

- if Bc + CIR < CBS, Bc grows by CIR;
- otherwise, if Be + CIR < EBS, Be grows by CIR;
- otherwise nothing changes.

Both buckets start full. Writing CBS or EBS refills them.

Metering has two modes:

- **Colour-blind:** L ≤ Bc gives green and takes L from Bc. Otherwise L ≤ Be
  gives yellow and takes L from Be. Otherwise the packet is red.
- **Colour-aware:** the colour the packet arrives with, read from the drop
  precedence bits of its DSCP, caps the result. A red packet is discarded
  while the `congestion` input is high.

`marker_out` works on one departing packet at a time:

1. Reads the first word from packet memory.
2. Has the packet metered.
3. Rewrites DSCP bits 23:18 of that word. The class goes in bits 5:3
   (001–100) and the drop precedence in bits 2:1 (01 green, 10 yellow,
   11 red).
4. Streams the packet out at one word per two clocks.

A discarded packet is read but not sent. The IPv4 header checksum is **not**
updated.

## Interfaces

- **Packet input** `in_valid/in_ready/in_data/in_sop/in_eop`: 32-bit words,
  big-endian. A packet may be at most 512 words (2048 bytes). A packet is
  dropped (`ev_in_drop`) when no slot is free or when it ends before its IPv4
  header is complete. While a header is still waiting for Decision/Win, the
  next packet is held at its first word.
- **Flow search:** the key is the source address, destination address,
  protocol and, for TCP/UDP only, the two ports. Entry 0 to 15 gives the FID.
  A packet with no match is counted as `ev_tail_drop`.
- **Packet memory** `pm_*`: address `{slot[10:0], word[8:0]}`, 32-bit data.
  Writes take effect in the clock of `pm_we`. Read data is expected one clock
  after `pm_re`. The memory itself is outside the design.
- **Microprocessor** `cpu_*`: the address is `{region[11:8], fid[7:4], field[3:0]}`.
  Writes take effect one clock later. Reads return look-up table fields one
  clock later.
  - Region 0 is the look-up table, with these fields:
    - 0 CIR
    - 1 MIR
    - 2 CIR_th
    - 3 MIR_th
    - 4 K
    - 5 tail-drop limit
    - 6 {colour_aware, G-mode}
    - 7 srTCM CIR
    - 8 CBS
    - 9 EBS
    - 10 AF class − 1
    - 11 EAR
    - 12 last arrival time
  - Region 1 is the search table, with these fields:
    - 0 SA
    - 1 DA
    - 2 protocol
    - 3 {source port, destination port}
    - 4 valid
- **Status** `rt`, `init_done`, and the event strobes `ev_*`, for statistics.

## What follows the source design and what does not

The following come from the description this design implements:

- the block partition;
- the two virtual memories and their block sizes;
- the three queue kinds and the idle list;
- the five queue-control functions and their clock counts;
- the SR/T1/T2/DT formulas;
- the EAR formula;
- the srTCM bucket update and metering;
- the AF codepoint table;
- 16 flows and 16 meters.

These are this design's own choices:

- the time unit;
- every number format;
- the packet-slot size;
- the step order inside each function;
- the fixed arbitration priority;
- the per-flow tail-drop limit;
- the separate 2k × 16 length RAM, which keeps each packet's length;
- the prefetched free slot and the deferred slot release;
- the valid bit in FID words;
- the DT request FIFO and the clamp on departure times;
- the microprocessor address map;
- the congestion input;
- the 2-clock output word rate.

Reading a packet back from packet memory is not a fixed 9-clock step: it takes
two clocks per word.

## Simulation

Every module has its own self-checking testbench in `tb/`. Each prints a
`TB_RESULT checks=… failures=…` line. `tb_srras_top` runs the complete design
at its default parameters:

- it configures four flows through the microprocessor port: srRAS
  colour-blind, G-srRAS colour-blind, colour-aware with a small tail-drop
  limit, and colour-aware under congestion;
- it sends bursts of UDP packets on these flows, plus packets of an unknown
  flow, and models the packet memory;
- it checks that every packet neither dropped nor discarded comes out once, in
  order within its flow, with its payload intact, and with the DSCP that
  matches its flow's class and the colour the meter reported;
- it holds the output until all 2048 packet-memory slots are taken and the
  input has to drop, then drains everything;
- it fails if any mechanism never happened. These are: tail drop at the flow
  limit, input drop with the packet memory full, the three SR regions, T2
  winning in G-srRAS mode, each colour, discard, timing-queue appends and
  departure-queue appends.

With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/ras_pkg.sv tb/tb_srras_top.sv \
          --top-module tb_srras_top -o sim && ./obj_dir/sim
```

Run it from the directory that holds `rtl/` and `tb/`. `-Wno-fatal` keeps
width and unused-signal lint warnings from stopping the build. Replace
`srras_top` with another module name to run its unit test. The
top-level test finishes in well under a second.

Details of the unit tests:

- `tb_queue_control` checks about 2500 departures against a reference queue
  model. It also checks that no packet leaves before its departure time,
  fills the packet memory completely, and checks the clock count of every
  function.
- `tb_dt_calculator` compares every departure time exactly against an
  integer reference.
- `tb_ear_estimator` allows the 2% error of the exponential.
