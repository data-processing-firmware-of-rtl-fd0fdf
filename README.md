# UT Data Processing: one readout half in SystemVerilog

The Upstream Tracker (UT) of LHCb is read out by SALT front-end ASICs. Each
ASIC sends, for every 40 MHz bunch crossing, a variable-length packet: a
header carrying the bunch-crossing number (BXID) and a hit count, followed
by 12-bit hits. One half of a readout board receives up to 24 such streams.
It must turn them into one sequence of fixed-format 256-bit lines that host
software can decode without knowing anything about the front-end wiring, and
it must do so without dead time.

The key idea is the **lane**. The 256-bit output line is cut into a 64-bit
header column and six 32-bit lane columns. Each lane belongs to one optical
link, that is, to two or four ASICs on the same sensor. Hits therefore never
have to be routed across the whole line. Each lane is merged on its own, and
the only global decision per event is how many lines the busiest lane needs.

This RTL implements that chain for one half:
- six Input Blocks;
- six Lane Builders, each built from two-input Mini Lane Builders;
- one Output Block;
- occupancy monitoring;
- a control block with counters and snapshots.

The board-level framework around it is not included: optical links, GBT
decoding, BXID extension and PCIe transfer. The top module's ports are the
points where it would connect.

## Input: SALT streams and flavours

The framework delivers one stream per ASIC at 200 MHz. Its width depends
on how many e-links the ASIC uses: 24, 32 or 40 bits for 3, 4 or 5 e-links.
Packets are packed back to back, most significant bit first, with no
alignment to the stream words.

| field          | bits | notes |
|----------------|------|-------|
| BXID           | 12   | extended from the ASIC's 4 bits by the framework |
| parity         | 1    | not checked |
| type           | 1    | 0 = normal packet, 1 = special packet |
| count / code   | 6    | normal: number of hits; special: packet code |
| hit (repeated) | 12   | 7-bit channel, 5-bit ADC |

Special codes:
- `0b000110`: NZS (all channels, not zero-suppressed);
- 4: BXVeto;
- 5: HeaderOnly;
- 7: Sync.

Codes 4, 5 and 7 are set in `dp_pkg` and can be changed there. An NZS packet is taken
to be 20 + 24 + 128×6 bits long.

A *flavour* is chosen at elaboration time with two parameters:

| flavour | `ELINKS` | `NASIC` (ASICs per lane) | stream width |
|---------|----------|--------------------------|--------------|
| 4x3 (default) | 3 | 4 | 24 |
| 2x3     | 3 | 2 | 24 |
| 2x4     | 4 | 2 | 32 |
| 2x5     | 5 | 2 | 40 |

The mixed flavour (two 4x3 links with four 2x3 links in one half) is not
supported.

## Output format

Every event becomes one packet of one or more 256-bit lines. Each packet has
a descriptor `{BXID, FTYPE, number of lines, FLAGS}` (`out_meta_t`).

```
 255        192 191   160 159   128 127    96 95     64 63     32 31      0
+--------------+--------+--------+--------+--------+--------+--------+
| header column| lane 5 | lane 4 | lane 3 | lane 2 | lane 1 | lane 0 |
+--------------+--------+--------+--------+--------+--------+--------+
```

**Event Header.** The first line's header column holds:

```
63      52 51  48 47    40 39    32 31    24 23    16 15     8 7      0
|  BXID   | FLAGS| hits5  | hits4  | hits3  | hits2  | hits1  | hits0  |
```

The `hitsN` fields are the total hit count of each lane. FLAGS:
- bit 3: all ASICs disabled. It is kept in the format but never set here.
- bit 2: all active ASICs sent the same special code.
- bits 1:0: type summary of that code: 00 Sync, 01 HeaderOnly, 10 BXVeto, 11 other.

**Hits.** A 12-bit hit is widened to 16 bits, `{offset[3:0], channel[6:0],
adc[4:0]}`. The 4-bit offset is set per ASIC through the control registers.
It makes `{offset, channel}` the 11-bit strip number on the sensor, so no
ASIC number has to travel with the hit. A lane column holds two hits per
line, the earlier one in the low 16 bits. All hits of ASIC 0 come first,
then ASIC 1, and so on. A lane that runs out of hits is filled with zeros.
The packet has as many lines as its busiest lane needs, and at least one.

**Three frame types** (FTYPE):

| FTYPE | used when | length |
|-------|-----------|--------|
| `0x42` normal | every enabled ASIC sent a normal packet | max(1, ceil(max lane hits / 2)) |
| `0x43` Flag Header | at least one ASIC sent a special packet (or NZS, or was truncated), and they do not all agree | at least 4 lines |
| `0x44` Short Special | every enabled ASIC sent the same special code, NZS excluded | 1 line, no hits |

In a `0x43` packet, the header column of lines 1–3 carries the 8-bit head of
every ASIC. The head byte is `{0, special-flag, count-or-code}`. The lanes are
paired as follows, with ASIC 3 in the high byte and ASIC 0 in the low byte
of each 32-bit half:

- line 1: `{lane 1, lane 0}`
- line 2: `{lane 3, lane 2}`
- line 3: `{lane 5, lane 4}`

With 2-ASIC lanes, the two upper bytes of each half are zero.

## The processing chain

```
 200 MHz                  processing clock (~250 MHz)                    PCIe clock
 ASIC streams ─► Input Block ×6 ─► Lane Builder ×6 ─► Output Block ─► line FIFO ─► pkt_*
                  │ decoder per ASIC    │ tree of Mini     │ DumpFIFO/padding  descriptor
                  │ hit FIFO + Event    │ Lane Builders    │ per lane, header  FIFO ─► meta_*
                  │ FIFO (dual clock)   │                  │ generation
                  └──────── occupancy, counters, snapshots ─► ECS block (40 MHz) ◄─► ecs_*
```

### Input Block (`input_block`, `salt_decoder`)

There is one Input Block per optical link, with one decoder per ASIC. The
decoder works as follows:

- It keeps an MSB-aligned 64-bit accumulator. Each stream word is appended
  behind the bits left over from the last one.
- It reads a 20-bit header, then the hits. It takes up to four hits per
  cycle and never stalls.
- Each output word is 64 bits: four 16-bit slots plus a 3-bit count. The
  count lets one word hold hits of only one packet, so event boundaries
  stay on word boundaries.
- At the end of a packet it writes an event entry `{BXID, head byte, hit
  count}` into the Event FIFO.
- NZS payloads are counted off and dropped. The event is still recorded,
  as a special event with the NZS code.

The hit FIFO and the Event FIFO are both dual-clock. This is where the data
leave the 200 MHz domain.

A disabled ASIC's words never reach its decoder, and the later stages do
not wait for it.

**Truncation mode.** The Input Block tracks the fullest hit or Event FIFO
among its enabled ASICs, as seen from the write side. When that occupancy
rises above `eps_h`, the block enters truncation mode. It leaves only when
the occupancy falls below `eps_l`.

While in truncation mode, a packet whose header arrives has its hits dropped.
Its event is marked with the internal code `0x3F`, and the Output Block then
emits a Flag Header for that event. So an overloaded link loses hits, not
events, and every damaged event is marked.

The decoder is one general shifter that serves all widths. The original
firmware instead builds a separate pipelined alignment network for each
flavour, with fixed sampling points.

### Lane Builder (`lane_builder`, `mini_lane_builder`)

A Mini Lane Builder merges two event streams, A and B, for the same bunch
crossing. It reads A's event entry and B's event entry, then copies A's hits
followed by B's hits. A packer holding up to three pending hits keeps the
output words full, four hits each, except the last word of an event. The
merged entry gets:

- the summed hit count;
- the two sets of ASIC head bytes side by side;
- the enable bits;
- an error bit if the two BXIDs differ. The event is still merged, and a
  `bxid_err` pulse is raised.

A four-ASIC lane is a two-layer tree: (0,1) and (2,3), then their outputs.
A two-ASIC lane uses a single Mini Lane Builder. Each Mini Lane Builder
writes into its own pair of synchronous FIFOs, hits and events.

### Output Block (`output_block`)

The Output Block looks at the six lane event entries together. From them
it decides, in one cycle:

- the frame type;
- the FLAGS;
- the number of lines;
- whether the BXIDs agree.

It then writes one line per cycle. In each line every lane column pops
at most two hits from its lane. The first line carries the Event Header,
and lines 1–3 of a Flag Header packet carry the ASIC heads.

The descriptor is written together with the **first** line. A packet longer
than the line FIFO therefore cannot block its own reader.

## Flow control

Nothing runs in lock step. Each stage starts an event only when its inputs
hold a complete event entry and its own event output FIFO has room. Inside
an event it stops word by word while its hit FIFO is full.

When the PCIe side stops reading, the stages fill up from the back:
1. the Output Block's line FIFO;
2. the last Mini Lane Builder;
3. the first layer;
4. the Input Blocks, which finally enter truncation mode.

Nothing is lost except the hits that truncation drops by design. Overflowing
the input FIFOs is prevented only by truncation. `eps_h` must leave room
for the data still arriving after the switch, since the decision lags by a
few cycles and by one packet.

## Clocks

| clock | rate | domain |
|-------|------|--------|
| `clk_in`   | 200 MHz | ASIC streams, decoders, truncation control |
| `clk_dp`   | about 250 MHz (any) | Lane Builders, Output Block, counters |
| `clk_pcie` | 250 MHz | read side of the line and descriptor FIFOs |
| `clk_ecs`  | 40 MHz  | control register bus |

Data cross clock domains only through the Gray-pointer FIFOs (`async_fifo`).
The configuration registers are quasi-static: each receiver takes them in
through two flip-flops, and they should be changed only while the chain is
idle. The snapshot is handed to the ECS clock with a toggle handshake.

## Control registers (`ecs_common`)

The bus is in the 40 MHz domain. Read data appear one cycle after `ecs_rd`, with `ecs_rvalid`.

| addr | access | content | reset |
|------|--------|---------|-------|
| 0x00 | W bit 0 / R | request a snapshot / number of snapshots taken | 0 |
| 0x01 | RW | ASIC enable, bit 4·lane+asic | all 1 |
| 0x02 | RW | `eps_h` (entries) | 384 |
| 0x03 | RW | `eps_l` (entries) | 128 |
| 0x04–0x06 | RW | strip offsets, 4 bits per ASIC; ASIC 8·(addr−4)+i in bits 4i+3:4i | ASIC position in its lane |
| 0x08 | R | cause of the last snapshot `{software, TFC, BXID error, buffer full}` | 0 |
| 0x10–0x15 | R | snapshot counters: normal, Flag Header, Short Special, truncated, BXID error, buffer-full events | 0 |
| 0x20+2m / 0x21+2m | R | snapshot peak / average of monitor m | 0 |

The monitors are numbered as follows:
- m = 0..5: the Event FIFO of ASIC 0 in each Input Block;
- m = 6..11: the final event FIFO of each Lane Builder;
- m = 12: the Output Block line FIFO.

The event counters run all the time in the processing clock. A snapshot
copies them, together with all the monitor values, into the register set.
A snapshot is taken when:
- any buffer becomes full;
- a BXID error occurs;
- `tfc_snapshot` pulses;
- software writes register 0x00.

The copy includes the event that triggered it. Triggers that arrive while
the previous snapshot is still crossing into the ECS clock are dropped.

Peaks run from reset: the monitors' `clear` input is tied off in the top.
Averages are taken over windows of 1024 processing cycles.

## Sizes

| parameter | default | basis |
|-----------|---------|-------|
| `IB_EVT_DEPTH`  | 512 | matches a 9-bit Input Block Event FIFO counter |
| `IB_DATA_DEPTH` | 512 | chosen |
| `LB_EVT_DEPTH`  | 64  | matches 6-bit Lane Builder event FIFO counters |
| `LB_DATA_DEPTH` | 256 | chosen |
| `OB_META_DEPTH` | 64  | matches a 6-bit Output Block event FIFO counter |
| `OB_LINE_DEPTH` | 512 | chosen |

At the defaults, coarse synthesis of one half gives:
- about 10,500 cells;
- 12,800 flip-flop bits;
- 1.65 Mbit of FIFO memory.

At the worst simulated occupancies, one half needs about 3.3 lines per
bunch crossing, which is about 131 M lines/s. The Output Block produces
250 M lines/s at 250 MHz, so the design has roughly a factor two in hand.

## Departures from the original firmware and known limits

- **NZS data are not forwarded.** NZS packets are consumed and reported as
  special events (Flag Header, code `0b000110`). The dedicated NZS output
  layout, with the ASIC id, the 24-bit NZS header and channel samples, is not
  produced.
- **SALT parity is ignored.**
- **The decoder is a generic shifter.** It is not the per-flavour alignment
  pipelines of the original design. It is functionally equivalent but
  sized differently.
- **The mixed Jx3 flavour is not built.**
- **Monitoring is reduced.** The original keeps dozens of counters and 14
  accumulators per lane. Here there are six global counters and 13 monitored
  FIFOs. The register map is this design's own.
- **FLAGS bit 3 (all disabled) is never set.** With every ASIC disabled, no
  events are produced at all.
- **A BXID mismatch is reported, not repaired.** Mismatching fragments are
  still merged under the BXID of the first source.
- **Special codes are placeholders.** The codes for BXVeto, HeaderOnly and
  Sync are assumed values in `dp_pkg`.

## Simulating

Any testbench builds with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/dp_pkg.sv tb/tb_salt_pkg.sv tb/tb_ref_pkg.sv tb/tb_ut_data_processing.sv \
    --top-module tb_ut_data_processing -Mdir obj -o sim && obj/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself; a
watchdog ends a hung run with a failure. The reference models live in
`tb/tb_salt_pkg.sv` (packet encoder) and `tb/tb_ref_pkg.sv` (expected output
packets).

| testbench | what it shows |
|-----------|---------------|
| `tb_salt_decoder` | all three stream widths, random packets of every kind, against an encoder |
| `tb_input_block` | two clock domains, read stalls, truncation entry and exit with hysteresis |
| `tb_mini_lane_builder`, `tb_lane_builder` | merging order, packing, disabled ASICs, BXID errors, output back-pressure |
| `tb_output_block` | all three frame types, padding, long packets, slow PCIe reader |
| `tb_async_fifo`, `tb_sync_fifo`, `tb_occupancy_monitor`, `tb_ecs_common` | the building blocks and the register bus |
| `tb_ut_data_processing` | the whole half at default sizes |
| `tb_workload_4x3` | the whole half under the busiest three-e-link traffic, with links running at full rate |
| `tb_workload_2x5` | the same for the 2x5 flavour under the busiest five-e-link traffic |

The end-to-end test, `tb_ut_data_processing`, runs 700 bunch crossings of
mixed traffic through the 4x3 default build. It checks every output line
and descriptor against the reference model. It also makes sure each
mechanism actually happened:
- normal, Flag Header and Short Special packets;
- NZS packets;
- back-pressure at the Output Block and at a Lane Builder;
- truncation entry and exit;
- an injected BXID error;
- a disabled ASIC;
- snapshots.

It needs about 20 s to build and a few seconds to run.

`tb_workload_4x3` sends 2000 crossings with a mean of 1.74 hits per lane,
drawn from a geometric distribution. Each ASIC link delivers one 24-bit word
per crossing. Over a run it averaged 2.74 output lines per crossing, against
2.8 expected. The Output Block line buffer never held more than 4 lines.
The last packet left about 50 ns after the last input word, so the chain
keeps up with the links. At this rate a link needs about 25 bits per crossing
but carries 24, so links fall behind one another. The Input Block and Lane
Builder event FIFOs absorb that skew: the Lane Builder FIFOs peaked at 47 of
their 64 entries. Heavier or longer bursts would end in truncation.

`tb_workload_2x5` does the same for the 2x5 flavour. It uses a mean of 2.2
hits per lane on 40-bit streams and gave 3.46 lines per crossing, against
3.28 expected. The gap is probably the geometric model, which gives more
large events than the real hit distribution. The Output Block again peaked
at 4 lines, and the Lane Builder event FIFOs at 34 entries. The 2x4 flavour
has no workload test of its own. Its traffic (0.96 hits per lane on 32-bit
streams) is lighter than either of these.

To change flavour, set `ELINKS` and `NASIC` on `ut_data_processing`.
Streams `din[lane][asic]` take the low `8·ELINKS` bits of each word.
