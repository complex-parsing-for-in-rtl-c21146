# DUNE frame parser with a recirculating header window

The DUNE neutrino detector sends its raw waveform data as 7,242-byte jumbo
Ethernet frames. After the Ethernet, IPv4 and UDP headers come two 128-bit
headers (DAQ and WIB) and then 7,168 bytes of 14-bit ADC samples. The samples
are packed back to back with no padding, and everything after UDP is
little-endian. A switch-style parser cannot take this apart in one go: it sees
only a short window at the head of each frame, it cannot reorder bytes, and
its fields must be byte-aligned.

This RTL parses the whole frame anyway. It uses the same structure as a
programmable switch: a parser, a few match-action stages, a deparser, a
traffic manager and a recirculation port. Each pass through the pipeline
handles the headers plus **one 168-byte segment** of the waveform, which is
96 samples. When the frame is sent round again, the deparser **removes the
segment it has just processed** and puts a one-byte pass counter in front of
the frame. The next pass therefore finds the next segment at the same place
in its header window. So the window slides along the payload by making the
frame shorter, not by looking deeper into it. A control register (`depth`)
sets how many times a frame goes round. With `depth >= 42`, all
43 segments of a full frame are parsed.

Every pass presents its results on the top-level `res_*` outputs:
- the DAQ and WIB headers converted to big-endian fields;
- the 96 samples as 16-bit values.

On its final pass the frame goes out of the egress port with a 192-byte header
added. That header carries the last segment's samples as 16-bit big-endian
values, so the parse can be checked from outside.

## 1. The frame and how the samples are packed

| bytes (from start of frame) | content | byte order |
|---|---|---|
| 0..13 | Ethernet | big-endian |
| 14..33 | IPv4 (no options) | big-endian |
| 34..41 | UDP | big-endian |
| 42..57 | DAQ header, 2 x 64-bit words | little-endian per 64-bit word |
| 58..73 | WIB header, 2 x 64-bit words | little-endian per 64-bit word |
| 74..7241 | waveform, 896 x 64-bit words | little-endian per 64-bit word |

The waveform is one long little-endian bit stream. Number the words w0, w1, …
and read the stream as the integer {…, w2, w1, w0}, where each word has
already been byte-reversed to its numeric value. Sample k then occupies bits
14k … 14k+13 of that integer.

Seven words are 448 bits, which is exactly 32 samples, so the packing pattern
repeats every seven words. Samples 4, 9, 13, 18, 22 and 27 of each group of
seven words straddle two words. For example, sample 9 is
`{w2[11:0], w1[63:62]}`, and sample 4 is `{w1[5:0], w0[63:56]}`.

A segment is 21 words: three groups of seven words, which give 96 samples.
The payload is 896 words, so a full frame has 42 full segments plus one
segment of 14 words.

The byte order is fixed in one place only. The parser stores every 64-bit
word with the first byte on the wire as its most significant byte. The blocks
in stage 1 reverse the byte order of each word before they interpret it.

The DAQ and WIB header fields, as converted (`dune_pkg::daq_hdr_t`,
`wib_hdr_t`), are:
- **DAQ word 0:** version 6, det_id 6, crate 10, slot 4, stream 8,
  reserved 6, seq_id 12, block_length 12.
- **DAQ word 1:** 64-bit timestamp.
- **WIB word 0:** two 15-bit cold-data timestamps, each followed by a pad
  bit, 10 flag bits, context 8, version 6, channel 8.
- **WIB word 1:** 64-bit extension.

The field names follow the DUNE format. The widths are this design's reading
of that format and only matter to logic that uses the `res_daq` and
`res_wib` outputs.

## 2. One pass through the pipeline

```
 network ──► ingress_port_merge ──► ingress_parser ──PHV──► stage 1 ──► stage 2 ──► stage 3 ──► ingress_deparser ──► traffic_manager ──► egress
                 ▲                        │ body (rest of frame)                                          ▲                    │
                 │                        └──────────────── body FIFO (1024 beats) ───────────────────────┘                    │
                 └──────────────────────────── recirculation FIFO (2048 beats) ◄──────────────────────────────────────────────┘
```

**ingress_port_merge.** This block picks the next frame from one of the
`NET_PORTS` network inputs (default 2, one per sender) or from the
recirculation FIFO. It takes turns among them one frame at a time, in
round-robin order. In front of the frame it puts 16 bytes:
- 8 bytes of intrinsic metadata:
  - byte 0, bit 0 = ingress port bit 8;
  - byte 1 = ingress port bits 7..0;
  - bytes 2..7 = a 48-bit arrival timestamp in cycles.
- 8 bytes of port metadata, all zero.

A recirculated frame carries `RECIRC_PORT` (default 68) as its ingress port.
A frame from network input i carries `MAC_PORT + i` (default 0 and 1).

**ingress_parser.** The parser stores the first 259 bytes of the frame
(`PRE_MAX`):
- the 16-byte prefix;
- the 1-byte pass counter, present on recirculated frames only;
- 242 bytes of frame: 74 header bytes plus 168 segment bytes.

It sends everything after those bytes to the body FIFO unchanged. It does not
move the bytes to other lanes.

From the stored window it builds the packet header vector (`phv_t`). The PHV
holds the Ethernet, IPv4 and UDP fields; the raw DAQ, WIB and segment words;
and one validity bit per header and per segment word. A header counts as
valid only if all of the following hold:
- the headers before it are valid;
- the type fields select it: ethertype 0x0800, IPv4 with IHL 5, protocol 17;
- the frame is long enough to hold it.

**Stage 1** has four blocks side by side:
- three `reverse_stage` instances, each taking 7 words and giving 32 samples,
  each sample widened to 16 bits;
- `daq_wib_convert`, which byte-reverses and slices the two headers.

A sample is valid only if every word it touches was present, so a short last
segment gives exactly the samples it contains. A frame counts as DUNE when
both the DAQ and the WIB header are valid.

**Stage 2** has two blocks:
- `chunk_processor` is a debug table. It can replace a chosen sample with a
  chosen value on a chosen pass.
- `recirc_control` decides whether the frame goes round again:
  `recirculate = dune && more && pass_count < depth`. Here `more` means the
  frame extends past the window.

**Stage 3** has three blocks:
- **Checkpoint 1** counts matches on every pass.
- **Checkpoint 2** counts matches on recirculating passes only.
- **forwarding_table** looks up the IPv4 destination address on passes that
  do not recirculate. A miss, or a frame with no valid IPv4 header, is
  dropped.

**ingress_deparser.** The deparser writes the frame out in one of three
layouts, then appends the body from the body FIFO:

| case | bytes written before the body |
|---|---|
| recirculate | next pass count (1 byte), the 74 header bytes as received. The segment just parsed is left out. |
| final pass of a DUNE frame | the 74 header bytes, 96 × 16-bit big-endian samples (0 for samples that were not present), the segment as received |
| anything else | the received bytes unchanged |

The body's first valid byte can be in any lane. `byte_packer` closes the gap
so that the output beats are dense again.

**traffic_manager.** It sends each frame to one of three places: the egress
stream with its port, the recirculation FIFO, or nowhere (dropped).

### What the final frame contains

After `d` recirculations (`d = min(depth, 42)` for a full frame) the frame has
lost its first `d` segments. The frame that leaves holds:
- the original headers;
- the samples of segment `d` (waveform samples 96d … 96d+95) as 16-bit
  values;
- segment `d` itself and the rest of the waveform.

With `depth = 0` the frame keeps its whole payload and gains only the sample
header for segment 0. The samples of every segment appear on `res_adc`, one
pass after another. Logic placed after the parser sees the whole waveform
there.

Length and checksum fields in IPv4 and UDP are not rewritten.

## 3. Control plane

Writes: `cp_we` with `cp_table`, `cp_addr` and `cp_wdata` (64 bits).
Reads: `cp_rd_table` and `cp_rd_addr` select a 32-bit value on `cp_rd_data`,
combinationally.

| table (`cp_table_e`) | write (`cp_wdata`) | read |
|---|---|---|
| `CP_RECIRC` (0) | `[7:0]` depth | depth |
| `CP_FWD` (1), 16 entries | `[63]` valid, `[40:32]` egress port, `[31:0]` IPv4 destination | – |
| `CP_CHUNK` (2), 8 entries | `[63]` valid, `[29:16]` 14-bit value, `[14:8]` sample index 0..95, `[7:0]` pass count | – |
| `CP_CHK1`/`CP_CHK2` (3/4), 4 entries each | `[63]` valid, `[45:32]` expected sample value, `[30:24]` sample index, `[16]` match sample, `[15:8]` pass count, `[1]` match pass count, `[0]` is_recirc | hit counter of entry `cp_rd_addr` |
| `CP_STATS` (5) | – | 0 forwarded, 1 recirculated, 2 dropped frames, 3 cycles a network frame waited, 4 network frames admitted, 5 recirculated frames admitted |

Rules for the tables:
- Every table entry starts invalid after reset.
- Writing a checkpoint entry clears its counter.
- A checkpoint entry always matches on `is_recirc`, which is 1 for frames
  that arrived from the recirculation port.
- Matching on the pass count or on a sample value is optional, switched on by
  the bits above.

## 4. Flow control, and why the loop cannot lock up

All streams use valid/ready handshakes, with 8-byte beats
(`beat_t {data, keep, last}`). Byte i on the wire is `data[8i +: 8]`.

**One frame at a time.** Only one frame is inside the stretch from the
parser to the deparser. The parser takes a new frame only while the
deparser is idle, and it waits for the deparser's `pass_done`. While the
header vector crosses the three stages, the body of the same frame waits in
the body FIFO. That FIFO holds a whole maximum-size frame (8,192 bytes).

**Limit on frames in the loop.** The recirculation path is a loop: a frame
that the traffic manager sends back needs room in the recirculation FIFO. If
network frames kept entering while that FIFO was full, the pipeline would
wait for room and the FIFO would wait for the pipeline. To prevent this, the
port merge admits a network frame only while fewer than `LOOP_FRAMES` (2)
admitted frames have not yet left the loop. A frame leaves the loop when it
is forwarded or dropped (`frame_exit`). The recirculation FIFO holds
`LOOP_FRAMES` maximum-size frames, so it always has room.

**Where traffic competes.** A network frame that is held back waits at its
network input (back-pressure) and is not lost. Every cycle that a network
input holds a waiting frame adds one to statistic 3. This is where incoming and recirculated traffic compete for
the pipeline.

**Cost per frame.** Each pass streams the whole remaining frame through the
pipeline once, at one 8-byte beat per cycle plus a few cycles per pass. A
7,242-byte frame with `R` recirculations therefore costs about
Σ_{k=0..R} (7,259 − 168k) / 8 cycles. That is:
- about 910 cycles for R = 0;
- about 8,800 cycles for R = 10;
- about 20,000 cycles for the full parse (R = 42).

At a clock of f, one frame stream can be carried at up to about 64·f bit/s
with no recirculation. That rate falls roughly as 1/(R+1) as recirculation
increases. `tb_recirc_sweep` measures it on the full-size design, with the
network input kept busy by back-to-back 7,242-byte frames:

| recirculations | cycles per frame | input-side lower bound | bits per cycle |
|---|---|---|---|
| 0 | 971 | 908 | 59.7 |
| 1 | 1,877 | 1,795 | 30.9 |
| 2 | 2,761 | 2,661 | 21.0 |
| 4 | 4,466 | 4,330 | 13.0 |
| 8 | 7,624 | 7,416 | 7.6 |
| 10 | 9,077 | 8,833 | 6.4 |
| 16 | 12,932 | 12,580 | 4.5 |

With both network inputs busy, the two streams share the pipeline evenly.
Each gets half of the rates above: 29.8 bits per cycle at 0 recirculations
and 3.2 at 10. Together they get no more than one stream alone.

The lower bound is one input beat per cycle for every pass of the frame.
The remaining gap is a fixed cost of about 20 cycles per pass, spent while
the header vector crosses the stages.

At 1 GHz, "bits per cycle" reads directly as Gbit/s. Carrying a 100 Gbit/s
stream without recirculation would need a clock of about 1.7 GHz.

## 5. Where this design departs from the switch program it models

- **No programmable chip underneath.** The parser, the stages and the
  deparser are fixed RTL. The tables keep the same roles and are written
  through a simple register port. There is no runtime API.
- **Stage placement.** The decision to recirculate is made in stage 2, and
  both checkpoints sit in stage 3. In the switch program, the recirculation
  table and Checkpoint 1 share the first match-action stage. The results are
  the same either way.
- **Where samples are extracted.** Samples are extracted in the reverse
  stages, 32 per stage. The chunk processor is only the run-time table that
  can inject sample values for checking.
- **Egress.** The egress pipeline did no work in the switch program and is
  not modelled. Recirculated frames go straight from the traffic manager
  back to the port merge.
- **I/O.** There are `NET_PORTS` network input streams and one egress
  stream. Egress port numbers exist only as labels: `eg_port` goes with each
  egress frame. There are no
  MAC blocks, and no frame check sequence is handled.
- **Pass-counter layout.** The pass counter is a single byte placed directly
  after the 16-byte prefix.
- **Header fields.** The UDP destination port is not checked; any IPv4/UDP
  frame long enough is treated as DUNE. IPv4 and UDP length and checksum
  fields are not updated when the frame is shortened or lengthened.
- **Throughput with recirculation.** On the switch, throughput collapsed
  roughly exponentially with the number of recirculations, and faster with
  two competing streams, because frames were lost at the congested
  recirculation port. This design never drops a frame for lack of room.
  Recirculated frames and waiting network frames share the pipeline by
  round robin, and the network inputs are back-pressured. Throughput therefore
  falls only as about 1/(number of passes), as measured below. The absolute
  rates depend on the clock, which the design does not fix.
- **One pipeline for all ports.** The network inputs (two by default) share
  a single 8-byte-per-cycle pipeline and a single egress stream.

## 6. Files

| file | role |
|---|---|
| `rtl/dune_pkg.sv` | sizes, beat/PHV/header types, control-plane entry formats |
| `rtl/dune_parser_top.sv` | the whole pipeline |
| `rtl/ingress_port_merge.sv` | network/recirculation arbitration, metadata prefix, loop limit |
| `rtl/ingress_parser.sv` | header window → PHV, body → FIFO |
| `rtl/reverse_stage.sv` | byte reversal and 32-sample extraction for 7 words |
| `rtl/daq_wib_convert.sv` | DAQ/WIB headers to big-endian fields |
| `rtl/chunk_processor.sv` | run-time sample injection table |
| `rtl/recirc_control.sv` | depth register and recirculation decision |
| `rtl/checkpoint_table.sv` | match-and-count debug table (used twice) |
| `rtl/forwarding_table.sv` | exact-match IPv4 destination → port |
| `rtl/ingress_deparser.sv` | output layouts, joins header and body |
| `rtl/byte_packer.sv` | re-aligns byte runs into dense beats |
| `rtl/traffic_manager.sv` | forward / recirculate / drop, counters |
| `rtl/stream_fifo.sv` | beat FIFO (body and recirculation buffers) |

Each file starts with a comment giving its interface and timing.

## 7. Simulation and tests

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each one
compares the block's outputs with a reference model written independently
inside the testbench, and ends with the line
`TB_RESULT checks=<n> failures=<n>`. Run one with plain Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/dune_pkg.sv tb/tb_dune_parser_top.sv --top-module tb_dune_parser_top \
    -Mdir obj_top -o sim
./obj_top/sim
```

For another testbench, replace `tb_dune_parser_top` with its name. Every
testbench runs in well under a minute.

`tb_dune_parser_top` runs the complete top level at its default parameters.
It builds DUNE frames with known sample values, and its reference model
unpacks the 14-bit stream bit by bit. It covers these scenarios:
- depth 0;
- depth 3, with a sample injected on pass 3 and checkpoints keyed on pass
  counts and sample values;
- a short UDP frame that is forwarded unchanged;
- a non-IP frame and an unknown destination, both dropped;
- one frame on each network input at the same time;
- a full 43-pass parse of a 7,242-byte frame, checking all 96 samples of
  every pass on `res_adc`;
- egress back-pressure while those two frames are in flight.

It counts how often each mechanism happened and fails if any of them never
did. The mechanisms are recirculations, drops, waiting network frames, egress
back-pressure, partial last segments, and the full parse.

The unit testbenches cover the following:
- byte reversal and sample positions for random words (`tb_reverse_stage`);
- header field slicing (`tb_daq_wib_convert`);
- entry matching and priority (`tb_chunk_processor`, `tb_checkpoint_table`,
  `tb_forwarding_table`);
- the recirculation rule over all count/depth pairs (`tb_recirc_control`);
- PHV contents and body split for frames of many lengths, network and
  recirculated (`tb_ingress_parser`);
- the three output layouts with bodies starting at random lanes
  (`tb_ingress_deparser`);
- routing and counters (`tb_traffic_manager`);
- round robin over two network inputs and the recirculation input, prefix
  contents, and the loop limit (`tb_ingress_port_merge`).

`tb_recirc_sweep` runs the recirculation sweep of section 4 on the top level
at its default parameters, for depths 0 to 16. It runs one stream, then two
streams on the two network inputs. It checks the following:
- every egress frame, byte for byte;
- the time per frame, against the input-side bound;
- that the delivered rate falls as the depth grows;
- that network frames had to wait for recirculated ones;
- that with two streams each stream gets less than one stream alone, and
  both together no more.

The RTL is synthesizable. It has no vendor primitives; the FIFOs are plain
arrays. A generic synthesis of the top at its default parameters gives about
4,800 cells and 19,300 flip-flop bits, plus 224,256 memory bits in the two
beat FIFOs (1024 + 2048 beats of 73 bits). Verilator lint reports three kinds
of warning, none about the circuit:
- unused signals: some PHV fields and FIFO status outputs are carried but
  not consumed;
- unused parameters: package constants that not every module uses;
- signals used both with asynchronous reset and as data
  (`SYNCASYNCNET`): the active-low reset is also read by assertions'
  `disable iff`.
