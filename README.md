# VELO TELL40 readout data path

The LHCb Vertex Locator (VELO) pixel detector is read out by VeloPix ASICs.
A VeloPix does not send hits in time order. Each ASIC groups its pixels into
SuperPixels (SPs) of 2 x 4 pixels. It sends one 30-bit SuperPixel packet (SPP)
for each SP that was hit, and the packet carries the 9-bit bunch-crossing
timestamp of its hits. The packets arrive over up to four 5.12 Gb/s GWT links
per ASIC, with a latency that varies from packet to packet. The readout board
(TELL40) must do three things:

1. Put the packets back in bunch-crossing order.
2. Match each bunch crossing to the metadata of the LHCb timing and fast
   control (TFC) system.
3. Turn the pixel hits of each event into clusters before the data leave the
   board.

This RTL implements that data path for one board. There are two identical,
independent data streams, and each stream serves ten links from six ASICs.
Each stream ends in a stream of event fragments made of 32-bit words.

```
rx words (10 links) ─► link decoder ─► SPP extractor ─┐
                       (align, parity, descramble)     │ one SPP/cycle per link
                                                       ▼
                       timestamp sorter: FIFOs ─► 16-lane butterfly router ─► 16 SPP RAM banks
                                                                               (2 pages x 32 bins x 512)
TFC metadata ─────────► time aligner: reads one time bin per TFC entry ─► events
                                                       ▼
                       clustering: isolation flag ─► isolated-SP table ──┐
                                               └───► 40 matrices on a line ─► merge
                                                       ▼
                       output formatter ─► fragment words (frag_valid/frag_data/frag_last)
```

Everything runs on one 160 MHz clock. A bunch crossing (BX, 40 MHz) is four
cycles long. Per BX, each link delivers one 128-bit frame as four 32-bit
words, and the TFC delivers one metadata word.

## Module map

| Module | Role |
|---|---|
| `velo_tell40_top` | Two `data_stream` instances (stream IDs 0 and 1) sharing the TFC input |
| `data_stream` | Ten `gwt_link_decoder` + `spp_extractor`, then `timestamp_sorter`, `time_aligner`, `clustering`, `output_formatter` |
| `velo_pkg` | Frame and packet layouts, Gray decode, descrambler step, centroid functions, status record |
| `sync_fifo` | Valid/ready FIFO used throughout |
| `gwt_word_aligner`, `gwt_frame_checker`, `gwt_descrambler`, `gwt_link_decoder` | Frame recovery on one link |
| `spp_extractor` | Frame → SPP items with chip ID and binary timestamp |
| `spp_switch2x2`, `spp_router`, `spp_ram_bank`, `timestamp_sorter` | Sorting by timestamp |
| `time_aligner` | Page swap, TFC matching, timestamp extension, event building |
| `sp_isolation_flagger`, `cluster_lut_isolated`, `cluster_matrix`, `clustering` | Clustering |
| `output_formatter` | Fragment header and cluster words |

## Link frames and decoding

The GWT frame has 128 bits, most significant bit first on the wire:

| Bits | Field |
|---|---|
| [127:124] | header `4'hA` |
| [123:120] | parity; bit 120+i is the XOR of the 30 scrambled bits of SPP i |
| [119:90], [89:60], [59:30], [29:0] | SPP 3 .. SPP 0 |

In each 32-bit transceiver word, the earliest bit sits in bit 31.

### Word aligner (`gwt_word_aligner`)

The aligner joins each word with the one before it. It cuts a 32-bit window
at a bit offset `slip`, and four windows form a candidate frame.

- **Searching for the boundary.** While the link is unlocked, each candidate
  without the `A` header moves the boundary one bit later. When `slip`
  wraps from 31 to 0, the word counter holds for one word, so all 128 bit
  positions are tried in turn. The candidate right after a wrap still mixes
  the two offsets, so it is ignored.
- **Locking.** After `LOCK_FRAMES` (16) good headers in a row, the link is
  locked.
- **Losing lock.** After `UNLOCK_FRAMES` (8) bad headers in a row, the link
  drops lock and the lock-loss counter increments.

### Frame checker and descrambler

The frame checker drops frames with a parity error and counts them. Each of
the four SPP slots is a separate self-synchronising descrambler lane for
x^30 + x^16 + x^15 + x + 1:

```
d[n] = s[n] ^ s[n-1] ^ s[n-15] ^ s[n-16] ^ s[n-30]
```

In this formula `n` counts bits in wire order. One frame supplies all 30
history bits a lane needs, so the output is correct from the second frame
after lock. The link decoder suppresses that first frame. A frame with a
parity error still advances the lane history, but it is not passed on.

### SuperPixel packet

| Bits | Field |
|---|---|
| [29:23] | SP column |
| [22:17] | SP row |
| [16:8] | timestamp, Gray coded |
| [7:0] | hitmap; bit i is pixel column i/4, pixel row i%4 inside the SP |

A packet with an empty hitmap is a special packet, and its type is in
[29:26]. Type `4'h5` is the synchronisation packet, and it carries the full
12-bit BX ID in [19:8].

The extractor does the following:

- It passes the four SPPs of a frame on at one per cycle.
- It drops empty hitmaps.
- It converts the timestamp to binary.
- It prepends the 3-bit chip ID, which is fixed by the link number. Links
  are grouped per chip as (4,2,1,1,1,1), so links 0-3 belong to chip 0,
  links 4-5 to chip 1, and links 6-9 to chips 2-5.
- It reports synchronisation packets separately.

## Timestamp sorter — the central part

The sorter writes each SPP into RAM at an address given by its own
timestamp. Reading then happens in BX order simply by walking the addresses.

**Router.** The router is a 16-lane butterfly made of 2x2 switches. Each
switch has a small FIFO on both sides. Stage s of the switches steers on
one bit of the lane number `ts[8:5]`, so a packet always ends up on the RAM
bank for its block of 32 consecutive BXs. The ten link FIFOs feed lanes 0-9.
A switch output that two inputs want in the same cycle serves one of them
and stalls the other.

**RAM banks.** Each `spp_ram_bank` has two pages. A page has 32 time bins,
one per BX of the bank's 32-BX block, and each bin holds 512 stored SPPs of
24 bits: chip, column, row and hitmap, because the timestamp is the address.
Each page also keeps a count per bin. A bin that is full drops further SPPs
and counts them.

The 16 banks together hold 2 pages × 512 BX per stream. That is 16 × 2 × 32
× 512 × 24 = 12.6 Mbit per stream and 25.2 Mbit per board.

**Pages.** One page is written while the other is read. The pages swap at
the start of each 512-BX period. When they swap, the counts of the page that
becomes the write page are cleared.

**Synchronisation.** The sorter remembers, for each page, whether it received
a synchronisation packet and the upper BX bits that packet gave.

## Time aligner

The TFC delivers, for every BX:

- the BX ID, 12 bits;
- a fast-reset flag;
- a synchronisation flag;
- a veto flag.

These entries go into a 1024-entry buffer. Each entry is tagged with the
number, modulo 4, of the page being written when the entry arrived.

An entry whose BX ID has its nine low bits at zero begins a new period. That
entry swaps the sorter pages and opens the page just closed for reading. The
aligner then works through the buffered entries of that page. For each
non-vetoed entry it reads time bin `bxid[8:0]` and emits an event: a header
item, followed by one item per stored SPP. Vetoed BXs produce no event.

**Extending the timestamp.** The VELO timestamp has only 9 bits. The upper
three bits come from the synchronisation packets:

- A page that carried a synchronisation packet sets them.
- Each later page adds one.
- Until the first synchronisation, events carry no SPPs and `synced = 0`.
- After that, if the extended VELO time and the TFC ID differ, the event
  header is marked `ts_mismatch`.

**Requirements on the link/TFC alignment.** A page closes when the TFC entry
of the next period arrives. So every SPP of a period must be written before
the TFC word with `bxid[8:0] == 0` that follows the period. In practice, the
TFC stream must lag the link data by more than the link latency spread, and
hits near the end of a period are at risk. The end-to-end testbench keeps the
TFC 6 BXs behind the data, and puts hits only in BX 16..480 of each period.

**Overruns.** Reading may fall more than one period behind, for example under
sustained back-pressure. In that case the entries of a page that closes again
are dropped and counted as `overruns`. An event that is being read just as
its page is reused may contain wrong SPPs.

## Clustering

The clustering handles one event at a time and has two paths.

### Isolated SPs

`sp_isolation_flagger` buffers the SPs of an event, up to 128 (more are
dropped and counted). It then compares each SP with all the others in
parallel. An SP is isolated if none of the eight neighbouring SP positions on
the same chip holds a hit.

An isolated SP goes to `cluster_lut_isolated`. That table maps its 8-bit
hitmap to the hit-pixel centroid, in 1/8-pixel steps. This yields exactly one
cluster without any further search.

### Matrices

All other SPs go down a distribution line of 40 `cluster_matrix` instances.

**Placement.** A free matrix takes the first SP that reaches it as its centre.
The matrix covers 3 × 5 SPs, which is 12 × 10 pixels. It absorbs every later
SP of the same chip that falls in its window, and passes all others to the
next matrix one cycle later. An SP that leaves the end of the line unplaced
is dropped and counted.

**Search.** When the end-of-event marker has passed the whole line, every
matrix searches its 120 pixels for checking pixels. Pixel rows grow to the
north and columns grow to the east. Both conditions need a "zero L" around
the pixel:

- the three pixels to its west;
- the pixel to its south-west;
- the three pixels south of it and of its two eastern neighbours.

With the zero L in place:

- **Condition A:** the pixel itself is hit.
- **Condition B:** the pixel is empty, and the pixels north and east of it
  are hit. This catches clusters whose corner pixel is missing.

**Candidates.** Each checking pixel is the south-west corner of a 3 × 3
candidate. A 512-entry table, computed at elaboration from the centroid
formula, turns the 3 × 3 pattern into a position with 1/8-pixel fractions.
The candidate carries two flags:

- `self_contained`: the 16 pixels around the candidate are empty.
- `edge`: that ring of 16 pixels reaches past the matrix boundary.

A matrix serves one candidate per cycle, lowest pixel index first, and frees
itself when it has no checking pixels left.

### Merge and cluster word

The clusters of the isolated path and of the line are merged into one stream
per event. A cluster holds 29 bits, and the formatter appends three zero bits
to make a 32-bit word:

```
{chip[3:0] = {stream, chip}, col[7:0], row[7:0], col_frac[2:0], row_frac[2:0],
 isolated, self_contained, edge, 3'b000}
```

Here `col` and `row` are the pixel coordinates on the ASIC, and the fractions
are in eighths.

## Output fragments

Each fragment starts with three header words:

| Word | Content |
|---|---|
| w0 | `event_id`, a running count |
| w1 | `{source_id[15:0], size_bytes[15:0]}`; the size includes the header |
| w2 | `{version[7:0], flags[7:0], 4'b0, bxid[11:0]}` |

The flags are `{synced, ts_mismatch, truncated, fast_reset, 4'b0}`.
`truncated` marks an event that lost SPs to a full bin, a full SP buffer or
the end of the matrix line.

The cluster words follow, up to 256 per fragment. `frag_last` marks the
final word of the fragment, and `frag_ready` applies back-pressure.

## Monitoring

`status[s]` (`velo_pkg::stream_status_t`) reports, for each stream:

- lock per link;
- lock losses;
- parity errors;
- extractor, FIFO, bin, TFC, SP and line drops;
- overruns;
- synchronisation state;
- counts of events, isolated clusters, matrix clusters and fragments.

## Limits and departures

- **Event rate.** Events pass one at a time through the time aligner,
  clustering and formatter. An empty event costs about 6-8 cycles, and each
  SP and each cluster adds about one cycle. At 160 MHz this sustains roughly
  20-27 MHz of empty events, which is less than a BX every 4 cycles. So the
  full 40 MHz rate without veto is not reached. The end-to-end test vetoes
  about three BXs in four. Meeting 40 MHz would need several events in
  flight at once in clustering and formatting.
- **Clock domains.** The design uses one clock. Links arriving at 40 MHz
  frames and the TFC input are expected already in the 160 MHz domain.
- **Layouts of this design's own choosing.** Several details are this
  design's own choice:
  - the parity equation;
  - the special-packet code;
  - the hitmap bit order;
  - the exact A/B pixel geometry;
  - the cluster word;
  - the fragment header;
  - the lock counts.

  Each module's opening comment says which parts of that module are its own
  choice.
- **Not included.** The board's transceivers, PCIe, TFC and slow-control
  interfaces, the clocking, and the alternative bypass path are not part of
  this RTL. Their signals are ports of the top.

## Simulation

Every block has a self-checking testbench `tb/tb_<module>.sv`, which ends
with a line `TB_RESULT checks=N failures=M`. `tb_util_pkg.sv` holds the
shared check helpers and a frame/packet model: a scrambler, parity and Gray
coding. Run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_velo_tell40_top \
  rtl/velo_pkg.sv tb/tb_util_pkg.sv -y rtl -y tb tb/tb_velo_tell40_top.sv
./obj_dir/Vtb_velo_tell40_top
```

`tb_velo_tell40_top` runs the whole board at its default sizes for 3300 BXs
on both streams, with all 20 links. Its model and checks cover the
following:

- **Links and synchronisation.** Random link phases, a synchronisation
  packet, and the injection of parity errors and of a link loss.
- **Fragment content.** Random hits, from which a reference clustering
  predicts each fragment.
- **Overload.** A flooded BX that overfills bins and SP buffers.
- **Other TFC and readout cases.** A fast reset, and a long stall on the
  readout side.

The testbench also checks every status counter against what was injected.
`tb_data_stream` runs the same scenario on one stream.
