# Time-multiplexed calorimeter trigger: demonstrator RTL

A conventional Level-1 calorimeter trigger splits the detector into regions.
Each processor sees one region and has to share its boundary towers with its
neighbours. A **time-multiplexed trigger** turns this around. Every bunch
crossing (bx, 25 ns) is handed *as a whole* to one processing node. Ten nodes
take turns, round robin, so each node has ten bx to receive one event and process
it. The Pre Processors, which hold the detector's trigger towers, send
the towers of one bx to the node that owns that bx, spread over the ten bx the
node has for it. A node sees a complete event, so an algorithm needs no
boundary sharing and can use event-wide quantities such as total energy.

This repository holds synthesizable SystemVerilog for the **demonstrator**
configuration of such a trigger:

- **4 processing cards with 6 Pre Processors each** (24 in all). Each Pre
  Processor holds one φ column of 56 η towers. It plays the towers back from
  pattern memories in place of the detector and time-multiplexes them onto 12
  node outputs: 10 round-robin nodes and 2 spares.
- **A patch panel** that cables output *m* of every Pre Processor to Main
  Processor *m*. The model adds a SerDes/fibre latency and a different skew on
  every link.
- **2 Main Processors.** Each receives 24 links (24 φ × 56 η, a third of the
  calorimeter). Each one checks and aligns the links, runs an e/γ candidate
  finder and a total-energy sum, and sends results to the Global Trigger on two
  links. It keeps DAQ capture buffers before and after the algorithm.
- **An IPbus-style packet endpoint on every card.** One request packet carries
  many reads and writes; the endpoint executes them and returns one reply
  packet.

The top module is `tmt_demonstrator`. It runs on one clock of 6 × 40 MHz =
240 MHz, the link word rate.

## Timing and the round robin (`bx_timing`)

`bx_timing` divides the 240 MHz clock into bunch crossings:

- a `sub` counter 0..5 inside each bx, and `bx_strobe` on sub 0;
- the bx number 0..3563 within the LHC orbit;
- the round-robin slot `tm_slot`, 0..9.

The slot counter runs freely across orbit boundaries, because 3564 is not a
multiple of 10. Node *k* owns every bx whose slot is *k*. In the demonstrator
the slot equals bx mod 10 only in the first orbit. The testbenches check the
slot against a free-running count.

## Pre Processor: patterns and time multiplexing

### Pattern memories (`pattern_ram`, `pre_processor`)

Each tower has a 32 kbit dual-port memory of 2048 × 16 bits:

- **Port A** is the control bus. It reads and writes, with a one-cycle read.
- **Port B** plays patterns back. In bx *b* the entry read is `b & pattern_mask`.
  Patterns shorter than 2048 bx therefore repeat.

A tower word is `{hcal[6:0], fine_grain, ecal[7:0]}`. The ECAL part keeps the
8-bit energy plus 1 feature bit of today's trigger primitives, and HCAL gets the
remaining 7 bits.

### Link frame (`time_multiplexer`)

When a bx starts, the multiplexer latches all 56 towers into the buffer of that
bx's slot. It then sends them on the output that carries the slot, as a
60-word frame (10 bx × 6 words of 16 bits plus a K flag):

| word   | content                                                        |
|--------|----------------------------------------------------------------|
| 0      | header: K = 1, `4'hF`, bx number [11:0]                        |
| 1..56  | towers, η = 0 first                                            |
| 57     | CRC-16/CCITT (poly 0x1021, init 0xFFFF) over the 56 tower words |
| 58, 59 | idle (K = 1, `16'h50BC`)                                       |

The towers use 9⅓ bx of the 10. The rest carries the header/comma, the CRC and
idle. Ten slots are in flight at any time, one per output. The header leaves two
cycles after the capture, and three cycles after `bx_strobe` at the
`pre_processor` ports.

### Spares and the output map

Each of the 12 outputs has a 4-bit map entry that says which slot it carries.
There is also an enable bit for each output. At reset output *o* carries slot
*o*, and outputs 10 and 11 (the spares) are disabled. To swap a spare in "on
the fly", write the map: for example, carry slot 5 on output 1. The frame being
sent on that output at the moment of the write is cut short. The receiving node
counts it as a link error and aligns again on the next header. The end-to-end
testbench does exactly this.

### Card (`pp_card`)

A card holds 6 `pre_processor`s and one IPbus endpoint. Its register map
(32-bit word addresses):

| address | register |
|---|---|
| `0x0` | run (play patterns) |
| `0x1` | pattern mask [10:0] |
| `0x2` | output map, outputs 0..7 (one nibble each) |
| `0x3` | output map, outputs 8..11 |
| `0x4` | output enables [11:0] (reset `0x3FF`) |
| `0x0100_0000 \| pp<<17 \| tower<<11 \| entry` | pattern word |

## Main Processor

`main_processor` chains the blocks below.

### Link receivers (`link_rx`)

Each link receiver:

- frames its link on the header word;
- passes the header (as the bx) and the 56 towers on;
- checks the CRC.

A CRC mismatch counts as an error. So does a K word inside a frame, or a new
header before the frame has ended. Good frames are counted separately. All
these counters can be read in one IPbus packet.

### Alignment (`link_aligner`)

This is the subtle part. The 24 links arrive with different latencies. Each
link writes into its own FIFO (64 words). Once every FIFO shows a header with
the same bx, the FIFOs are read in lockstep. From then on the algorithm gets
one η column of 24 φ towers per cycle.

- **While aligned.** If the FIFO heads stop agreeing, one of three things has
  happened: some heads show a header and others do not, the header bx numbers
  differ, or a FIFO overflows. The aligner then counts an error and drops out
  of alignment.
- **While not aligned.** Words in front of a header are dropped. If the headers
  disagree, only the links with the *older* bx (modulo the orbit) drop theirs,
  so all links converge on the newest frame. A full FIFO empties all FIFOs, so
  a stale header cannot block the others.
- **Between events.** At least two idle cycles separate the last column of one
  event from the header of the next. The algorithm uses them to close its
  event.

Links may be skewed by up to about one frame. The registered outputs are
`out_sof`/`out_bx` for the header, then 56 cycles of `out_towers`.

### e/γ finder and energy sum (`egamma_alg`)

The finder steps along η and holds three columns of 24 φ towers. Column *e* is
judged one cycle after column *e*+1 arrives. A tower is a candidate when all of
these hold:

- its ECAL energy is non-zero and at least `threshold` (register, reset 4);
- it is strictly greater than its three neighbours at η−1 and its neighbour
  at φ−1;
- it is greater than or equal to its other four neighbours. This tie-break
  makes equal neighbours give exactly one candidate.

The candidate Et is the centre plus the largest of its four edge neighbours,
a 9-bit value. A candidate is `{et[8:0], eta[5:0], phi[6:0]}`. There is
no wrap-around in φ, because a demonstrator node sees 24 of the 72 φ columns.

The finder also sums ECAL + HCAL over all 1344 towers. It reports the sum one
cycle after the last column has been judged: an event-wide quantity can only
leave at the end of the event.

### Global Trigger output (`gt_tx`)

There are two output links, each carrying 32 data bits plus a K flag per cycle.
Per event the order is:

1. a header word `{8'hBC, 12'b0, bx}` with K = 1 on both links;
2. the candidates of each column, as soon as the column is judged, up to two per
   cycle, lowest φ first, tagged `2'b01`;
3. the sum word, tagged `2'b10`, on link 0.

Entries wait in a 16-deep queue. If the queue is full, an entry is dropped and
counted, and the count can be read. The latency from the finder to the link is
two cycles. One event period gives room for about 118 candidates. Dense events
with a low threshold overflow, and the end-to-end testbench provokes this.

### DAQ capture (`daq_capture`, two instances)

One instance records the aligned towers (384 bits per cycle). The other records
the non-idle Global Trigger words. Each instance works like this:

1. It writes its stream into a 1024-word ring. At every event start it also
   writes an entry in a 32-entry event table.
2. A Level-1 accept arrives. The trigger bx is the current bx minus the
   latency register, modulo the orbit.
3. A search walks the event table, one entry per cycle. A matching event is
   copied into a 64-word capture buffer and held until it is re-armed.
4. A trigger is counted as a miss if the bx is not in the table (this node did
   not own it, or the event has left the ring), or if it arrives while a
   capture is in progress or held.

### Main Processor registers

| address | register |
|---|---|
| `0x0` | W: re-arm both captures |
| `0x1` | e/γ threshold [7:0] |
| `0x2` | L1A latency in bx [11:0] |
| `0x3` | status: aligned, pre capture held, post capture held |
| `0x4` | alignments [15:0], alignment errors [31:16] |
| `0x5` / `0x6` | GT queue overflows / candidates sent |
| `0x7` / `0x8` | pre / post capture: found [15:0], missed [31:16] |
| `0x9` / `0xA` | pre / post capture: bx [11:0], words [31:16] |
| `0x100+i` / `0x200+i` | link *i*: CRC/framing errors / good frames |
| `0x1_0000 + 16·word + k` | pre capture, towers of links 2k, 2k+1 |
| `0x2_0000 + 4·word + k` | post capture: k = 0 link 0, 1 link 1, 2 K flags |

## IPbus endpoint (`ipbus_ctrl`)

Requests and replies are 32-bit word streams (valid/ready/last). A packet is a
sequence of transactions, each with a header word:

| bits    | field |
|---------|-------|
| [31:28] | version = 1 |
| [27:17] | transaction id |
| [16:8]  | word count |
| [7:3]   | type |
| [2:0]   | info code |

The types are:

- `0x03`: read;
- `0x04`: write;
- `0x08`: non-incrementing read;
- `0x09`: non-incrementing write.

Each request header is followed by a base address, plus the data for writes.
The reply repeats each header with the info code set (0 ok, 1 bus error, 2
bad/truncated request), followed by the read data. Register slaves use a simple
bus: address, write data, strobe and write flag out; read data, ack and error
back. The Ethernet/UDP transport under the packets is not part of the RTL.

## Files

| file | content |
|---|---|
| `rtl/tmt_pkg.sv` | constants, tower, link, candidate and bus types, CRC function |
| `rtl/bx_timing.sv` | bx and round-robin slot counters |
| `rtl/pattern_ram.sv` | 2048 × 16 dual-port pattern memory |
| `rtl/time_multiplexer.sv` | slot buffers, frame builder, output map |
| `rtl/pre_processor.sv` | 56 pattern memories + time multiplexer |
| `rtl/pp_card.sv` | 6 Pre Processors + IPbus endpoint + registers |
| `rtl/link_delay.sv` | fixed SerDes/fibre latency of one link |
| `rtl/link_rx.sv` | link framing and CRC check |
| `rtl/sync_fifo.sv` | show-ahead FIFO (helper) |
| `rtl/link_aligner.sv` | multi-link event alignment |
| `rtl/egamma_alg.sv` | e/γ finder and total energy |
| `rtl/gt_tx.sv` | Global Trigger output formatter |
| `rtl/daq_capture.sv` | ring buffer, event table, trigger search, capture |
| `rtl/ipbus_ctrl.sv` | packet transaction engine |
| `rtl/main_processor.sv` | one Main Processor node |
| `rtl/tmt_demonstrator.sv` | top: cards, patch panel, nodes |

Every block has a testbench `tb/tb_<block>.sv`, except the package and
`link_delay`, which the end-to-end test covers.
Each is self-checking: it compares against a model written in the testbench,
has a watchdog, and prints `TB_RESULT checks=… failures=…`. Where the design
has a latency, the testbench checks it to the cycle: header 3 cycles after
`bx_strobe`, frame length, finder and GT output timing.

## End-to-end test

`tb/tb_tmt_demonstrator.sv` runs the top with all parameters at their defaults.
It does the following:

1. Loads random 8-entry patterns into all 24 Pre Processors through the four
   card ports, and starts them.
2. Decodes both nodes' Global Trigger streams. Every event is compared with a
   reference finder run over the 24 × 56 towers of that bx. The check covers
   candidates in order and the total energy. Node 0 must see only bx ≡ 0 and
   node 1 only bx ≡ 1 (mod 10).
3. Sends a Level-1 accept for a node-0 bx. Node 0 must capture it and node 1
   must miss it. The captured towers are read back and checked.
4. Swaps a spare in. Node 1 must then see bx ≡ 5 and realign, the cut frames
   must show up as link errors, and events must match again.
5. Sets the threshold to 0 with dense patterns, and expects Global Trigger
   queue overflows.

Each of these mechanisms is counted, and one that never happened is a failure.
The run takes about two minutes with Verilator.

To simulate with Verilator (list the package first):

```sh
verilator --binary --timing --assert -Wno-fatal -Irtl \
  rtl/tmt_pkg.sv $(ls rtl/*.sv | grep -v tmt_pkg) tb/tb_tmt_demonstrator.sv \
  --top-module tb_tmt_demonstrator -Mdir obj && ./obj/Vtb_tmt_demonstrator
```

The same command with another testbench runs a block test. `tb_main_processor`
uses 4 links instead of 24 to stay short.

## Choices made here, and departures

The design follows the demonstrator's architecture and numbers:

- 24 Pre Processors on 4 cards, 2 Main Processors, 24 links per node;
- a 10-bx multiplexing period, 10 nodes + 2 spares;
- 56 η towers compressed to 16 bits;
- 32 kbit pattern memories;
- DAQ capture before and after the algorithm;
- candidates sent as soon as found and sums at the end of the event, on two
  links;
- packet-based control.

The following are this design's own choices:

- **Word format and clock.** 16-bit link words with a K flag at 240 MHz stand in
  for the 8b/10b serial links. The frame layout, header, CRC polynomial and
  idle code are chosen here.
- **Tower layout and algorithm.** The bit split of the 16-bit tower, the
  local-maximum e/γ finder and its tie-break, and the candidate and sum word
  formats are chosen here. The actual algorithm of the demonstrator is not
  reproduced.
- **Alignment policy** and the FIFO depth.
- **DAQ sizes** (ring, table, capture depth) and the rule that the trigger bx is
  the current bx minus a latency register.
- **All register maps and the IPbus header layout.**
- **Latency and skew.** SerDes/fibre latency is modelled as 24 cycles (~100 ns)
  plus a skew of 0–12 cycles that differs per link.

Not built:

- the serial transceivers and optics, the Ethernet/UDP stack under IPbus, and
  host software;
- the MicroTCA crate management (MCH, MMC/IPMI), the AMC13 and the QDR memories;
- FPGA reconfiguration;
- the Global Trigger itself, including the candidate sorting it could do.

The full CMS configuration (72 φ, 10 nodes, 24-bit towers, 10 Gb/s links) is
also not built or simulated. Only the demonstrator was. In the top, the node
count and link count are parameters, and the outputs for nodes not present come
out on `spare_link`.

Known limits:

- A node needs at least two idle cycles between events. The frame format gives
  three.
- If frames arrive back to back after a realignment, the extra delay this adds
  is not recovered until the link FIFOs drain.
- The GT queue drops candidates rather than back-pressuring the finder.
