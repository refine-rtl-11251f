# Stream-FIFO counters for finding the bottleneck of an FPGA dataflow design

A streaming dataflow application on an FPGA is a graph of operators joined by
FIFO streams. The whole graph runs at the rate of its slowest member, and once
everything is on the chip it is hard to see which member that is. This RTL puts
cheap event counters on the stream FIFOs around every operator. After a run,
the host reads the counts:

* **Stall counters** (one per operator) count the cycles in which the operator
  wanted to read an empty input FIFO or write a full output FIFO. The bottleneck
  operator is the one that hardly ever waits: it has the **lowest** stall count.
* **Full counters** (one per FIFO) count the cycles in which a FIFO is full.
  When a sender's output FIFO is full much more often than the receiver's input
  FIFO, the link between them is what limits throughput. In a NoC build that
  link is the NoC channel.

The same counters exist in two builds of an application:

1. **NoC build.** Each operator lives in its own partially reconfigurable page
   and talks to the others through a packet-switched NoC, so each page can be
   compiled on its own. Each page's leaf interface holds the page's stream FIFOs
   and counters.
2. **Monolithic build.** The final build, where operators are joined directly
   by FIFOs and the wrapper around them holds the same counters.

`refine_top` holds both side by side. The NoC itself, the operators and the
host are outside it; their signals are ports.

## Reading the counters

The stall condition of an operator in one cycle is

    stall = OR_i (input FIFO i empty  AND operator ready on input i)
         OR OR_j (output FIFO j full  AND operator valid on output j)

and the stall counter adds one for each enabled cycle in which `stall` is high.
An operator that is busy computing is neither ready nor valid, so it does not
stall. Its neighbours starve or back up behind it and do stall. Rank operators
by stall count and start looking from the lowest.

Counts are in cycles of the clock they are kept in, and operators may run on
different clocks (200-400 MHz in the intended system). Before comparing,
divide each count by its clock frequency, or equivalently multiply it by the
clock period. The testbenches do exactly this. The normalisation is rough: an
operator whose input and output rates differ fills one side's FIFO more easily
than the other's.

The NoC verdict for a stream from operator A to operator B is

    out_full_count(A, stream) - in_full_count(B, stream) > threshold

A true verdict means A kept finding its output FIFO full while B's input FIFO
seldom filled: data was held up in between. In this RTL the usual cause is
several output streams sharing one leaf interface. Each interface sends one
32-bit packet per NoC cycle, whatever the number of streams. The threshold is
the host's choice; the testbenches use 10 % of the words sent.

What the end-to-end test shows at reduced size:

| page | clock period | stall count | normalised |
|------|--------------|-------------|------------|
| 1    | 20           | 449         | 8980       |
| 2 (slow operator) | 12 | 82       | 984        |
| 3    | 20           | 449         | 8980       |

In the same test, one page sent three streams at full rate. Two of them
(0 and 2) shared one leaf, and the third had a leaf to itself:

| stream | sender out_full | receiver in_full | verdict |
|--------|-----------------|------------------|---------|
| 0      | 375             | 0                | NoC-limited |
| 1      | 0               | 0                | not limited |
| 2      | 374             | 0                | NoC-limited |

### The refinement loop

The counts are meant to drive a loop:
1. Build a design point.
2. Run it.
3. Pick the operator with the lowest normalised stall count.
4. Make that operator faster, by an HLS parallelisation factor or a faster
   clock for its page.
5. Build again.

`tb_refine_dse` runs four steps of this loop on the monolithic build. It
uses a four-operator chain with operator clocks of 10, 8, 12 and 10 ns and
16-deep FIFOs:

| point | cycles per word (op 0..3) | stall count x clock period (op 0..3) | picked | run time |
|-------|---------------------------|--------------------------------------|--------|----------|
| 0 | 2 6 3 4 | 56830 **112** 18108 12100 | op 1 | 72.1 us |
| 1 | 2 2 3 4 | 44430 47848 38532 **120** | op 3 | 60.1 us |
| 2 | 2 2 3 1 | 38430 41848 **120** 39120 | op 2 | 54.1 us |
| 3 | 2 2 1 1 | **120** 6128 12132 15120  | op 0 | 30.1 us |

Each pick is the operator with the largest time per word, and each step
speeds up the whole chain. Two cautions:
* The FIFOs must be able to fill within the run. With very deep FIFOs and a
  short run, the operators ahead of the bottleneck never block. They then
  stall as little as the bottleneck does and can be mistaken for it.
* Two operators with nearly equal time per word can swap places in the
  ranking.

### Counter behaviour

* 28-bit counters (`COUNTER_W`). They saturate at all-ones and do not wrap.
* `cnt_en` is a level that marks the run window. `cnt_clr` clears
  synchronously and wins over counting.
* Where each count is kept:

  | count | clock |
  |-------|-------|
  | stall count of a page's operator | page clock |
  | output FIFO full count | page clock (the write side of that FIFO) |
  | input FIFO full count (NoC build) | NoC clock (the write side of that FIFO) |
  | monolithic FIFO full count | the writer's clock |

  Counting on the write side matters. The read side only sees the write
  pointer two clocks late, so it almost never sees a FIFO that is being
  refilled as fast as it drains as full.
* `cnt_en` and `cnt_clr` are synchronized into every clock domain that uses
  them (`bit_sync`). Read the counts once the run has stopped. They are plain
  output ports, with no bus interface.

## NoC build

### Page shell (`noc_page`) and leaf interface (`noc_interface`)

```
 operator (page clock)                          NoC (400 MHz)
   out_j  --> [async FIFO j]--+                     +--> noc_pipeline --> leaf tx
                 full ctr     +--> noc_tx (round robin, header)
   in_i   <-- [async FIFO i]<---- noc_rx (steer by dst_port) <-- noc_pipeline <-- leaf rx
                 full ctr (NoC clock)
   stall_counter over all in_i / out_j of the operator
```

* Each stream has its own dual-clock FIFO (`async_fifo`: Gray-code pointers
  and two-flop synchronizers, first word falls through). This lets every page
  run on its own clock while the NoC side runs at 400 MHz.
* `noc_tx` picks one non-empty output FIFO per NoC cycle in round-robin order
  and registers a packet. All output streams of an interface share one packet
  per cycle.
* `noc_rx` hands an incoming packet to the input FIFO named by its
  `dst_port`. While that FIFO is full, the packet waits and holds the channel.
  A packet for a port the interface does not serve is dropped.
* A page can own several leaf interfaces (`NUM_IF`), as a page recombined from
  smaller pages does. Streams are spread over the interfaces so that the summed
  stream width per interface is as even as possible. Inputs and outputs are
  spread separately, and this happens at elaboration. The method is greedy:
  take the widest stream first and give each stream to the interface with the
  smallest sum so far. Outputs of 32, 32 and 64 bits on two interfaces
  therefore put the 64-bit stream on one interface and both 32-bit streams on
  the other, 64 bits each. Equal widths reduce to stream `s` on interface
  `s mod NUM_IF`. The page keeps **one** stall counter that sees all of the
  operator's streams.

### Streams wider than a packet

A stream may be several 32-bit words wide. `IN_WORDS` / `OUT_WORDS` give each
stream's width, and `MAX_WORDS` sets the width of the data ports. The default
is one word per stream. Each FIFO holds whole stream words at its own width,
so the counters see the operator's real transfers.

* `noc_tx` sends a wide word as consecutive packets of its stream, low word
  first. It pops the FIFO with the last of them. Round robin runs per packet,
  so other streams' packets may slip in between.
* `noc_rx` keeps an assembly register per input port. It takes the earlier
  words at once. It holds the packet with the last word until the FIFO can
  take the whole word.
* Each input port has exactly one sender, so its words always arrive in
  order.
* A 64-bit stream uses two NoC cycles per word. That is why width, not stream
  count, is what gets balanced over the interfaces.

### Packet

49 bits, one 32-bit word per packet:

| bits  | field    | meaning |
|-------|----------|---------|
| 48:44 | dst_pe   | destination leaf address |
| 43:40 | dst_port | input stream number at the destination |
| 39:35 | src_pe   | sending leaf address |
| 34:32 | src_port | output stream number at the sender |
| 31:0  | payload  | data word |

The routing table (`dst_pe`, `dst_port` for each output stream) and each
leaf's own address (`my_pe`) are input ports, meant to be written by a
configuration agent and held steady during a run. When a page has several
interfaces, a sender must address the leaf that carries the destination
stream.

### Link pipeline (`noc_pipeline`, `skid_buffer`)

`PIPE_STAGES` skid-buffer stages per direction sit between each leaf and the
NoC. Each stage registers data, valid **and** ready. A plain pipeline register
would leave ready as one long combinational path through every stage, and that
path would not close at 400 MHz. Each stage adds one cycle of latency and
keeps the full one-packet-per-cycle rate.

### Sizes

24 NoC leaf PEs, two of them for configuration and DMA, leave 22 page leaves
(`NUM_PAGES`).

## Monolithic build (`mono_wrapper`)

A chain of `MONO_OPS` operators between a host input stream and a host output
stream, with one dual-clock FIFO on each link. A direct link needs one FIFO
where the NoC build needs two. Every operator has its own clock. Each FIFO has
a full counter and each operator a stall counter, as in the NoC build. The real
wrapper is generated from the application's graph. The linear chain here is
the simplest shape that exercises the counters; any graph is built the same
way, one `async_fifo` plus `full_counter` per edge and one `stall_counter` per
node.

## Cost

Each counter is 28 flip-flops and an adder. A page with two input and two
output streams has five counters, so 140 counter bits. The source design puts
a page interface with one input and one output 32-bit stream at about
700 LUTs, 1000 FFs and four 36 Kb block RAMs. About 200 LUTs and 400 FFs of
that is counter logic, around 2 % of a single page. Monolithic counters come
to about 60 LUTs and 140 FFs per operator. The counters here have no readout
path, which probably accounts for much of that difference. At its defaults, `refine_top` synthesizes
to about 22 000 flip-flop bits and 6 Mbit of FIFO memory, across 22 pages and
the four-operator monolithic chain.

## Parameters of `refine_top`

| parameter | default | meaning |
|-----------|---------|---------|
| `NUM_PAGES` | 22 | page slots (one operator each) |
| `PAGE_IFS` | 1 | leaf interfaces per page |
| `N_IN`, `N_OUT` | 2, 2 | streams per operator |
| `MAX_WORDS` | 1 | widest stream, in 32-bit words |
| `IN_WORDS`, `OUT_WORDS` | 1 each | width of each stream, in words (3 bits each, packed) |
| `PIPE_STAGES` | 2 | skid stages per direction per leaf |
| `DEPTH` | 2048 | words per stream FIFO |
| `COUNTER_W` | 28 | counter width |
| `MONO_OPS` | 4 | operators in the monolithic chain |
| `MONO_W` | 32 | width of the monolithic chain's links |

Shared constants and the packet type are in `rtl/refine_pkg.sv`.

## Where this RTL follows the source design and where it chooses

These follow the source design:

* The stall rule, with one stall counter per operator.
* Full counters on every FIFO, and the full-count difference as the NoC test.
* 28-bit counters, 32-bit payload in a 49-bit packet, 24 leaves with two
  reserved.
* Dual-clock FIFOs between the operator and NoC clocks, and pipeline
  registers with skid buffers on the NoC links.
* Several interfaces per page, with width-balanced stream assignment, and
  streams of 32 and 64 bits.
* The monolithic build with directly connected FIFOs and the same counters.

These are this design's own choices:

* The header bit layout.
* Carrying wide streams as consecutive packets, low word first.
* The greedy way of evening out stream widths over interfaces.
* Round-robin sharing of a channel.
* Valid/ready flow control at the leaf.
* Dropping packets for unknown ports.
* FIFO depth 2048, which is two 36 Kb block RAMs per 32-bit FIFO.
* Two pipeline stages.
* Two input and two output streams per page.
* Counter saturation, enable/clear and the clock each count is kept in.
* Plain output ports for the counts.
* The linear monolithic chain.
* Asynchronous active-low resets.
* Every link stage is a full skid buffer. The source design uses plain
  registers on data and skid buffers only on ready. The two behave alike at
  the ports, and the full skid buffer is simpler to get right.
* 22 page slots, one per free leaf. A real overlay may use fewer, for example
  when a double page is left unsplit. Unused slots can stay idle with their
  inputs tied low.

Known limits:

* The greedy stream split is exact for simple width mixes such as the one
  above. It is not guaranteed to give the most even split for every mix.
* All pages share one stream shape (`N_IN`, `N_OUT` and the widths). All
  links of the monolithic chain share one width (`MONO_W`).
* The FIFO memory is read asynchronously. That maps to distributed RAM; a
  block-RAM mapping would need a registered read stage.
* How pages recombine (single, double and quad pages sharing leaves) is not
  modelled. Each page slot simply has `PAGE_IFS` leaves.

## Not in this RTL

* The butterfly-fat-tree NoC. Its leaf ports are `leaf_tx_*` / `leaf_rx_*`.
  The testbenches use `tb/bft_noc_model.sv`, a crossbar that moves at most one
  packet per leaf per cycle.
* The user operators, which are HLS-generated. The testbenches use
  `tb/stream_op_model.sv`, an operator with a set initiation interval.
* The host processor, the DMA and configuration PEs, the AXI interconnect and
  the clock generation. Their signals are ports.
* The software that reads the counts and picks the next design point.

## Simulating

Each testbench is self-checking and prints one line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/refine_pkg.sv tb/tb_refine_top.sv --top-module tb_refine_top -o sim
./obj_dir/sim
```

Swap in any other testbench name:

| testbench | what it covers |
|-----------|----------------|
| `tb_stall_counter` | stall rule, counting, clear, saturation |
| `tb_full_counter` | full counting, enable, clear, saturation |
| `tb_async_fifo` | ordering across two clocks, full and empty flags |
| `tb_skid_buffer` | ordering, skid use, one word per cycle, one-cycle latency |
| `tb_noc_pipeline` | ordering, full rate, latency of one cycle per stage (three stages in the test) |
| `tb_noc_tx` | packet header, round-robin order, one packet per cycle |
| `tb_noc_rx` | steering by port, back-pressure, dropping, reassembly of 64-bit words |
| `tb_noc_interface` | loopback data, exact full counts in both clocks, enable and clear |
| `tb_noc_page` | two interfaces, stream split, stall rule across interfaces, doubled bandwidth |
| `tb_noc_page_wide` | 32/32/64-bit streams on two interfaces: width-balanced split, two packets per 64-bit word, data intact |
| `tb_mono_wrapper` | chain data, exact counts, bottleneck found |
| `tb_refine_top` | both builds end to end at reduced size, every mechanism |
| `tb_refine_full` | the same as `tb_refine_top` at the default configuration (22 pages, 2048-deep FIFOs), about 20 s |
| `tb_refine_dse` | four steps of the refinement loop on the monolithic build; each pick must be the slowest operator |

`tb_refine_top.sv` and `tb_refine_full.sv` have the same body and differ only
in configuration. Both run one-word streams. Streams wider than a packet are
tested at page level, in `tb_noc_rx` and `tb_noc_page_wide`.

## How far to trust it

* Every module compiles cleanly with Verilator lint and with the slang front
  end.
* Every testbench checks its outputs against values worked out separately.
* Each module's own testbench fails when a deliberately broken copy of the
  module is substituted.
* Nothing has been run on an FPGA, and there has been no timing analysis at
  400 MHz.
* The NoC model is much kinder than a real fat tree: it has no internal
  contention. NoC-limited verdicts in simulation therefore come only from
  leaf sharing.
